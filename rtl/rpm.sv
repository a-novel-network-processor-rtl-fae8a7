// rpm: RISC-based pipelined module (RPM).
//
// An RPM processes packet headers at line rate in a three-stage pipeline:
// the field extractor (FEX) pulls the fields the application needs out of
// the one or two 64-byte segments the data memory manager sends; the protocol
// processing engine (this RPM's glue logic, read/write control RAM unit and
// the RISC core attached through the risc_* port) updates the flow state and
// decides; the field modifier (FMO) writes the new field values into the
// segments, which have meanwhile waited in the packet delay FIFO, and sends
// them back with the verdict. Because only fields travel through the
// processing engine and the segments bypass it, the work per packet does not
// depend on the packet length.
//
// Interface: s_* takes the segments (valid/ready beats, tag with the first
// beat); m_* returns the modified segments with the tag and the accept bit.
// prog_* loads the FEX (prog_sel=0) or FMO (prog_sel=1) microcode. cr_* is
// this RPM's client port on the control RAM interface. risc_* connects the
// RISC core (see rpg). risc_stall freezes the extractor, glue logic start and
// modifier.
//
// The structure (FEX, PPE with glue logic and RWR, FMO, packet delay FIFO,
// stall feedback) follows the architecture. The RISC core itself is not part
// of this module.
//
// Lint notes: the extractor's length output (fx_len) and the delay FIFO's
// occupancy (dly_count) are left unread; the length travels in the tag.
module rpm
  import pro3_pkg::*;
#(
  parameter int unsigned DEPTH      = UCODE_DEPTH,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_we,
  input  logic                     prog_sel,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [31:0]              prog_wdata,
  input  logic                     s_valid,
  output logic                     s_ready,
  input  beat_t                    s_beat,
  input  rpm_tag_t                 s_tag,
  output logic                     m_valid,
  input  logic                     m_ready,
  output beat_t                    m_beat,
  output rpm_tag_t                 m_tag,
  output logic                     m_accept,
  output logic                     cr_req,
  output logic                     cr_we,
  output flow_t                    cr_addr,
  output logic [STATE_W-1:0]       cr_wdata,
  input  logic                     cr_gnt,
  input  logic                     cr_rvalid,
  input  logic [STATE_W-1:0]       cr_rdata,
  output logic                     risc_start,
  output logic                     risc_bank,
  input  logic [4:0]               risc_addr,
  input  logic                     risc_we,
  input  logic [31:0]              risc_wdata,
  output logic [31:0]              risc_rdata,
  input  logic                     risc_done,
  input  logic                     risc_stall,
  output logic [15:0]              fex_icount,
  output logic [15:0]              fmo_icount,
  output logic [1:0]               bank_full
);

  logic     stall;
  logic     fex_s_ready, dly_in_ready;
  logic     fx_valid, fx_ready;
  field_t   fx_fields [NFIELDS];
  logic [RPM_TAG_W-1:0] fx_tag_raw, n_tag_raw, m_tag_raw;
  rpm_tag_t fx_tag, n_tag;
  logic [LEN_W-1:0] fx_len;
  logic     d_valid, d_ready;
  beat_t    d_beat;
  logic     n_valid, n_ready, n_accept;
  field_t   n_fields [NFIELDS];

  assign s_ready = fex_s_ready && dly_in_ready && !stall;
  assign fx_tag  = rpm_tag_t'(fx_tag_raw);
  assign m_tag   = rpm_tag_t'(m_tag_raw);

  fex #(.DEPTH(DEPTH), .TAG_W(RPM_TAG_W)) u_fex (
    .clk, .rst_n, .stall,
    .prog_we(prog_we && !prog_sel), .prog_addr, .prog_wdata,
    .s_valid(s_valid && dly_in_ready), .s_ready(fex_s_ready), .s_beat, .s_tag(s_tag),
    .f_valid(fx_valid), .f_ready(fx_ready), .f_fields(fx_fields), .f_tag(fx_tag_raw),
    .f_len(fx_len), .f_icount(fex_icount)
  );

  // packet delay FIFO: the RISC bypass datapath
  logic [$bits(beat_t)-1:0] dly_out;
  logic [$clog2(FIFO_DEPTH+1)-1:0] dly_count;
  sync_fifo #(.W($bits(beat_t)), .DEPTH(FIFO_DEPTH)) u_delay (
    .clk, .rst_n,
    .in_valid(s_valid && fex_s_ready && !stall), .in_ready(dly_in_ready), .in_data(s_beat),
    .out_valid(d_valid), .out_ready(d_ready), .out_data(dly_out), .count(dly_count)
  );
  assign d_beat = beat_t'(dly_out);

  rpg u_rpg (
    .clk, .rst_n,
    .f_valid(fx_valid), .f_ready(fx_ready), .f_fields(fx_fields), .f_tag(fx_tag),
    .cr_req, .cr_we, .cr_addr, .cr_wdata, .cr_gnt, .cr_rvalid, .cr_rdata,
    .risc_start, .risc_bank, .risc_addr, .risc_we, .risc_wdata, .risc_rdata,
    .risc_done, .risc_stall, .rpm_stall(stall),
    .n_valid, .n_ready, .n_fields, .n_accept, .n_tag,
    .bank_full_o(bank_full)
  );
  assign n_tag_raw = n_tag;

  fmo #(.DEPTH(DEPTH), .TAG_W(RPM_TAG_W)) u_fmo (
    .clk, .rst_n, .stall,
    .prog_we(prog_we && prog_sel), .prog_addr, .prog_wdata,
    .n_valid, .n_ready, .n_fields, .n_accept, .n_tag(n_tag_raw),
    .d_valid, .d_ready, .d_beat,
    .m_valid, .m_ready, .m_beat, .m_accept, .m_tag(m_tag_raw), .m_icount(fmo_icount)
  );

endmodule

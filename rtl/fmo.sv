// fmo: microprogrammed field modifier (FMO).
//
// The FMO puts the results of protocol processing back into the packet. It
// takes the new field values and the accept/reject decision for a packet from
// the RPM glue logic, and the delayed copy of the same one or two 64-byte
// segments from the packet delay FIFO. It holds the segments in a 128-byte
// buffer, runs its microprogram, and streams the modified segments out with
// the packet's tag and decision. Only the fields the program names are
// rewritten; every other byte leaves as it came in.
//
// Instructions (encoding in pro3_pkg): REPL writes field[f] into bits
// [shift +: width] of the 32-bit big-endian window at base+offset; ADDB and
// SETB move the base pointer as in the extractor; CSUM recomputes the IPv4
// header checksum of the header at base+offset (the dedicated checksum
// hardware); END starts the output.
//
// Interface: n_* (new fields, decision, tag) and d_* (delayed beats, sop..eop)
// are valid/ready inputs taken in either order; m_* is the valid/ready output
// beat stream. stall freezes the engine.
//
// Timing: one beat per cycle in and out, two cycles per instruction.
//
// The architecture gives the engine's place and role and the 2K microcode
// store; the instruction set and the buffering are this design's choices.
//
// Lint notes: the function apply takes the whole instruction but does not
// need its field-register and immediate bits, which the linter reports.
module fmo
  import pro3_pkg::*;
#(
  parameter int unsigned DEPTH = UCODE_DEPTH,
  parameter int unsigned TAG_W = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     stall,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [31:0]              prog_wdata,
  // new fields from the glue logic
  input  logic                     n_valid,
  output logic                     n_ready,
  input  field_t                   n_fields [NFIELDS],
  input  logic                     n_accept,
  input  logic [TAG_W-1:0]         n_tag,
  // delayed packet segments
  input  logic                     d_valid,
  output logic                     d_ready,
  input  beat_t                    d_beat,
  // modified segments out
  output logic                     m_valid,
  input  logic                     m_ready,
  output beat_t                    m_beat,
  output logic                     m_accept,
  output logic [TAG_W-1:0]         m_tag,
  output logic [15:0]              m_icount
);

  typedef enum logic [2:0] {S_RECV, S_FETCH, S_EXEC, S_SEND} state_e;

  logic [31:0]              ucode [DEPTH];
  hdr_bytes_t               buf_q;
  field_t                   fld_q [NFIELDS];
  state_e                   state;
  logic [$clog2(DEPTH)-1:0] pc;
  fe_instr_t                ir;
  logic [7:0]               base;
  logic                     have_n, have_d;
  logic [4:0]               nwords, ridx;
  logic [3:0]               last_nbytes;

  always_ff @(posedge clk) begin
    if (prog_we) ucode[prog_addr] <= prog_wdata;
  end

  assign n_ready = (state == S_RECV) && !have_n && !stall;
  assign d_ready = (state == S_RECV) && !have_d && !stall;
  assign m_valid = (state == S_SEND) && !stall;

  always_comb begin
    m_beat.sop    = (ridx == 5'd0);
    m_beat.eop    = (ridx == nwords - 5'd1);
    m_beat.nbytes = m_beat.eop ? last_nbytes : 4'd8;
    for (int i = 0; i < BUS_BYTES; i++)
      m_beat.data[BUS_W-1-8*i -: 8] = buf_q[int'(ridx[3:0])*BUS_BYTES+i];
  end

  // Result of the instruction in ir, computed on the buffer.
  function automatic hdr_bytes_t apply(input hdr_bytes_t b, input fe_instr_t i,
                                       input logic [7:0] bs, input field_t f);
    hdr_bytes_t  r;
    int unsigned pos;
    logic [31:0] w, m;
    logic [15:0] ck;
    r   = b;
    pos = int'(bs) + int'(i.off);
    if (i.op == OP_REPL) begin
      w = get_window(b, pos);
      m = width_mask(i.width) << i.shift;
      w = (w & ~m) | ((f << i.shift) & m);
      for (int k = 0; k < 4; k++)
        if (pos + k < HDR_BYTES) r[pos+k] = w[31-8*k -: 8];
    end else if (i.op == OP_CSUM && pos + 11 < HDR_BYTES) begin
      ck = ~ip_hdr_sum(b, pos, 1'b1);
      r[pos+10] = ck[15:8];
      r[pos+11] = ck[7:0];
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_RECV;
      pc          <= '0;
      ir          <= '0;
      base        <= '0;
      have_n      <= 1'b0;
      have_d      <= 1'b0;
      nwords      <= '0;
      ridx        <= '0;
      last_nbytes <= 4'd8;
      m_accept    <= 1'b0;
      m_tag       <= '0;
      m_icount    <= '0;
      for (int i = 0; i < NFIELDS; i++) fld_q[i] <= '0;
      for (int i = 0; i < HDR_BYTES; i++) buf_q[i] <= '0;
    end else if (!stall) begin
      unique case (state)
        S_RECV: begin
          if (n_valid && !have_n) begin
            fld_q    <= n_fields;
            m_accept <= n_accept;
            m_tag    <= n_tag;
            have_n   <= 1'b1;
          end
          if (d_valid && !have_d) begin
            if (d_beat.sop) nwords <= 5'd1;
            else if (nwords < 5'(HDR_WORDS)) nwords <= nwords + 5'd1;
            if (!d_beat.sop && nwords >= 5'(HDR_WORDS)) begin
              // beats past the second segment are not expected; ignore them
            end else begin
              for (int i = 0; i < BUS_BYTES; i++)
                buf_q[(d_beat.sop ? 0 : int'(nwords[3:0]))*BUS_BYTES+i] <= d_beat.data[BUS_W-1-8*i -: 8];
            end
            if (d_beat.eop) begin
              have_d      <= 1'b1;
              last_nbytes <= d_beat.nbytes;
            end
          end
          if (have_n && have_d) begin
            state    <= S_FETCH;
            pc       <= '0;
            base     <= '0;
            m_icount <= '0;
          end
        end
        S_FETCH: begin
          ir    <= fe_instr_t'(ucode[pc]);
          pc    <= pc + 1'b1;
          state <= S_EXEC;
        end
        S_EXEC: begin
          m_icount <= m_icount + 16'd1;
          state    <= S_FETCH;
          unique case (ir.op)
            OP_REPL, OP_CSUM: buf_q <= apply(buf_q, ir, base, fld_q[ir.fld]);
            OP_ADDB: base <= base + {fld_q[ir.fld][5:0], 2'b00};
            OP_SETB: base <= {ir.imm, 2'b00};
            default: begin
              state <= S_SEND;
              ridx  <= '0;
            end
          endcase
        end
        S_SEND: if (m_ready) begin
          if (m_beat.eop) begin
            state  <= S_RECV;
            have_n <= 1'b0;
            have_d <= 1'b0;
          end else begin
            ridx <= ridx + 5'd1;
          end
        end
        default: state <= S_RECV;
      endcase
    end
  end

endmodule

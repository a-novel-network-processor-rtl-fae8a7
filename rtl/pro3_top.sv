// pro3_top: PRO3 programmable protocol processor, packet path of the chip.
//
// A packet that arrives on in_* is written by the data memory manager (DMM)
// into segment memory and, at the same time, examined by the packet
// classifier, which checks the IP header, extracts the classification key and
// looks it up in the external ternary CAM. Dropped packets are freed at once;
// accepted ones join their flow's queue in the DMM and the flow is entered in
// one of the 32 weighted-round-robin queues of the task scheduler. When the
// scheduler picks the flow, the DMM either sends the head packet straight out
// (queue destination 0) or sends its first one or two 64-byte segments to one
// of the two RISC-based pipelined modules (RPMs, destination 1). An RPM's
// field extractor pulls the header fields out, its glue logic fetches the
// flow's state from the control RAM and gives fields and state to the RISC
// core (outside this module, on the risc_* ports), and its field modifier
// writes the RISC's new field values into the header; the DMM puts the
// modified header back into the stored packet and sends it out, or discards
// it if the RISC rejected it. A CRC unit on the receive side computes the
// 32-bit and 10-bit CRCs of each incoming frame, one on the transmit side the
// 32-bit CRC of each outgoing frame. A timer pool generates per-flow timeout
// events for the control processor.
//
// Outside this module, on ports: the ternary CAM (cam_*), the two RISC cores
// of the RPMs (risc_*), and the host/control CPU, which loads microcode
// (prog_*: target 0 classifier extractor, 1 extractors of both RPMs, 2
// modifiers of both RPMs), configures the scheduler queues (cfg_*), reads and
// writes flow state (host_cr_*) and uses the timers (tm_*).
//
// After reset the DMM initialises its tables; packets are accepted once
// init_done is high (max(NSEG, NFLOWS) cycles).
//
// Lint notes: some sub-block outputs are left unread on purpose: the
// receive CRC10 valid (rx10_valid; the CRC10 value is shown, the CRC32 valid
// marks the same beat), the scheduler's queue number (deq_q) and the RPMs'
// instruction counters (fex_ic, fmo_ic). The reset also appears in the
// assertions' disable condition, which the linter reports as a reset used
// both synchronously and asynchronously.
// tm_set_ready is always 1 (the timer pool takes a request every cycle).
module pro3_top
  import pro3_pkg::*;
#(
  parameter int unsigned NFLOWS  = 1 << FLOW_W,
  parameter int unsigned NSEG    = 65536,
  parameter int unsigned NTIMERS = 1024,
  parameter int unsigned DEPTH   = UCODE_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       init_done,
  // network side
  input  logic                       in_valid,
  output logic                       in_ready,
  input  beat_t                      in_beat,
  output logic                       out_valid,
  input  logic                       out_ready,
  output beat_t                      out_beat,
  output logic                       rx_crc_valid,
  output logic [31:0]                rx_crc32,
  output logic [9:0]                 rx_crc10,
  output logic                       tx_crc_valid,
  output logic [31:0]                tx_crc32,
  // ternary CAM
  output logic                       cam_req_valid,
  input  logic                       cam_req_ready,
  output logic [KEY_W-1:0]           cam_key,
  input  logic                       cam_rsp_valid,
  input  logic                       cam_rsp_hit,
  input  flow_t                      cam_rsp_flow,
  // RISC cores of the two RPMs
  output logic [1:0]                 risc_start,
  output logic [1:0]                 risc_bank,
  input  logic [4:0]                 risc_addr  [2],
  input  logic [1:0]                 risc_we,
  input  logic [31:0]                risc_wdata [2],
  output logic [31:0]                risc_rdata [2],
  input  logic [1:0]                 risc_done,
  input  logic [1:0]                 risc_stall,
  // host / control CPU
  input  logic                       prog_we,
  input  logic [1:0]                 prog_target,
  input  logic [$clog2(DEPTH)-1:0]   prog_addr,
  input  logic [31:0]                prog_wdata,
  input  logic                       cfg_we,
  input  logic [4:0]                 cfg_q,
  input  logic [7:0]                 cfg_weight,
  input  logic [1:0]                 cfg_dest,
  input  logic                       host_cr_req,
  input  logic                       host_cr_we,
  input  flow_t                      host_cr_addr,
  input  logic [STATE_W-1:0]         host_cr_wdata,
  output logic                       host_cr_gnt,
  output logic                       host_cr_rvalid,
  output logic [STATE_W-1:0]         host_cr_rdata,
  input  logic                       tm_set_valid,
  output logic                       tm_set_ready,
  input  logic [$clog2(NTIMERS)-1:0] tm_set_id,
  input  flow_t                      tm_set_flow,
  input  logic [23:0]                tm_set_timeout,
  input  logic                       tm_set_cancel,
  output logic                       tm_ev_valid,
  input  logic                       tm_ev_ready,
  output logic [$clog2(NTIMERS)-1:0] tm_ev_id,
  output flow_t                      tm_ev_flow,
  output logic [23:0]                tm_now,
  // statistics
  output logic [31:0]                st_in,
  output logic [31:0]                st_cls_drop,
  output logic [31:0]                st_bad_hdr,
  output logic [31:0]                st_miss,
  output logic [31:0]                st_rejected,
  output logic [31:0]                st_out,
  output logic [31:0]                st_to_rpm [2],
  output logic [1:0]                 rpm_bank_full [2],
  output logic [$clog2(NSEG):0]      free_cnt
);

  // ---------------- IN: the stream goes to the DMM and the classifier ----------------
  logic dmm_in_ready, cls_in_ready;
  assign in_ready = dmm_in_ready && cls_in_ready;

  // ---------------- pre-processing: CRC units ----------------
  logic rx10_valid;
  crc_unit #(.WIDTH(32), .POLY(32'h04C1_1DB7), .INIT('1), .XOROUT('1)) u_rx_crc32 (
    .clk, .rst_n, .valid(in_valid && in_ready), .beat(in_beat),
    .crc_valid(rx_crc_valid), .crc(rx_crc32)
  );
  crc_unit #(.WIDTH(10), .POLY(10'h233), .INIT('0), .XOROUT('0)) u_rx_crc10 (
    .clk, .rst_n, .valid(in_valid && in_ready), .beat(in_beat),
    .crc_valid(rx10_valid), .crc(rx_crc10)
  );

  // ---------------- packet classifier ----------------
  logic  cls_valid, cls_ready, cls_drop;
  flow_t cls_flow;
  pkt_classifier #(.DEPTH(DEPTH)) u_cls (
    .clk, .rst_n,
    .prog_we(prog_we && prog_target == 2'd0), .prog_addr, .prog_wdata,
    .in_valid(in_valid && dmm_in_ready), .in_ready(cls_in_ready), .in_beat,
    .cam_req_valid, .cam_req_ready, .cam_key, .cam_rsp_valid, .cam_rsp_hit, .cam_rsp_flow,
    .res_valid(cls_valid), .res_ready(cls_ready), .res_drop(cls_drop), .res_flow(cls_flow),
    .st_bad_hdr, .st_miss
  );

  // ---------------- task scheduler ----------------
  logic       enq_valid, enq_ready, deq_valid, deq_ready;
  flow_t      enq_flow, deq_flow;
  logic [4:0] deq_q;
  logic [1:0] deq_dest;
  wrr_sched #(.NQ(NUM_SQ), .NFLOWS(NFLOWS)) u_tsc (
    .clk, .rst_n, .cfg_we, .cfg_q, .cfg_weight, .cfg_dest,
    .enq_valid, .enq_ready, .enq_flow,
    .deq_valid, .deq_ready, .deq_flow, .deq_q, .deq_dest
  );

  // ---------------- data memory manager ----------------
  logic [1:0] rpm_valid, rpm_ready, ret_valid, ret_ready, ret_accept;
  beat_t      rpm_beat;
  rpm_tag_t   rpm_tag;
  beat_t      ret_beat [2];
  rpm_tag_t   ret_tag  [2];
  logic       dmm_out_valid;
  dmm #(.NFLOWS(NFLOWS), .NSEG(NSEG), .NRPM(2)) u_dmm (
    .clk, .rst_n, .init_done,
    .in_valid(in_valid && cls_in_ready), .in_ready(dmm_in_ready), .in_beat,
    .cls_valid, .cls_ready, .cls_drop, .cls_flow,
    .sq_enq_valid(enq_valid), .sq_enq_ready(enq_ready), .sq_enq_flow(enq_flow),
    .sq_deq_valid(deq_valid), .sq_deq_ready(deq_ready), .sq_deq_flow(deq_flow), .sq_deq_dest(deq_dest),
    .rpm_valid, .rpm_ready, .rpm_beat, .rpm_tag,
    .ret_valid, .ret_ready, .ret_beat, .ret_tag, .ret_accept,
    .out_valid(dmm_out_valid), .out_ready, .out_beat,
    .st_in, .st_cls_drop, .st_rejected, .st_out, .st_to_rpm, .free_cnt
  );
  assign out_valid = dmm_out_valid;

  // ---------------- control RAM interface: RPM0, RPM1, host ----------------
  logic [2:0]         cr_req, cr_we, cr_gnt, cr_rvalid;
  flow_t              cr_addr  [3];
  logic [STATE_W-1:0] cr_wdata [3];
  logic [STATE_W-1:0] cr_rdata;
  ctrl_ram_if #(.NCLI(3), .NFLOWS(NFLOWS)) u_cri (
    .clk, .rst_n, .req(cr_req), .we(cr_we), .addr(cr_addr), .wdata(cr_wdata),
    .gnt(cr_gnt), .rvalid(cr_rvalid), .rdata(cr_rdata)
  );
  assign cr_req[2]      = host_cr_req;
  assign cr_we[2]       = host_cr_we;
  assign cr_addr[2]     = host_cr_addr;
  assign cr_wdata[2]    = host_cr_wdata;
  assign host_cr_gnt    = cr_gnt[2];
  assign host_cr_rvalid = cr_rvalid[2];
  assign host_cr_rdata  = cr_rdata;

  // ---------------- the two RPMs ----------------
  for (genvar r = 0; r < 2; r++) begin : g_rpm
    logic [15:0] fex_ic, fmo_ic;
    rpm #(.DEPTH(DEPTH)) u_rpm (
      .clk, .rst_n,
      .prog_we(prog_we && prog_target != 2'd0), .prog_sel(prog_target == 2'd2),
      .prog_addr, .prog_wdata,
      .s_valid(rpm_valid[r]), .s_ready(rpm_ready[r]), .s_beat(rpm_beat), .s_tag(rpm_tag),
      .m_valid(ret_valid[r]), .m_ready(ret_ready[r]), .m_beat(ret_beat[r]), .m_tag(ret_tag[r]),
      .m_accept(ret_accept[r]),
      .cr_req(cr_req[r]), .cr_we(cr_we[r]), .cr_addr(cr_addr[r]), .cr_wdata(cr_wdata[r]),
      .cr_gnt(cr_gnt[r]), .cr_rvalid(cr_rvalid[r]), .cr_rdata(cr_rdata),
      .risc_start(risc_start[r]), .risc_bank(risc_bank[r]), .risc_addr(risc_addr[r]),
      .risc_we(risc_we[r]), .risc_wdata(risc_wdata[r]), .risc_rdata(risc_rdata[r]),
      .risc_done(risc_done[r]), .risc_stall(risc_stall[r]),
      .fex_icount(fex_ic), .fmo_icount(fmo_ic), .bank_full(rpm_bank_full[r])
    );
  end

  // ---------------- post-processing: transmit CRC ----------------
  crc_unit #(.WIDTH(32), .POLY(32'h04C1_1DB7), .INIT('1), .XOROUT('1)) u_tx_crc32 (
    .clk, .rst_n, .valid(out_valid && out_ready), .beat(out_beat),
    .crc_valid(tx_crc_valid), .crc(tx_crc32)
  );

  // ---------------- timers ----------------
  timer_pool #(.NTIMERS(NTIMERS), .TICK_DIV(200), .TIME_W(24)) u_timers (
    .clk, .rst_n,
    .set_valid(tm_set_valid), .set_ready(tm_set_ready), .set_id(tm_set_id), .set_flow(tm_set_flow),
    .set_timeout(tm_set_timeout), .set_cancel(tm_set_cancel),
    .ev_valid(tm_ev_valid), .ev_ready(tm_ev_ready), .ev_id(tm_ev_id), .ev_flow(tm_ev_flow),
    .now(tm_now)
  );

endmodule

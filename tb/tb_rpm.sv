// tb_rpm: one RISC-based pipelined module with a control RAM (1024 flows) and
// the behavioural RISC model running the firewall/address-translation
// routine. Flow states are written first: flows with translation on, flows
// with translation off and blocked flows. 60 TCP/IP packets (IP headers
// 20..60 bytes, one or two segments) are sent back to back; each modified
// header that comes back is compared byte for byte with the packet rebuilt
// from scratch with the translated address and port (or with the original,
// for flows without translation), and its verdict with the flow's policy.
// The flow state written back must count the packets seen. The run must
// show both register-file halves full at once (the RISC busy on one packet
// while the next is loaded) and RISC stalls, which must not lose packets.
module tb_rpm;
  import pro3_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        prog_we = 0, prog_sel = 0;
  logic [10:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic        s_valid = 0, m_ready = 1;
  beat_t       s_beat = '0;
  rpm_tag_t    s_tag = '0;
  logic        s_ready, m_valid, m_accept;
  beat_t       m_beat;
  rpm_tag_t    m_tag;
  logic [1:0]  cr_req, cr_we, cr_gnt, cr_rvalid;
  flow_t       cr_addr [2];
  logic [63:0] cr_wdata [2];
  logic [63:0] cr_rdata;
  logic        risc_start, risc_bank, risc_we, risc_done, risc_stall;
  logic [4:0]  risc_addr;
  logic [31:0] risc_wdata, risc_rdata;
  logic [15:0] fex_icount, fmo_icount;
  logic [1:0]  bank_full;
  int          n_done, n_stalls;

  rpm #(.DEPTH(2048), .FIFO_DEPTH(64)) dut (.clk, .rst_n, .prog_we, .prog_sel, .prog_addr, .prog_wdata,
    .s_valid, .s_ready, .s_beat, .s_tag, .m_valid, .m_ready, .m_beat, .m_tag, .m_accept,
    .cr_req(cr_req[0]), .cr_we(cr_we[0]), .cr_addr(cr_addr[0]), .cr_wdata(cr_wdata[0]),
    .cr_gnt(cr_gnt[0]), .cr_rvalid(cr_rvalid[0]), .cr_rdata,
    .risc_start, .risc_bank, .risc_addr, .risc_we, .risc_wdata, .risc_rdata, .risc_done, .risc_stall,
    .fex_icount, .fmo_icount, .bank_full);

  ctrl_ram_if #(.NCLI(2), .NFLOWS(1024)) u_cr (.clk, .rst_n, .req(cr_req), .we(cr_we), .addr(cr_addr),
    .wdata(cr_wdata), .gnt(cr_gnt), .rvalid(cr_rvalid), .rdata(cr_rdata));

  risc_model #(.LAT(30), .STALL_EVERY(7), .STALL_LEN(25)) u_risc (.clk, .start(risc_start),
    .addr(risc_addr), .we(risc_we), .wdata(risc_wdata), .rdata(risc_rdata), .done(risc_done),
    .stall(risc_stall), .n_done, .n_stalls);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host port of the control RAM
  task automatic cr_write(input int f, input logic [63:0] v);
    @(negedge clk); cr_req[1] = 1; cr_we[1] = 1; cr_addr[1] = flow_t'(f); cr_wdata[1] = v;
    #1 while (!cr_gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk); cr_req[1] = 0; cr_we[1] = 0;
  endtask
  task automatic cr_read(input int f, output logic [63:0] v);
    @(negedge clk); cr_req[1] = 1; cr_we[1] = 0; cr_addr[1] = flow_t'(f);
    #1 while (!cr_gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk); cr_req[1] = 0;
    while (!cr_rvalid[1]) @(negedge clk);
    v = cr_rdata;
  endtask

  // expected headers, in order
  bq_t  exp_q [$];
  logic exp_acc [$];
  int   exp_flow [$];
  int   both_full = 0, got = 0;
  always @(posedge clk) if (bank_full == 2'b11) both_full++;

  // policy per flow: 0..3 translate, 4..5 pass unchanged, 6..7 blocked
  function automatic logic [63:0] policy(int f);
    if (f < 4) return {2'b01, 14'd0, 16'(4000 + f), 32'h0A00_0000 + 32'(f)};
    if (f < 6) return 64'd0;
    return {2'b10, 62'd0};
  endfunction

  // receiver
  initial begin
    forever begin
      bq_t r;
      r = {};
      @(posedge clk);
      while (!(m_valid && m_ready && m_beat.sop)) @(posedge clk);
      forever begin
        for (int k = 0; k < int'(m_beat.nbytes); k++) r.push_back(m_beat.data[63-8*k -: 8]);
        if (m_beat.eop) break;
        @(posedge clk);
        while (!(m_valid && m_ready)) @(posedge clk);
      end
      got++;
      check(exp_q.size() > 0, "header expected");
      if (exp_q.size() > 0) begin
        check(r == exp_q[0], $sformatf("header %0d content (flow %0d)", got, exp_flow[0]));
        check(m_accept == exp_acc[0], "verdict");
        check(int'(m_tag.flow) == exp_flow[0], "tag flow");
        void'(exp_q.pop_front()); void'(exp_acc.pop_front()); void'(exp_flow.pop_front());
      end
    end
  end

  int pkts_per_flow [8];

  initial begin
    logic [31:0] p [$];
    cr_req[1] = 0; cr_we[1] = 0; cr_addr[1] = '0; cr_wdata[1] = '0;
    for (int f = 0; f < 8; f++) pkts_per_flow[f] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rpm_fex_prog(p);
    foreach (p[i]) begin @(negedge clk); prog_we = 1; prog_sel = 0; prog_addr = 11'(i); prog_wdata = p[i]; end
    rpm_fmo_prog(p);
    foreach (p[i]) begin @(negedge clk); prog_we = 1; prog_sel = 1; prog_addr = 11'(i); prog_wdata = p[i]; end
    @(negedge clk); prog_we = 0;
    for (int f = 0; f < 8; f++) cr_write(f, policy(f));
    for (int n = 0; n < 60; n++) begin
      int f, ihl, plen, tot, nsent, nb;
      bq_t b, e;
      logic [31:0] src, dst;
      logic [15:0] sp, dp;
      logic [63:0] pol;
      f = n % 8; ihl = 5 + (n * 3) % 11; plen = (n * 37) % 150;
      src = $urandom; dst = $urandom; sp = 16'($urandom); dp = 16'($urandom);
      b = make_tcp(src, dst, sp, dp, 32'(n), 32'(n * 3), 6'h18, 16'h1000, ihl, plen, n);
      pol = policy(f);
      if (pol[62] && !pol[63]) e = make_tcp(pol[31:0], dst, pol[47:32], dp, 32'(n), 32'(n * 3), 6'h18, 16'h1000, ihl, plen, n);
      else e = b;
      tot = b.size();
      nsent = (tot > 64) ? ((tot > 128) ? 128 : tot) : tot;
      nb = (nsent + 7) / 8;
      e = e[0:nsent-1];
      exp_q.push_back(e); exp_acc.push_back(!pol[63]); exp_flow.push_back(f);
      pkts_per_flow[f]++;
      for (int w = 0; w < nb; w++) begin
        @(negedge clk);
        s_valid = 1;
        s_beat.sop = (w == 0); s_beat.eop = (w == nb - 1);
        s_beat.nbytes = s_beat.eop ? 4'(nsent - 8*w) : 4'd8;
        s_beat.data = '0;
        for (int k = 0; k < 8; k++) if (8*w + k < nsent) s_beat.data[63-8*k -: 8] = b[8*w+k];
        s_tag = '0; s_tag.flow = flow_t'(f); s_tag.len = 16'(tot); s_tag.seg = 16'(n);
        #1 while (!s_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk); s_valid = 0;
    end
    while (got < 60) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int f = 0; f < 8; f++) begin
      logic [63:0] v;
      cr_read(f, v);
      check(int'(v[61:48]) == pkts_per_flow[f], $sformatf("flow %0d packet count %0d expected %0d (%h)", f, v[61:48], pkts_per_flow[f], v));
    end
    check(both_full > 0, "both register-file halves full at once");
    check(n_stalls > 0, "RISC stalled the RPM");
    check(n_done == 60, "RISC ran once per packet");
    $display("both-halves-full cycles %0d, stalls %0d", both_full, n_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pro3_top: end-to-end test of the whole packet path at full size (default
// parameters: 512K flows, 65536 segments, 2048-instruction program stores),
// with the behavioural ternary CAM and two behavioural RISC cores running the
// firewall/address-translation routine.
//
// The testbench acts as the host: it loads the classifier, extractor and
// modifier programs, writes 24 exact-match CAM entries (flow IDs spread over
// the 19-bit range, one per scheduling queue 0..23), configures the queues
// (even queues: processing through an RPM, odd queues: forwarding; weights
// 1..3), and writes flow state: processed flows are blocked, passed unchanged
// or address-translated. After the 512K-cycle initialisation it sends 400
// TCP/IP packets in bursts: packets of the 24 flows, packets with a bad IP
// header checksum and packets that match no CAM entry. It also arms two
// timers and cancels one of them. Last, it measures the rate: 120
// back-to-back 40-byte packets of forwarded flows, with the output always
// ready, must pass in at most 26 cycles per packet (2.5 Gb/s of minimum-size
// packets is 7.5 Mpackets/s, 26.7 cycles per packet at 200 MHz).
//
// Checks: every packet that should leave does, once, in its flow's order,
// with exactly the bytes of the packet rebuilt here (translated address and
// port with valid checksums for translated flows); dropped and rejected
// packets never leave; receive CRC-32/CRC-10 and transmit CRC-32 of every
// frame match a bit-serial reference; all counters agree; every segment is
// free at the end; the flow states count the packets seen; the armed timer
// fires for its flow and the cancelled one does not.
//
// Mechanism coverage: each of the following must happen at least once or it
// counts as a failure: forward, processing in RPM 0, processing in RPM 1,
// address translation, RISC reject, CAM miss drop, bad-header drop, one- and
// two-segment headers, RISC stall, both register-file halves of an RPM full,
// a flow re-entered in the scheduler after serving one of its packets, a
// queue served twice in a row on its weight, input back-pressure, output
// back-pressure, timer event.
module tb_pro3_top;
  import pro3_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NFL = 24, NPKT = 400, NR = 120;
  localparam int NSEG_DEF = 65536;

  logic        init_done;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  beat_t       in_beat = '0, out_beat;
  logic        rx_crc_valid, tx_crc_valid;
  logic [31:0] rx_crc32, tx_crc32;
  logic [9:0]  rx_crc10;
  logic        cam_req_valid, cam_req_ready, cam_rsp_valid, cam_rsp_hit;
  logic [KEY_W-1:0] cam_key;
  flow_t       cam_rsp_flow;
  logic [1:0]  risc_start, risc_bank, risc_we, risc_done, risc_stall;
  logic [4:0]  risc_addr [2];
  logic [31:0] risc_wdata [2], risc_rdata [2];
  logic        prog_we = 0;
  logic [1:0]  prog_target = 0;
  logic [10:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic        cfg_we = 0;
  logic [4:0]  cfg_q = '0;
  logic [7:0]  cfg_weight = '0;
  logic [1:0]  cfg_dest = '0;
  logic        host_cr_req = 0, host_cr_we = 0, host_cr_gnt, host_cr_rvalid;
  flow_t       host_cr_addr = '0;
  logic [63:0] host_cr_wdata = '0, host_cr_rdata;
  logic        tm_set_valid = 0, tm_set_ready, tm_set_cancel = 0, tm_ev_valid, tm_ev_ready = 1;
  logic [9:0]  tm_set_id = '0, tm_ev_id;
  flow_t       tm_set_flow = '0, tm_ev_flow;
  logic [23:0] tm_set_timeout = '0, tm_now;
  logic [31:0] st_in, st_cls_drop, st_bad_hdr, st_miss, st_rejected, st_out;
  logic [31:0] st_to_rpm [2];
  logic [1:0]  rpm_bank_full [2];
  logic [16:0] free_cnt;

  pro3_top dut (.clk, .rst_n, .init_done, .in_valid, .in_ready, .in_beat, .out_valid, .out_ready,
    .out_beat, .rx_crc_valid, .rx_crc32, .rx_crc10, .tx_crc_valid, .tx_crc32,
    .cam_req_valid, .cam_req_ready, .cam_key, .cam_rsp_valid, .cam_rsp_hit, .cam_rsp_flow,
    .risc_start, .risc_bank, .risc_addr, .risc_we, .risc_wdata, .risc_rdata, .risc_done, .risc_stall,
    .prog_we, .prog_target, .prog_addr, .prog_wdata, .cfg_we, .cfg_q, .cfg_weight, .cfg_dest,
    .host_cr_req, .host_cr_we, .host_cr_addr, .host_cr_wdata, .host_cr_gnt, .host_cr_rvalid,
    .host_cr_rdata, .tm_set_valid, .tm_set_ready, .tm_set_id, .tm_set_flow, .tm_set_timeout,
    .tm_set_cancel, .tm_ev_valid, .tm_ev_ready, .tm_ev_id, .tm_ev_flow, .tm_now,
    .st_in, .st_cls_drop, .st_bad_hdr, .st_miss, .st_rejected, .st_out, .st_to_rpm,
    .rpm_bank_full, .free_cnt);

  logic             cam_wr_en = 0;
  int               cam_wr_idx = 0;
  logic [KEY_W-1:0] cam_wr_value = '0;
  flow_t            cam_wr_flow = '0;
  int               n_search;
  tcam_model #(.NENT(32), .LAT(6)) u_cam (.clk, .wr_en(cam_wr_en), .wr_idx(cam_wr_idx),
    .wr_value(cam_wr_value), .wr_mask('1), .wr_flow(cam_wr_flow),
    .req_valid(cam_req_valid), .req_ready(cam_req_ready), .key(cam_key),
    .rsp_valid(cam_rsp_valid), .rsp_hit(cam_rsp_hit), .rsp_flow(cam_rsp_flow), .n_search);

  int n_done [2], n_stalls [2];
  for (genvar r = 0; r < 2; r++) begin : g_risc
    risc_model #(.LAT(40 + 25 * r), .STALL_EVERY(6), .STALL_LEN(20)) u_risc (.clk,
      .start(risc_start[r]), .addr(risc_addr[r]), .we(risc_we[r]), .wdata(risc_wdata[r]),
      .rdata(risc_rdata[r]), .done(risc_done[r]), .stall(risc_stall[r]),
      .n_done(n_done[r]), .n_stalls(n_stalls[r]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- flows ----------------
  function automatic flow_t fid(int i);
    return flow_t'(32'h10000 * (i % 8) + 32'h400 * i + 32'(i));   // queue i
  endfunction
  function automatic bit processed(int i); return (i % 2) == 0; endfunction
  function automatic logic [63:0] policy(int i);
    if (!processed(i)) return 64'd0;
    if (i % 6 == 0) return {2'b10, 62'd0};                          // blocked
    if (i % 6 == 2) return 64'd0;                                   // pass
    return {2'b01, 14'd0, 16'(6000 + i), 32'hC633_6400 + 32'(i)};   // translate
  endfunction
  function automatic logic [31:0] fsrc(int i); return 32'h0A00_0100 + 32'(i); endfunction
  function automatic logic [31:0] fdst(int i); return 32'h5DB8_D800 + 32'(i * 3); endfunction
  function automatic logic [15:0] fsp(int i);  return 16'(33000 + i); endfunction
  function automatic logic [15:0] fdp(int i);  return 16'(i % 3 == 0 ? 80 : 443); endfunction

  // ---------------- host tasks ----------------
  task automatic load_prog(input int target, input logic [31:0] p [$]);
    foreach (p[i]) begin
      @(negedge clk); prog_we = 1; prog_target = 2'(target); prog_addr = 11'(i); prog_wdata = p[i];
    end
    @(negedge clk); prog_we = 0;
  endtask
  task automatic cr_write(input flow_t f, input logic [63:0] v);
    @(negedge clk); host_cr_req = 1; host_cr_we = 1; host_cr_addr = f; host_cr_wdata = v;
    #1 while (!host_cr_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_cr_req = 0; host_cr_we = 0;
  endtask
  task automatic cr_read(input flow_t f, output logic [63:0] v);
    @(negedge clk); host_cr_req = 1; host_cr_we = 0; host_cr_addr = f;
    #1 while (!host_cr_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_cr_req = 0;
    while (!host_cr_rvalid) @(negedge clk);
    v = host_cr_rdata;
  endtask
  task automatic tm_set(input int id, input flow_t f, input int timeout, input bit cancel);
    @(negedge clk); tm_set_valid = 1; tm_set_id = 10'(id); tm_set_flow = f;
    tm_set_timeout = 24'(timeout); tm_set_cancel = cancel;
    #1 while (!tm_set_ready) begin @(negedge clk); #1; end
    @(negedge clk); tm_set_valid = 0;
  endtask

  // ---------------- packets ----------------
  bq_t pkts [NPKT+NR];
  bq_t expo [NPKT+NR];
  int  pflow [NPKT+NR];           // flow index, or -1 for dropped packets
  int  exp_q [NFL][$];
  int  seen [NFL];
  int  n_exp_out = 0, n_bad = 0, n_miss = 0, n_rej = 0;

  // ---------------- mechanism counters ----------------
  int m_fwd = 0, m_rpm0 = 0, m_rpm1 = 0, m_nat = 0, m_rej = 0, m_miss = 0, m_bad = 0;
  int m_seg1 = 0, m_seg2 = 0, m_stall = 0, m_full = 0, m_reenq = 0, m_wrr = 0;
  int m_inbp = 0, m_outbp = 0, m_timer = 0;
  always @(posedge clk) if (rst_n) begin
    if (risc_stall != 0) m_stall++;
    if (rpm_bank_full[0] == 2'b11 || rpm_bank_full[1] == 2'b11) m_full++;
    if (dut.u_dmm.t_enq && dut.u_dmm.t_done_go) m_reenq++;
    if (dut.u_tsc.deq_fire && !dut.u_tsc.reload) m_wrr++;
    if (in_valid && !in_ready && init_done) m_inbp++;
    if (out_valid && !out_ready) m_outbp++;
  end

  // ---------------- receive CRC reference ----------------
  bq_t rx_q [$];
  int  rx_n = 0;
  always @(posedge clk) if (rst_n && rx_crc_valid) begin
    check(rx_q.size() > 0, "receive CRC without a frame");
    if (rx_q.size() > 0) begin
      check(rx_crc32 === crc_ref(rx_q[0], 32, 32'h04C1_1DB7, 32'hFFFF_FFFF, 32'hFFFF_FFFF),
            $sformatf("receive CRC-32 of frame %0d", rx_n));
      check(rx_crc10 === 10'(crc_ref(rx_q[0], 10, 32'h233, 0, 0)),
            $sformatf("receive CRC-10 of frame %0d", rx_n));
      void'(rx_q.pop_front());
      rx_n++;
    end
  end

  // ---------------- output checker ----------------
  bit rate_ph = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) out_ready <= rate_ph || (($urandom % 6) != 0);
  bq_t ob, tx_q [$];
  int  n_out = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_beat.sop) ob = {};
    for (int k = 0; k < int'(out_beat.nbytes); k++) ob.push_back(out_beat.data[63-8*k -: 8]);
    if (out_beat.eop) begin
      int th, n, i;
      n_out++;
      tx_q.push_back(ob);
      th = int'(ob[0][3:0]) * 4;
      n  = (ob.size() >= th + 8) ? int'({ob[th+4], ob[th+5], ob[th+6], ob[th+7]}) : -1;
      if (n < 0 || n >= NPKT + NR || pflow[n] < 0) begin
        check(0, $sformatf("unexpected output packet (seq %0d)", n));
      end else begin
        i = pflow[n];
        check(exp_q[i].size() > 0 && exp_q[i][0] == n,
              $sformatf("flow %0d order: got packet %0d", i, n));
        if (exp_q[i].size() > 0 && exp_q[i][0] == n) void'(exp_q[i].pop_front());
        check(ob == expo[n], $sformatf("packet %0d content (flow %0d, %0d bytes)", n, i, ob.size()));
        if (!processed(i)) m_fwd++;
        else begin
          if (ob.size() > 64) m_seg2++; else m_seg1++;
          if (policy(i) != 0) m_nat++;
        end
      end
    end
  end
  int tx_n = 0;
  always @(posedge clk) if (rst_n && tx_crc_valid) begin
    check(tx_q.size() > 0, "transmit CRC without a frame");
    if (tx_q.size() > 0) begin
      check(tx_crc32 === crc_ref(tx_q[0], 32, 32'h04C1_1DB7, 32'hFFFF_FFFF, 32'hFFFF_FFFF),
            $sformatf("transmit CRC-32 of frame %0d", tx_n));
      void'(tx_q.pop_front());
      tx_n++;
    end
  end

  // ---------------- timer events ----------------
  always @(posedge clk) if (rst_n && tm_ev_valid && tm_ev_ready) begin
    m_timer++;
    check(tm_ev_id == 10'd5 && tm_ev_flow == fid(3), $sformatf("timer event id %0d flow %h", tm_ev_id, tm_ev_flow));
  end

  // ---------------- main ----------------
  initial begin
    logic [31:0] p [$];
    logic [63:0] v;
    for (int i = 0; i < NFL; i++) seen[i] = 0;
    // build the traffic
    for (int n = 0; n < NPKT; n++) begin
      int i, ihl, plen;
      logic [63:0] pol;
      ihl  = 5 + int'($urandom % 4);
      plen = (n % 5 == 0) ? int'($urandom % 4) : int'($urandom % 220);
      i    = int'($urandom % NFL);
      if (n % 10 == 7) begin
        pkts[n] = make_tcp(fsrc(i), fdst(i), fsp(i), fdp(i), 32'(n), 32'h1, 6'h10, 16'h4000, ihl, plen, n);
        pkts[n][10] = pkts[n][10] ^ 8'h01;       // header checksum off by one bit
        pflow[n] = -1; n_bad++;
      end else if (n % 10 == 9) begin
        pkts[n] = make_tcp(fsrc(i), fdst(i) ^ 32'h0100_0000, fsp(i), fdp(i), 32'(n), 32'h1, 6'h10,
                           16'h4000, ihl, plen, n);
        pflow[n] = -1; n_miss++;
      end else begin
        pol = policy(i);
        pkts[n] = make_tcp(fsrc(i), fdst(i), fsp(i), fdp(i), 32'(n), 32'h1, 6'h18, 16'h4000, ihl, plen, n);
        expo[n] = pkts[n];
        if (pol[62]) expo[n] = make_tcp(pol[31:0], fdst(i), pol[47:32], fdp(i), 32'(n), 32'h1, 6'h18,
                                        16'h4000, ihl, plen, n);
        pflow[n] = i;
        if (processed(i)) seen[i]++;
        if (pol[63]) begin n_rej++; pflow[n] = -1; end
        else begin exp_q[i].push_back(n); n_exp_out++; end
      end
    end

    repeat (5) @(negedge clk);
    rst_n = 1;
    // host set-up while the DMM initialises
    cls_fex_prog(p); load_prog(0, p);
    rpm_fex_prog(p); load_prog(1, p);
    rpm_fmo_prog(p); load_prog(2, p);
    for (int i = 0; i < NFL; i++) begin
      @(negedge clk); cam_wr_en = 1; cam_wr_idx = i;
      cam_wr_value = {fsrc(i), fdst(i), fsp(i), fdp(i), 32'd6, 16'd0}; cam_wr_flow = fid(i);
    end
    @(negedge clk); cam_wr_en = 0;
    for (int q = 0; q < 32; q++) begin
      @(negedge clk); cfg_we = 1; cfg_q = 5'(q); cfg_weight = 8'(1 + q % 3);
      cfg_dest = (q % 2 == 0) ? 2'd1 : 2'd0;
    end
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < NFL; i++) cr_write(fid(i), policy(i));
    check(!init_done, "initialisation still running after set-up");
    while (!init_done) @(negedge clk);
    check(int'(free_cnt) == NSEG_DEF, $sformatf("free segments after init %0d", free_cnt));

    fork
      begin
        tm_set(5, fid(3), 4, 0);
        tm_set(6, fid(4), 6, 0);
        tm_set(6, fid(4), 0, 1);
      end
      for (int n = 0; n < NPKT; n++) begin
        int nb;
        nb = (pkts[n].size() + 7) / 8;
        if (n % 40 == 0) repeat (300) @(negedge clk);   // bursts
        rx_q.push_back(pkts[n]);
        for (int w = 0; w < nb; w++) begin
          @(negedge clk);
          in_valid = 1;
          in_beat.sop = (w == 0); in_beat.eop = (w == nb - 1);
          in_beat.nbytes = in_beat.eop ? 4'(pkts[n].size() - 8*w) : 4'd8;
          in_beat.data = '0;
          for (int k = 0; k < 8; k++) if (8*w + k < pkts[n].size()) in_beat.data[63-8*k -: 8] = pkts[n][8*w+k];
          #1 while (!in_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk); in_valid = 0;
      end
    join
    while (n_out < n_exp_out || int'(st_in) < NPKT) @(negedge clk);
    repeat (3000) @(negedge clk);

    check(n_out == n_exp_out, $sformatf("packets out %0d expected %0d", n_out, n_exp_out));
    for (int i = 0; i < NFL; i++) check(exp_q[i].size() == 0, $sformatf("flow %0d packets missing", i));
    check(int'(st_in) == NPKT, "input counter");
    check(int'(st_bad_hdr) == n_bad, $sformatf("bad-header counter %0d/%0d", st_bad_hdr, n_bad));
    check(int'(st_miss) == n_miss, $sformatf("miss counter %0d/%0d", st_miss, n_miss));
    check(int'(st_cls_drop) == n_bad + n_miss, "classifier drop counter");
    check(int'(st_rejected) == n_rej, $sformatf("reject counter %0d/%0d", st_rejected, n_rej));
    check(int'(st_out) == n_exp_out, "output counter");
    check(int'(free_cnt) == NSEG_DEF, $sformatf("free segments at the end %0d", free_cnt));
    check(rx_n == NPKT, "a receive CRC per frame");
    check(tx_n == n_out, "a transmit CRC per frame");
    check(n_search == NPKT - n_bad, "a CAM search per good header");
    check(int'(st_to_rpm[0]) == n_done[0] && int'(st_to_rpm[1]) == n_done[1], "RISC runs match RPM jobs");
    for (int i = 0; i < NFL; i++) if (processed(i)) begin
      cr_read(fid(i), v);
      check(int'(v[61:48]) == seen[i], $sformatf("flow %0d state counts %0d/%0d", i, v[61:48], seen[i]));
    end
    m_rpm0 = int'(st_to_rpm[0]); m_rpm1 = int'(st_to_rpm[1]);
    m_rej = int'(st_rejected); m_miss = int'(st_miss); m_bad = int'(st_bad_hdr);
    check(m_timer == 1, $sformatf("timer events %0d", m_timer));

    // rate: back-to-back 40-byte packets of forwarded flows, output always ready
    begin
      int n0, tb, ti0, ti1;
      rate_ph = 1;
      repeat (20) @(negedge clk);
      for (int n = NPKT; n < NPKT + NR; n++) begin
        int i;
        i = 2 * ((n - NPKT) % (NFL / 2)) + 1;
        pkts[n] = make_tcp(fsrc(i), fdst(i), fsp(i), fdp(i), 32'(n), 32'h1, 6'h10, 16'h4000, 5, 0, n);
        expo[n] = pkts[n]; pflow[n] = i; exp_q[i].push_back(n);
      end
      n0 = n_out; ti0 = cyc;
      for (int n = NPKT; n < NPKT + NR; n++) begin
        rx_q.push_back(pkts[n]);
        for (int w = 0; w < 5; w++) begin
          @(negedge clk);
          in_valid = 1;
          in_beat.sop = (w == 0); in_beat.eop = (w == 4);
          in_beat.nbytes = 4'd8;
          for (int k = 0; k < 8; k++) in_beat.data[63-8*k -: 8] = pkts[n][8*w+k];
          #1 while (!in_ready) begin @(negedge clk); #1; end
        end
      end
      @(negedge clk); in_valid = 0; ti1 = cyc;
      while (n_out < n0 + NR && cyc - ti0 < 20000) @(negedge clk);
      tb = cyc;
      $display("rate: %0d packets of 40 bytes in %0d cycles (input %0d cycles)", NR, tb - ti0, ti1 - ti0);
      // 2.5 Gb/s of 40-byte packets is 7.5 Mpackets/s, 26.7 cycles per packet at 200 MHz
      check(n_out == n0 + NR, "rate phase: every packet leaves");
      check(tb - ti0 <= NR * 26, $sformatf("rate: %0d cycles for %0d packets", tb - ti0, NR));
      repeat (200) @(negedge clk);
      for (int i = 0; i < NFL; i++) check(exp_q[i].size() == 0, $sformatf("rate phase: flow %0d packets missing", i));
      check(int'(free_cnt) == NSEG_DEF, "rate phase: free segments at the end");
    end
    $display("mechanisms: forward %0d rpm0 %0d rpm1 %0d nat %0d reject %0d miss %0d bad %0d",
             m_fwd, m_rpm0, m_rpm1, m_nat, m_rej, m_miss, m_bad);
    $display("            seg1 %0d seg2 %0d stall %0d bothfull %0d reenq %0d wrr %0d inbp %0d outbp %0d timer %0d",
             m_seg1, m_seg2, m_stall, m_full, m_reenq, m_wrr, m_inbp, m_outbp, m_timer);
    check(m_fwd > 0, "mechanism forward");
    check(m_rpm0 > 0, "mechanism processing in RPM 0");
    check(m_rpm1 > 0, "mechanism processing in RPM 1");
    check(m_nat > 0, "mechanism address translation");
    check(m_rej > 0, "mechanism RISC reject");
    check(m_miss > 0, "mechanism CAM miss drop");
    check(m_bad > 0, "mechanism bad-header drop");
    check(m_seg1 > 0, "mechanism one-segment header");
    check(m_seg2 > 0, "mechanism two-segment header");
    check(m_stall > 0, "mechanism RISC stall");
    check(m_full > 0, "mechanism both register-file halves full");
    check(m_reenq > 0, "mechanism flow re-entered in the scheduler");
    check(m_wrr > 0, "mechanism weighted service");
    check(m_inbp > 0, "mechanism input back-pressure");
    check(m_outbp > 0, "mechanism output back-pressure");
    check(m_timer > 0, "mechanism timer event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

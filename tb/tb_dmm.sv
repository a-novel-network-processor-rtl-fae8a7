// tb_dmm: data memory manager with 64 flows and 256 segments (16 KB), the
// weighted-round-robin scheduler, and testbench stand-ins for the classifier
// (verdicts in packet order, after random delays) and the two RPMs (each
// takes header segments with random readiness, changes one byte in the first
// segment and the last byte sent, and returns them after a random delay,
// rejecting the packets of some flows).
//
// 500 packets of 1..300 bytes are sent, each carrying its flow and sequence
// number in its first bytes, so that memory fills up and the input is held
// back. Flows with an odd queue number are forwarded, the others processed.
// Checks: every output packet equals the input packet (with the RPM's changes
// for processed packets) and comes in flow order; dropped and rejected
// packets never leave; 1 or 2 segments go to an RPM according to the length;
// both RPMs are used; the counters agree; at the end all segments are free.
module tb_dmm;
  import pro3_pkg::*;
  import tb_util_pkg::*;
  localparam int NF = 64, NS = 256, NPKT = 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        init_done, in_valid = 0, in_ready;
  beat_t       in_beat = '0;
  logic        cls_valid = 0, cls_ready, cls_drop = 0;
  flow_t       cls_flow = '0;
  logic        enq_valid, enq_ready, deq_valid, deq_ready;
  flow_t       enq_flow, deq_flow;
  logic [4:0]  deq_q;
  logic [1:0]  deq_dest;
  logic        cfg_we = 0;
  logic [4:0]  cfg_q = '0;
  logic [7:0]  cfg_weight = '0;
  logic [1:0]  cfg_dest = '0;
  logic [1:0]  rpm_valid, rpm_ready, ret_valid, ret_ready, ret_accept;
  beat_t       rpm_beat;
  rpm_tag_t    rpm_tag;
  beat_t       ret_beat [2];
  rpm_tag_t    ret_tag [2];
  logic        out_valid, out_ready = 0;
  beat_t       out_beat;
  logic [31:0] st_in, st_cls_drop, st_rejected, st_out;
  logic [31:0] st_to_rpm [2];
  logic [8:0]  free_cnt;

  dmm #(.NFLOWS(NF), .NSEG(NS), .NRPM(2)) dut (.clk, .rst_n, .init_done, .in_valid, .in_ready, .in_beat,
    .cls_valid, .cls_ready, .cls_drop, .cls_flow,
    .sq_enq_valid(enq_valid), .sq_enq_ready(enq_ready), .sq_enq_flow(enq_flow),
    .sq_deq_valid(deq_valid), .sq_deq_ready(deq_ready), .sq_deq_flow(deq_flow), .sq_deq_dest(deq_dest),
    .rpm_valid, .rpm_ready, .rpm_beat, .rpm_tag, .ret_valid, .ret_ready, .ret_beat, .ret_tag, .ret_accept,
    .out_valid, .out_ready, .out_beat, .st_in, .st_cls_drop, .st_rejected, .st_out, .st_to_rpm, .free_cnt);

  wrr_sched #(.NQ(32), .NFLOWS(NF)) u_tsc (.clk, .rst_n, .cfg_we, .cfg_q, .cfg_weight, .cfg_dest,
    .enq_valid, .enq_ready, .enq_flow, .deq_valid, .deq_ready, .deq_flow, .deq_q, .deq_dest);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit processed(int f); return (f % 2) == 0; endfunction
  function automatic bit rejected(int f);  return (f % 8) == 6; endfunction

  bq_t  pkts [NPKT];
  int   pflow [NPKT];
  bit   pdrop [NPKT];
  int   exp_q [NF][$];      // packet numbers expected per flow, in order
  int   n_out = 0, n_exp_out = 0, n_drop = 0, n_rej = 0, full_hold = 0;
  int   seg_err = 0, n_rpm [2], n_2seg = 0, n_1seg = 0;

  // ---- classifier stand-in: one verdict per packet, in order ----
  initial begin
    @(posedge init_done);
    for (int n = 0; n < NPKT; n++) begin
      repeat ($urandom % 40) @(negedge clk);
      @(negedge clk);
      cls_valid = 1; cls_drop = pdrop[n]; cls_flow = flow_t'(pflow[n]);
      #1 while (!cls_ready) begin @(negedge clk); #1; end
      @(negedge clk); cls_valid = 0;
    end
  end

  // ---- RPM stand-ins ----
  typedef struct { beat_t b [$]; rpm_tag_t tag; int due; } job_t;
  job_t rq [2][$];
  job_t cur_in [2];
  int   now = 0;
  always @(posedge clk) now++;
  for (genvar r = 0; r < 2; r++) begin : g_rpm
    always @(negedge clk) rpm_ready[r] <= ($urandom % 3) != 0;
    always @(posedge clk) if (rst_n && rpm_valid[r] && rpm_ready[r]) begin
      beat_t bb;
      bb = rpm_beat;
      if (bb.sop) cur_in[r].b = {};
      cur_in[r].b.push_back(bb);
      if (bb.eop) begin
        int nb, exp_nb;
        cur_in[r].tag = rpm_tag;
        cur_in[r].due = now + 5 + int'($urandom % 60);
        nb = cur_in[r].b.size();
        exp_nb = (int'(rpm_tag.len) > 64) ? ((int'(rpm_tag.len) > 128) ? 16 : (int'(rpm_tag.len) + 7) / 8)
                                           : (int'(rpm_tag.len) + 7) / 8;
        check(nb == exp_nb, $sformatf("beats to RPM %0d for length %0d", nb, rpm_tag.len));
        if (int'(rpm_tag.len) > 64) n_2seg++; else n_1seg++;
        n_rpm[r]++;
        rq[r].push_back(cur_in[r]);
      end
    end
    // return side
    initial begin
      ret_valid[r] = 0; ret_beat[r] = '0; ret_tag[r] = '0; ret_accept[r] = 0;
      forever begin
        job_t j;
        beat_t bt;
        int nbt;
        @(negedge clk);
        if (rq[r].size() > 0 && now >= rq[r][0].due) begin
          j = rq[r].pop_front();
          // change byte 8 (first segment) and the last byte sent, but
          // not the flow and sequence number in bytes 0..3
          nbt = j.b.size();
          for (int k = 0; k < nbt; k++) begin
            bt = j.b[k];
            if (k == 1) bt.data[63:56] = ~bt.data[63:56];
            if (k == nbt - 1 && 8*k + int'(bt.nbytes) > 4) bt.data[63 - 8*(int'(bt.nbytes) - 1) -: 8] = bt.data[63 - 8*(int'(bt.nbytes) - 1) -: 8] ^ 8'h5A;
            j.b[k] = bt;
          end
          for (int k = 0; k < j.b.size(); k++) begin
            ret_valid[r] = 1; ret_beat[r] = j.b[k]; ret_tag[r] = j.tag;
            ret_accept[r] = !rejected(int'(j.tag.flow));
            #1 while (!ret_ready[r]) begin @(negedge clk); #1; end
            @(negedge clk);
          end
          ret_valid[r] = 0;
        end
      end
    end
  end

  // ---- output checker ----
  always @(negedge clk) out_ready <= ($urandom % 5) != 0;
  bq_t ob;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_beat.sop) ob = {};
    for (int k = 0; k < int'(out_beat.nbytes); k++) ob.push_back(out_beat.data[63-8*k -: 8]);
    if (out_beat.eop) begin
      int f, n;
      bq_t e;
      n_out++;
      f = int'({ob[0], ob[1]}); n = int'({ob[2], ob[3]});
      if (f >= NF || exp_q[f].size() == 0) begin
        check(0, $sformatf("unexpected packet flow %0d seq %0d", f, n));
      end else begin
        check(exp_q[f][0] == n, $sformatf("flow %0d order: got %0d expected %0d", f, n, exp_q[f][0]));
        void'(exp_q[f].pop_front());
        e = pkts[n];
        if (processed(f)) begin
          int last;
          last = (e.size() > 128) ? 127 : e.size() - 1;
          if (e.size() > 8) e[8] = ~e[8];
          if (last >= 4) e[last] ^= 8'h5A;
        end
        check(ob == e, $sformatf("packet %0d (flow %0d, %0d bytes) content", n, f, e.size()));
        if (ob != e && failures < 3) begin
          for (int i = 0; i < e.size() && i < ob.size(); i++)
            if (ob[i] != e[i]) $display("  byte %0d got %h expected %h", i, ob[i], e[i]);
          $display("  sizes %0d %0d", ob.size(), e.size());
        end
      end
    end
  end

  always @(posedge clk) if (in_valid && !in_ready && init_done) full_hold++;

  initial begin
    int free0;
    n_rpm[0] = 0; n_rpm[1] = 0;
    for (int n = 0; n < NPKT; n++) begin
      int len, f;
      f = int'($urandom % NF);
      len = (n % 10 == 0) ? 1 + int'($urandom % 8) : 20 + int'($urandom % 281);
      if (len < 4) len = 4;
      pkts[n] = {};
      for (int i = 0; i < len; i++) pkts[n].push_back(8'($urandom));
      {pkts[n][0], pkts[n][1]} = 16'(f);
      {pkts[n][2], pkts[n][3]} = 16'(n);
      pflow[n] = f;
      pdrop[n] = ($urandom % 7) == 3;
      if (pdrop[n]) n_drop++;
      else if (processed(f) && rejected(f)) n_rej++;
      else begin exp_q[f].push_back(n); n_exp_out++; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int q = 0; q < 32; q++) begin
      @(negedge clk); cfg_we = 1; cfg_q = 5'(q); cfg_weight = 8'(1 + q % 3); cfg_dest = (q % 2 == 0) ? 2'd1 : 2'd0;
    end
    @(negedge clk); cfg_we = 0;
    while (!init_done) @(negedge clk);
    free0 = int'(free_cnt);
    check(free0 == NS, $sformatf("all segments free after init (%0d)", free0));
    for (int n = 0; n < NPKT; n++) begin
      int nb;
      nb = (pkts[n].size() + 7) / 8;
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
    while (n_out < n_exp_out) @(negedge clk);
    repeat (200) @(negedge clk);
    check(n_out == n_exp_out, $sformatf("packets out %0d expected %0d", n_out, n_exp_out));
    for (int f = 0; f < NF; f++) check(exp_q[f].size() == 0, $sformatf("flow %0d packets missing", f));
    check(int'(free_cnt) == NS, $sformatf("all segments free at the end (%0d)", free_cnt));
    check(int'(st_in) == NPKT, "input counter");
    check(int'(st_cls_drop) == n_drop, $sformatf("drop counter %0d/%0d", st_cls_drop, n_drop));
    check(int'(st_rejected) == n_rej, $sformatf("reject counter %0d/%0d", st_rejected, n_rej));
    check(int'(st_out) == n_exp_out, "output counter");
    check(int'(st_to_rpm[0]) == n_rpm[0] && int'(st_to_rpm[1]) == n_rpm[1], "RPM counters");
    check(n_rpm[0] > 0 && n_rpm[1] > 0, "both RPMs used");
    check(n_1seg > 0 && n_2seg > 0, "one- and two-segment headers");
    check(full_hold > 0, "input held back while memory full");
    $display("out %0d drop %0d rej %0d rpm %0d/%0d 1seg %0d 2seg %0d hold %0d",
             n_out, n_drop, n_rej, n_rpm[0], n_rpm[1], n_1seg, n_2seg, full_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

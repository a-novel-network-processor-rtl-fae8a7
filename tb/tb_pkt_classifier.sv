// tb_pkt_classifier: packet classifier with the behavioural ternary CAM.
//
// The CAM holds exact 5-tuple entries for 8 flows and, at a lower priority, a
// wildcard entry that matches every TCP packet to the 10.1.0.0/16 network.
// 300 packets are sent: packets of the 8 flows, packets matching only the
// wildcard, packets matching nothing, and packets with a bad header (wrong
// checksum, IP version 6, header length 16 bytes, total length larger than the
// bytes received; each with an otherwise correct checksum so that only one
// check fails). Every search key must equal the 144-bit key built here from
// the packet; each result must say drop for bad headers (with no CAM search)
// and misses, and give the entry's flow ID for hits. Results are taken with
// random back-pressure. The drop counters must match. Finally 40 minimum-size
// packets sent back to back must average at most 26 cycles each, the rate of
// a 2.5 Gb/s link of 40-byte packets at 200 MHz.
module tb_pkt_classifier;
  import pro3_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        prog_we = 0;
  logic [10:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic        in_valid = 0, in_ready;
  beat_t       in_beat = '0;
  logic        cam_req_valid, cam_req_ready, cam_rsp_valid, cam_rsp_hit;
  logic [KEY_W-1:0] cam_key;
  flow_t       cam_rsp_flow;
  logic        res_valid, res_ready = 0, res_drop;
  flow_t       res_flow;
  logic [31:0] st_bad_hdr, st_miss;
  logic        wr_en = 0;
  int          wr_idx = 0;
  logic [KEY_W-1:0] wr_value = '0, wr_mask = '0;
  flow_t       wr_flow = '0;
  int          n_search;

  pkt_classifier #(.DEPTH(2048)) dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_wdata,
    .in_valid, .in_ready, .in_beat, .cam_req_valid, .cam_req_ready, .cam_key,
    .cam_rsp_valid, .cam_rsp_hit, .cam_rsp_flow, .res_valid, .res_ready, .res_drop, .res_flow,
    .st_bad_hdr, .st_miss);

  tcam_model #(.NENT(16), .LAT(5)) u_cam (.clk, .wr_en, .wr_idx, .wr_value, .wr_mask, .wr_flow,
    .req_valid(cam_req_valid), .req_ready(cam_req_ready), .key(cam_key),
    .rsp_valid(cam_rsp_valid), .rsp_hit(cam_rsp_hit), .rsp_flow(cam_rsp_flow), .n_search);

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

  function automatic logic [KEY_W-1:0] key_of(logic [31:0] s, logic [31:0] d, logic [15:0] sp,
                                               logic [15:0] dp);
    return {s, d, sp, dp, 32'd6, 16'd0};
  endfunction

  // recompute the IP header checksum after editing the header
  function automatic void fix_ipck(ref bq_t b);
    int hl;
    hl = int'(b[0][3:0]) * 4;
    if (hl < 20) hl = 20;
    b[10] = 0; b[11] = 0;
    {b[10], b[11]} = ~ones_sum(b, 0, hl, 0);
  endfunction

  logic [KEY_W-1:0] key_q [$];
  logic             drop_q [$];
  flow_t            flow_q [$];
  int nres = 0, nbad = 0, nmiss = 0, nsearch_exp = 0, bp = 0;

  always @(posedge clk) if (cam_req_valid && cam_req_ready) begin
    check(key_q.size() > 0 && cam_key === key_q[0], $sformatf("search key %h", cam_key));
    if (key_q.size() > 0) void'(key_q.pop_front());
  end
  bit fast = 0;
  always @(negedge clk) res_ready <= fast || (($urandom % 4) != 0);
  always @(posedge clk) if (res_valid && !res_ready) bp++;
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    nres++;
    check(drop_q.size() > 0, "result expected");
    if (drop_q.size() > 0) begin
      check(res_drop === drop_q[0], $sformatf("result %0d drop %0b", nres, res_drop));
      if (!drop_q[0]) check(res_flow === flow_q[0], $sformatf("result %0d flow %0d", nres, res_flow));
      void'(drop_q.pop_front()); void'(flow_q.pop_front());
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // back-to-back sending: valid stays high from packet to packet
  task automatic send_fast(bq_t b, int nbytes);
    int nb;
    nb = (nbytes + 7) / 8;
    for (int w = 0; w < nb; w++) begin
      if (w == 0 && !in_valid) @(negedge clk);
      in_valid = 1;
      in_beat.sop = (w == 0); in_beat.eop = (w == nb - 1);
      in_beat.nbytes = in_beat.eop ? 4'(nbytes - 8*w) : 4'd8;
      in_beat.data = '0;
      for (int k = 0; k < 8; k++) if (8*w + k < nbytes) in_beat.data[63-8*k -: 8] = b[8*w+k];
      #1 while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
  endtask

  task automatic send(bq_t b, int nbytes);
    int nb;
    nb = (nbytes + 7) / 8;
    for (int w = 0; w < nb; w++) begin
      @(negedge clk);
      in_valid = 1;
      in_beat.sop = (w == 0); in_beat.eop = (w == nb - 1);
      in_beat.nbytes = in_beat.eop ? 4'(nbytes - 8*w) : 4'd8;
      in_beat.data = '0;
      for (int k = 0; k < 8; k++) if (8*w + k < nbytes) in_beat.data[63-8*k -: 8] = b[8*w+k];
      #1 while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk); in_valid = 0;
  endtask

  logic [31:0] fsrc [8], fdst [8];
  logic [15:0] fsp [8], fdp [8];

  initial begin
    logic [31:0] p [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    cls_fex_prog(p);
    foreach (p[i]) begin @(negedge clk); prog_we = 1; prog_addr = 11'(i); prog_wdata = p[i]; end
    @(negedge clk); prog_we = 0;
    for (int f = 0; f < 8; f++) begin
      fsrc[f] = 32'hAC10_0000 + 32'(f * 17); fdst[f] = 32'h0A02_0000 + 32'(f);
      fsp[f] = 16'(1024 + f); fdp[f] = 16'(80 + f);
      @(negedge clk); wr_en = 1; wr_idx = f;
      wr_value = key_of(fsrc[f], fdst[f], fsp[f], fdp[f]); wr_mask = '1;
      wr_flow = flow_t'(1000 + f * 4099);
    end
    @(negedge clk); wr_en = 1; wr_idx = 12;
    wr_value = key_of(0, 32'h0A01_0000, 0, 0);
    wr_mask = {32'd0, 32'hFFFF_0000, 32'd0, 32'hFFFF_FFFF, 16'hFFFF};
    wr_flow = flow_t'(19'h7FFFF);
    @(negedge clk); wr_en = 0;

    for (int n = 0; n < 300; n++) begin
      int kind, f, ihl, plen, nbytes;
      logic [31:0] s, d;
      logic [15:0] sp, dp;
      bq_t b;
      kind = n % 6; f = n % 8;
      ihl = 5 + (n % 4) * 3; plen = (n * 29) % 200;
      s = $urandom; d = 32'h0B00_0000 | 32'($urandom % 65536); sp = 16'($urandom); dp = 16'($urandom);
      if (kind == 0 || kind == 1) begin s = fsrc[f]; d = fdst[f]; sp = fsp[f]; dp = fdp[f]; end
      if (kind == 2) d = 32'h0A01_0000 | 32'($urandom % 65536);
      b = make_tcp(s, d, sp, dp, 32'(n), 0, 6'h10, 16'h2000, ihl, plen, n);
      nbytes = b.size();
      if (kind == 4) begin
        case ((n / 6) % 4)
          0: b[10] = b[10] ^ 8'h40;                                 // wrong checksum
          1: begin b[0] = {4'd6, b[0][3:0]}; fix_ipck(b); end        // version
          2: begin b[0] = {4'd4, 4'd4}; fix_ipck(b); end             // header too short
          default: begin {b[2], b[3]} = 16'(nbytes + 1); fix_ipck(b); end  // length
        endcase
        drop_q.push_back(1); flow_q.push_back('0); nbad++;
      end else begin
        key_q.push_back(key_of(s, d, sp, dp)); nsearch_exp++;
        if (kind == 0 || kind == 1) begin drop_q.push_back(0); flow_q.push_back(flow_t'(1000 + f * 4099)); end
        else if (kind == 2) begin drop_q.push_back(0); flow_q.push_back(flow_t'(19'h7FFFF)); end
        else begin drop_q.push_back(1); flow_q.push_back('0); nmiss++; end
      end
      send(b, nbytes);
    end
    while (nres < 300) @(negedge clk);
    repeat (10) @(negedge clk);
    // rate: 40 minimum-size packets (20-byte IP header, no payload) back to
    // back with no result back-pressure must average at most 26 cycles each,
    // i.e. 7.5 Mpackets/s at 200 MHz
    fast = 1;
    begin
      int t0, t1;
      t0 = -1;
      for (int n = 0; n < 40; n++) begin
        bq_t b;
        b = make_tcp(fsrc[n % 8], fdst[n % 8], fsp[n % 8], fdp[n % 8], 32'(n), 0, 6'h10, 16'h2000, 5, 0, n);
        key_q.push_back(key_of(fsrc[n % 8], fdst[n % 8], fsp[n % 8], fdp[n % 8])); nsearch_exp++;
        drop_q.push_back(0); flow_q.push_back(flow_t'(1000 + (n % 8) * 4099));
        if (t0 < 0) t0 = cyc;
        send_fast(b, b.size());
      end
      in_valid = 0;
      while (nres < 340) @(negedge clk);
      t1 = cyc;
      check(t1 - t0 <= 40 * 26, $sformatf("40 minimum-size packets took %0d cycles", t1 - t0));
      $display("minimum-size packets: %0d cycles for 40", t1 - t0);
    end
    check(int'(st_bad_hdr) == nbad, $sformatf("bad-header count %0d/%0d", st_bad_hdr, nbad));
    check(int'(st_miss) == nmiss, $sformatf("miss count %0d/%0d", st_miss, nmiss));
    check(n_search == nsearch_exp, $sformatf("CAM searches %0d/%0d", n_search, nsearch_exp));
    check(bp > 0, "result back-pressure");
    $display("bad %0d miss %0d searches %0d", nbad, nmiss, n_search);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fex: loads the stateful-inspection extractor program (14 instructions)
// into the field extractor and sends it TCP/IP packets with IP header lengths
// of 20..60 bytes and payloads of 0..100 bytes, as the first one or two
// 64-byte segments (as the data memory manager does). Checks every extracted
// field against the values the packet was built from, the tag and byte
// count, the instruction count, and the processing time: two cycles per
// instruction after the last beat. One packet is run with the stall input
// raised for a while; its result must not change and must come that many
// cycles later.
module tb_fex;
  import pro3_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        stall = 0, prog_we = 0;
  logic [10:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic        s_valid = 0, f_ready = 0;
  beat_t       s_beat = '0;
  logic [63:0] s_tag = '0;
  logic        s_ready, f_valid;
  field_t      f_fields [NFIELDS];
  logic [63:0] f_tag;
  logic [15:0] f_len, f_icount;

  fex #(.DEPTH(2048), .TAG_W(64)) dut (.clk, .rst_n, .stall, .prog_we, .prog_addr, .prog_wdata,
    .s_valid, .s_ready, .s_beat, .s_tag, .f_valid, .f_ready, .f_fields, .f_tag, .f_len, .f_icount);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ihl, input int plen, input int stall_cycles);
    bq_t b;
    int  n, nb, nsent, t1;
    logic [31:0] src, dst, sqn, ack;
    logic [15:0] sp, dp, win;
    logic [5:0]  fl;
    src = $urandom; dst = $urandom; sqn = $urandom; ack = $urandom;
    sp = 16'($urandom); dp = 16'($urandom); win = 16'($urandom); fl = 6'($urandom);
    b = make_tcp(src, dst, sp, dp, sqn, ack, fl, win, ihl, plen, ihl + plen);
    n = b.size();
    nsent = (n > 64) ? ((n > 128) ? 128 : n) : n;
    nb = (nsent + 7) / 8;
    for (int w = 0; w < nb; w++) begin
      @(negedge clk);
      s_valid = 1;
      s_beat.sop = (w == 0); s_beat.eop = (w == nb - 1);
      s_beat.nbytes = s_beat.eop ? 4'(nsent - 8*w) : 4'd8;
      s_beat.data = '0;
      for (int k = 0; k < 8; k++) if (8*w + k < nsent) s_beat.data[63-8*k -: 8] = b[8*w+k];
      s_tag = {32'(ihl), 32'(plen)};
      #1;
      while (!s_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    s_valid = 0;
    // cycles from the last beat to the result: 2 per instruction, plus the stall
    t1 = 0;
    if (stall_cycles > 0) begin
      @(negedge clk); t1++;
      stall = 1;
      repeat (stall_cycles) begin @(negedge clk); t1++; end
      stall = 0;
    end
    while (!f_valid) begin @(negedge clk); t1++; end
    check(t1 == 2*14 + stall_cycles, $sformatf("latency ihl %0d plen %0d: %0d", ihl, plen, t1));
    check(f_icount == 16'd14, "14 instructions");
    check(f_tag == {32'(ihl), 32'(plen)}, "tag");
    check(f_len == 16'(nsent), "byte count");
    check(f_fields[F_IP_HLEN] == 32'(ihl), "ip_hlen");
    check(f_fields[F_IP_LEN] == 32'(n), "ip_len");
    check(f_fields[F_SRC] == src && f_fields[F_DST] == dst, "addresses");
    check(f_fields[F_SPORT] == 32'(sp) && f_fields[F_DPORT] == 32'(dp), "ports");
    check(f_fields[F_SQN] == sqn, "th_sqn");
    check(f_fields[F_ACK] == ack, "th_ack");
    check(f_fields[F_OFF] == 32'd5, "th_off");
    check(f_fields[F_FLAGS] == 32'(fl), "th_flags");
    check(f_fields[F_WIN] == 32'(win), "th_win");
    check(f_fields[F_CKSUM] == {16'd0, b[ihl*4+16], b[ihl*4+17]}, "th_cksum");
    f_ready = 1; @(negedge clk); f_ready = 0;
    check(!f_valid && s_ready, "ready for the next packet");
  endtask

  int plens [5] = '{0, 4, 24, 44, 100};

  initial begin
    logic [31:0] p [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    rpm_fex_prog(p);
    foreach (p[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 11'(i); prog_wdata = p[i];
    end
    @(negedge clk); prog_we = 0;
    for (int ihl = 5; ihl <= 15; ihl++)
      for (int j = 0; j < 5; j++) run(ihl, plens[j], 0);
    run(7, 30, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

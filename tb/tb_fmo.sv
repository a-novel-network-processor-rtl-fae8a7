// tb_fmo: loads the address-translation modifier program (7 instructions:
// replace source address, source port and TCP checksum, recompute the IP
// header checksum) into the field modifier. For TCP/IP packets with IP header
// lengths of 20..60 bytes and several payload sizes it supplies the new field
// values (TCP checksum updated incrementally, as the RISC would) and the
// packet's first one or two segments, and compares the segments that come
// out with the same packet built from scratch with the new address and port
// (all checksums recomputed). Also checks sop/eop/nbytes, tag, verdict,
// instruction count and that output starts 2 cycles per instruction plus 2
// after the record is in.
module tb_fmo;
  import pro3_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        stall = 0, prog_we = 0;
  logic [10:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic        n_valid = 0, n_accept = 0, d_valid = 0, m_ready = 0;
  field_t      n_fields [NFIELDS];
  logic [63:0] n_tag = '0;
  beat_t       d_beat = '0;
  logic        n_ready, d_ready, m_valid, m_accept;
  beat_t       m_beat;
  logic [63:0] m_tag;
  logic [15:0] m_icount;

  fmo #(.DEPTH(2048), .TAG_W(64)) dut (.clk, .rst_n, .stall, .prog_we, .prog_addr, .prog_wdata,
    .n_valid, .n_ready, .n_fields, .n_accept, .n_tag, .d_valid, .d_ready, .d_beat,
    .m_valid, .m_ready, .m_beat, .m_accept, .m_tag, .m_icount);

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

  int plens [4] = '{0, 20, 44, 120};

  task automatic run(input int ihl, input int plen, input logic acc);
    bq_t b, e;
    int  n, nsent, nb, t;
    logic [31:0] src, dst, nsrc;
    logic [15:0] sp, dp, nsp, ck;
    src = $urandom; dst = $urandom; nsrc = $urandom;
    sp = 16'($urandom); dp = 16'($urandom); nsp = 16'($urandom);
    b = make_tcp(src, dst, sp, dp, 32'h1111, 32'h2222, 6'h10, 16'h4000, ihl, plen, plen);
    e = make_tcp(nsrc, dst, nsp, dp, 32'h1111, 32'h2222, 6'h10, 16'h4000, ihl, plen, plen);
    n = b.size();
    nsent = (n > 128) ? 128 : n;
    nb = (nsent + 7) / 8;
    ck = {b[ihl*4+16], b[ihl*4+17]};
    ck = ck_update(ck, src[31:16], nsrc[31:16]);
    ck = ck_update(ck, src[15:0], nsrc[15:0]);
    ck = ck_update(ck, sp, nsp);
    for (int i = 0; i < NFIELDS; i++) n_fields[i] = '0;
    n_fields[F_IP_HLEN] = 32'(ihl);
    n_fields[F_SRC] = nsrc;
    n_fields[F_SPORT] = {16'd0, nsp};
    n_fields[F_CKSUM] = {16'd0, ck};
    n_tag = {32'(ihl), 32'(plen)};
    n_accept = acc;
    // segments first, then the record
    for (int w = 0; w < nb; w++) begin
      @(negedge clk);
      d_valid = 1;
      d_beat.sop = (w == 0); d_beat.eop = (w == nb - 1);
      d_beat.nbytes = d_beat.eop ? 4'(nsent - 8*w) : 4'd8;
      d_beat.data = '0;
      for (int k = 0; k < 8; k++) if (8*w + k < nsent) d_beat.data[63-8*k -: 8] = b[8*w+k];
      #1;
      check(d_ready, "segment beat taken");
    end
    @(negedge clk); d_valid = 0;
    n_valid = 1;
    #1 check(n_ready, "record taken");
    @(negedge clk); n_valid = 0;
    t = 1;
    while (!m_valid) begin @(negedge clk); t++; end
    check(t == 2*7 + 2, $sformatf("output after %0d cycles", t));
    check(m_icount == 16'd7, "7 instructions");
    m_ready = 1;
    for (int w = 0; w < nb; w++) begin
      #1;
      check(m_valid, "beat valid");
      check(m_beat.sop == (w == 0) && m_beat.eop == (w == nb - 1), "sop/eop");
      check(m_beat.nbytes == (m_beat.eop ? 4'(nsent - 8*w) : 4'd8), "nbytes");
      for (int k = 0; k < 8; k++)
        if (8*w + k < nsent)
          check(m_beat.data[63-8*k -: 8] == e[8*w+k],
                $sformatf("ihl %0d plen %0d byte %0d got %h exp %h", ihl, plen, 8*w+k,
                          m_beat.data[63-8*k -: 8], e[8*w+k]));
      check(m_tag == {32'(ihl), 32'(plen)} && m_accept == acc, "tag and verdict");
      @(negedge clk);
    end
    m_ready = 0;
    #1 check(!m_valid, "packet ends");
  endtask

  initial begin
    logic [31:0] p [$];
    for (int i = 0; i < NFIELDS; i++) n_fields[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rpm_fmo_prog(p);
    foreach (p[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 11'(i); prog_wdata = p[i];
    end
    @(negedge clk); prog_we = 0;
    for (int ihl = 5; ihl <= 15; ihl += 2)
      for (int j = 0; j < 4; j++) run(ihl, plens[j], 1'(j % 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

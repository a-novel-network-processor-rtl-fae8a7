// tb_crc_unit: checks the CRC unit in its two configurations, the 32-bit
// CRC of ATM AAL5 and the 10-bit CRC of ATM OAM cells. Frames of 1..100 bytes
// (every tail length) are fed 8 bytes per beat; each result is compared with a
// bit-serial reference and must appear exactly one cycle after the last beat.
// The standard check string "123456789" must give 0xFC891918 and 0x199.
module tb_crc_unit;
  import pro3_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  valid = 0;
  beat_t beat  = '0;
  logic        v32, v10;
  logic [31:0] c32;
  logic [9:0]  c10;

  crc_unit #(.WIDTH(32), .POLY(32'h04C1_1DB7), .INIT('1), .XOROUT('1)) dut32 (
    .clk, .rst_n, .valid, .beat, .crc_valid(v32), .crc(c32));
  crc_unit #(.WIDTH(10), .POLY(10'h233), .INIT('0), .XOROUT('0)) dut10 (
    .clk, .rst_n, .valid, .beat, .crc_valid(v10), .crc(c10));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input bq_t b, input logic [31:0] e32, input logic [9:0] e10);
    int n = b.size();
    for (int i = 0; i < n; i += 8) begin
      @(negedge clk);
      valid = 1;
      beat.sop = (i == 0);
      beat.eop = (i + 8 >= n);
      beat.nbytes = beat.eop ? 4'(n - i) : 4'd8;
      beat.data = '0;
      for (int k = 0; k < 8; k++) if (i + k < n) beat.data[63-8*k -: 8] = b[i+k];
    end
    @(negedge clk);
    valid = 0;
    check(v32 && v10, "result valid one cycle after eop");
    check(c32 == e32, $sformatf("crc32 len %0d got %h exp %h", n, c32, e32));
    check(c10 == e10, $sformatf("crc10 len %0d got %h exp %h", n, c10, e10));
    @(negedge clk);
    check(!v32 && !v10, "result valid for one cycle only");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    b = {};
    for (int i = 0; i < 9; i++) b.push_back(8'h31 + 8'(i));
    send(b, 32'hFC89_1918, 10'h199);
    for (int len = 1; len <= 100; len++) begin
      b = {};
      for (int i = 0; i < len; i++) b.push_back(8'($urandom));
      send(b, crc_ref(b, 32, 32'h04C1_1DB7, 32'hFFFF_FFFF, 32'hFFFF_FFFF),
               10'(crc_ref(b, 10, 32'h233, 0, 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

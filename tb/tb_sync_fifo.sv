// tb_sync_fifo: random pushes and pops on the FIFO (depth 8), with a queue as
// the reference. Checks order and data, the full/empty flags, the count, and
// that an entry can leave the cycle after it entered.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0, out_ready = 0;
  logic [15:0] in_data = '0;
  logic        in_ready, out_valid;
  logic [15:0] out_data;
  logic [3:0]  count;
  logic [15:0] model [$];

  sync_fifo #(.W(16), .DEPTH(8)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                      .out_valid, .out_ready, .out_data, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency: write one entry, it is visible the next cycle
    @(negedge clk); in_valid = 1; in_data = 16'hA5A5;
    @(negedge clk); in_valid = 0;
    check(out_valid && out_data == 16'hA5A5, "entry visible one cycle after write");
    out_ready = 1; @(negedge clk); out_ready = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // phase with bias to fill, then to drain
      int bias = ((cyc / 200) % 2) ? 80 : 30;
      in_valid  = ($urandom % 100) < 100 - bias;
      out_ready = ($urandom % 100) < bias;
      in_data   = 16'($urandom);
      #1;
      check(in_ready == (model.size() < 8), "in_ready = not full");
      check(out_valid == (model.size() > 0), "out_valid = not empty");
      check(32'(count) == model.size(), "count");
      if (out_valid && model.size() > 0) check(out_data == model[0], "data in order");
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

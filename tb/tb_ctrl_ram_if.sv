// tb_ctrl_ram_if: three clients issue random reads and writes to a small
// control RAM (1024 flows). Checks that grants are one-hot and go round robin
// when all clients ask, that a read returns its data exactly two cycles after
// its grant to the client that asked, and that the data is the last value
// written (reference array in the testbench).
module tb_ctrl_ram_if;
  import pro3_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]         req = '0, we = '0;
  flow_t              addr  [3];
  logic [STATE_W-1:0] wdata [3];
  logic [2:0]         gnt, rvalid;
  logic [STATE_W-1:0] rdata;
  logic [STATE_W-1:0] model [1024];
  logic [STATE_W-1:0] exp_q [$];
  int                 exp_c [$];
  int                 exp_t [$];
  int                 cyc = 0;

  ctrl_ram_if #(.NCLI(3), .NFLOWS(1024)) dut (.clk, .rst_n, .req, .we, .addr, .wdata,
                                              .gnt, .rvalid, .rdata);

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

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int c = 0; c < 3; c++) begin addr[c] = '0; wdata[c] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill every location used
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); req = 3'b001; we = 3'b001; addr[0] = flow_t'(a);
      wdata[0] = {32'(a), 32'hC0DE0000 + 32'(a)}; model[a] = wdata[0];
    end
    @(negedge clk); req = '0; we = '0;
    // round robin with all three asking reads
    begin
      int order [$];
      for (int c = 0; c < 3; c++) addr[c] = flow_t'(c);
      req = 3'b111; we = 3'b000;
      for (int k = 0; k < 6; k++) begin
        #1;
        check($onehot(gnt), "one grant");
        for (int c = 0; c < 3; c++) if (gnt[c]) order.push_back(c);
        @(negedge clk);
      end
      req = '0;
      for (int k = 3; k < 6; k++) check(order[k] == order[k-3], "round robin order repeats");
      check(order[0] != order[1] && order[1] != order[2] && order[0] != order[2], "all three served in turn");
      repeat (4) @(negedge clk);
    end
    // random traffic
    for (int k = 0; k < 2000; k++) begin
      for (int c = 0; c < 3; c++) begin
        if (!req[c] || gnt[c]) begin
          req[c]   = ($urandom % 3) != 0;
          we[c]    = ($urandom % 2);
          addr[c]  = flow_t'($urandom % 64);
          wdata[c] = {$urandom, $urandom};
        end
      end
      #1;
      check($onehot0(gnt), "at most one grant");
      for (int c = 0; c < 3; c++) if (gnt[c]) begin
        if (we[c]) model[addr[c]] = wdata[c];
        else begin exp_q.push_back(model[addr[c]]); exp_c.push_back(c); exp_t.push_back(cyc + 2); end
      end
      @(posedge clk);
      #1;
      if (rvalid != 0) begin
        check(exp_q.size() > 0, "read data expected");
        if (exp_q.size() > 0) begin
          check(rvalid == (3'b1 << exp_c[0]), "rvalid to the client that asked");
          check(rdata == exp_q[0], "read data");
          check(cyc == exp_t[0], "read latency two cycles");
          void'(exp_q.pop_front()); void'(exp_c.pop_front()); void'(exp_t.pop_front());
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

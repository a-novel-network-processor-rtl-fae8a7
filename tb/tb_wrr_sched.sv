// tb_wrr_sched: task scheduler with 32 queues and 1024 flows. Queues 0, 1 and
// 2 get weights 3, 1 and 2 and destinations 1, 0 and 1. Flows are re-entered
// after each service, as the data memory manager does while a flow has
// packets. Checks: every dequeue matches a reference weighted-round-robin
// model (queue order, flow order inside a queue, destination); while all
// three queues are busy the service counts are in the ratio 3:1:2; a flow
// entered into the queue being served in the same cycle is not lost; the
// scheduler empties when no flow is re-entered.
module tb_wrr_sched;
  import pro3_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cfg_we = 0;
  logic [4:0] cfg_q = '0;
  logic [7:0] cfg_weight = '0;
  logic [1:0] cfg_dest = '0;
  logic       enq_valid = 0, deq_ready = 0;
  flow_t      enq_flow = '0;
  logic       enq_ready, deq_valid;
  flow_t      deq_flow;
  logic [4:0] deq_q;
  logic [1:0] deq_dest;

  wrr_sched #(.NQ(32), .NFLOWS(1024)) dut (.clk, .rst_n, .cfg_we, .cfg_q, .cfg_weight, .cfg_dest,
    .enq_valid, .enq_ready, .enq_flow, .deq_valid, .deq_ready, .deq_flow, .deq_q, .deq_dest);

  // reference model
  flow_t mq [32][$];
  int    mw [32];
  int    md [32];
  int    mcur = 0, mcredit = 0;
  int    served [32];

  function automatic int model_pick(output bit reload);
    reload = 0;
    if (mq[mcur].size() != 0 && mcredit != 0) return mcur;
    for (int k = 1; k <= 32; k++) begin
      int q = (mcur + k) % 32;
      if (mq[q].size() != 0) begin reload = 1; return q; end
    end
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(input int q, input int w, input int d);
    @(negedge clk); cfg_we = 1; cfg_q = 5'(q); cfg_weight = 8'(w); cfg_dest = 2'(d);
    mw[q] = w; md[q] = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic enq(input int f);
    @(negedge clk); enq_valid = 1; enq_flow = flow_t'(f);
    mq[f % 32].push_back(flow_t'(f));
    @(negedge clk); enq_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 32; q++) begin mw[q] = 1; md[q] = 0; served[q] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg(0, 3, 1); cfg(1, 1, 0); cfg(2, 2, 1);
    check(!deq_valid, "empty after reset");
    // queue 0: flows 0,32,64; queue 1: 1,33; queue 2: 2
    enq(0); enq(32); enq(64); enq(1); enq(33); enq(2);
    // serve 600 times, re-entering each flow in the same cycle
    for (int n = 0; n < 600; n++) begin
      bit rl; int q;
      @(negedge clk);
      q = model_pick(rl);
      check(deq_valid, "flow offered");
      check(32'(deq_q) == q && deq_flow == mq[q][0], $sformatf("pick %0d: got q%0d f%0d exp q%0d f%0d", n, deq_q, deq_flow, q, mq[q][0]));
      check(32'(deq_dest) == md[q], "destination of the queue");
      deq_ready = 1; enq_valid = 1; enq_flow = deq_flow;
      check(enq_ready, "enqueue ready while dequeuing");
      mcredit = (rl ? mw[q] : mcredit) - 1; mcur = q;
      mq[q].push_back(mq[q].pop_front());
      served[q]++;
      @(negedge clk); deq_ready = 0; enq_valid = 0;
    end
    check(served[0] == 300 && served[1] == 100 && served[2] == 200,
          $sformatf("shares 3:1:2 got %0d %0d %0d", served[0], served[1], served[2]));
    // drain without re-entering
    for (int n = 0; n < 6; n++) begin
      bit rl; int q;
      @(negedge clk);
      q = model_pick(rl);
      check(deq_valid && deq_flow == mq[q][0], "drain order");
      deq_ready = 1;
      mcredit = (rl ? mw[q] : mcredit) - 1; mcur = q;
      void'(mq[q].pop_front());
      @(negedge clk); deq_ready = 0;
    end
    @(negedge clk);
    check(!deq_valid, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

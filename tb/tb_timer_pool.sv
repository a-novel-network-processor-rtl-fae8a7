// tb_timer_pool: timer pool with 64 timers and a tick every 4 cycles. Arms
// timers with different timeouts and flows, re-arms one, cancels one, and
// checks that each armed timer reports exactly one event with its flow, not
// before its expiry tick and at most one sweep (64 cycles) after it, and that
// the cancelled timer reports nothing.
module tb_timer_pool;
  import pro3_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        set_valid = 0, set_cancel = 0, ev_ready = 1;
  logic [5:0]  set_id = '0;
  flow_t       set_flow = '0;
  logic [23:0] set_timeout = '0;
  logic        set_ready, ev_valid;
  logic [5:0]  ev_id;
  flow_t       ev_flow;
  logic [23:0] now;

  timer_pool #(.NTIMERS(64), .TICK_DIV(4), .TIME_W(24)) dut (.clk, .rst_n, .set_valid, .set_ready,
    .set_id, .set_flow, .set_timeout, .set_cancel, .ev_valid, .ev_ready, .ev_id, .ev_flow, .now);

  int   exp_tick [64];
  bit   armed [64];
  int   events = 0;
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic arm(input int id, input int to, input logic cancel);
    @(negedge clk);
    set_valid = 1; set_id = 6'(id); set_flow = flow_t'(1000 + id); set_timeout = 24'(to);
    set_cancel = cancel;
    check(set_ready, "set ready");
    armed[id] = !cancel; exp_tick[id] = int'(now) + to;
    @(negedge clk); set_valid = 0; set_cancel = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n && ev_valid && ev_ready) begin
      events++;
      checks++;
      if (!armed[ev_id] || ev_flow != flow_t'(1000 + int'(ev_id)) || int'(now) < exp_tick[ev_id] ||
          int'(now) > exp_tick[ev_id] + 64/4 + 2) begin
        failures++;
        $display("FAIL: event timer %0d flow %0d now %0d exp %0d armed %0d", ev_id, ev_flow, now,
                 exp_tick[ev_id], armed[ev_id]);
      end
      armed[ev_id] = 0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) armed[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    arm(3, 10, 0); arm(17, 50, 0); arm(40, 5, 0); arm(63, 100, 0); arm(0, 30, 0);
    arm(20, 40, 0); arm(20, 200, 0);   // re-arm: only the later expiry counts
    arm(21, 60, 0); arm(21, 0, 1);     // cancelled
    repeat (1500) @(negedge clk);
    check(events == 6, $sformatf("six events, got %0d", events));
    for (int i = 0; i < 64; i++) check(!armed[i], $sformatf("timer %0d not left armed", i));
    check(int'(now) >= 1500 / 4, "tick counter advances");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// timer_pool: hardware timer pool for per-flow timeouts.
//
// Protocol instances need timeout and watchdog timers; with many thousands of
// connections keeping time in software would eat the processor. This block
// keeps NTIMERS timers in memory. A timer is armed with a flow ID and a
// timeout in ticks (one tick every TICK_DIV clock cycles), re-armed by
// arming it again, and cancelled. A scanner visits one timer per clock cycle;
// an armed timer whose expiry time has been reached is disarmed and reported
// as an event (timer number and flow ID). A full sweep takes NTIMERS cycles,
// so an event is reported at most NTIMERS cycles after its expiry tick.
//
// Interface: set_* (valid/ready; set_ready is always 1, a request is taken
// every cycle; set_cancel=1 disarms); ev_* (valid/ready)
// reports expiries; now is the current tick count. Expiry compares use
// wrap-around arithmetic, so timeouts must stay below 2^(TIME_W-1) ticks.
//
// The architecture gives the block's purpose (a dedicated timer pool serving
// the firewall's timer events, reachable from the CPU interface); the pool
// size, tick length and scanning scheme are this design's own.
module timer_pool
  import pro3_pkg::*;
#(
  parameter int unsigned NTIMERS  = 1024,
  parameter int unsigned TICK_DIV = 200,
  parameter int unsigned TIME_W   = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       set_valid,
  output logic                       set_ready,
  input  logic [$clog2(NTIMERS)-1:0] set_id,
  input  flow_t                      set_flow,
  input  logic [TIME_W-1:0]          set_timeout,
  input  logic                       set_cancel,
  output logic                       ev_valid,
  input  logic                       ev_ready,
  output logic [$clog2(NTIMERS)-1:0] ev_id,
  output flow_t                      ev_flow,
  output logic [TIME_W-1:0]          now
);

  localparam int unsigned IW = $clog2(NTIMERS);
  localparam int unsigned DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  logic [NTIMERS-1:0] armed;
  logic [TIME_W-1:0]  expiry [NTIMERS];
  flow_t              tflow  [NTIMERS];
  logic [IW-1:0]      idx;
  logic [DW-1:0]      div;
  logic               scan_en, hit;
  logic [TIME_W-1:0]  diff;

  assign set_ready = 1'b1;
  assign scan_en   = !ev_valid || ev_ready;
  assign diff      = now - expiry[idx];
  assign hit       = armed[idx] && !diff[TIME_W-1] && !(set_valid && set_id == idx);

  always_ff @(posedge clk) begin
    if (set_valid && !set_cancel) begin
      expiry[set_id] <= now + set_timeout;
      tflow[set_id]  <= set_flow;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed    <= '0;
      idx      <= '0;
      div      <= '0;
      now      <= '0;
      ev_valid <= 1'b0;
      ev_id    <= '0;
      ev_flow  <= '0;
    end else begin
      if (div == DW'(TICK_DIV - 1)) begin
        div <= '0;
        now <= now + 1'b1;
      end else begin
        div <= div + 1'b1;
      end
      if (ev_valid && ev_ready) ev_valid <= 1'b0;
      if (scan_en) begin
        idx <= (idx == IW'(NTIMERS - 1)) ? '0 : idx + 1'b1;
        if (hit) begin
          armed[idx] <= 1'b0;
          ev_valid   <= 1'b1;
          ev_id      <= idx;
          ev_flow    <= tflow[idx];
        end
      end
      if (set_valid) armed[set_id] <= !set_cancel;
    end
  end

endmodule

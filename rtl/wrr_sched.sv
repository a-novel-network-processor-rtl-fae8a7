// wrr_sched: task scheduler with 32 weighted-round-robin scheduling queues.
//
// Every flow that has packets waiting in the data memory manager is entered
// in one scheduling queue; the queue is chosen by hashing the flow ID (its low
// five bits). Each queue is tied to an internal destination (send the packet
// straight to the output, or through an RPM for processing) and has a weight.
// The scheduler serves the queues weighted round robin: the current queue
// may hand out up to `weight` flows in a row, then the turn passes to the
// next non-empty queue. Inside a queue the flows are served in turn (a FIFO
// of flow IDs): the data memory manager re-enters a flow after serving one of
// its packets if the flow still has packets, so all flows of a queue share
// the queue's service opportunities equally.
//
// The flow FIFOs are linked lists: a next-flow memory with one entry per flow
// (the scheduling memory) and a head, tail and count per queue.
//
// Interface: enq_* enters a flow (valid/ready); deq_* offers the next flow,
// its queue and destination, taken when deq_ready. cfg_* writes a queue's
// weight and destination. Enqueue is always ready, also into the queue
// being dequeued in the same cycle. Timing: deq_* is combinational from the state;
// one flow per cycle.
//
// Follows the architecture: 32 queues, weighted round robin among queues,
// round robin among the flows of a queue, a queue tied to a destination.
// This design's own: the hash (low flow-ID bits), 8-bit weights, the
// destination encoding and the reset values (weight 1, destination 0).
//
// Lint notes: the queue search uses an int loop variable of which only the
// low bits select a queue.
module wrr_sched
  import pro3_pkg::*;
#(
  parameter int unsigned NQ     = NUM_SQ,
  parameter int unsigned NFLOWS = 1 << FLOW_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [$clog2(NQ)-1:0] cfg_q,
  input  logic [7:0]            cfg_weight,
  input  logic [1:0]            cfg_dest,
  input  logic                  enq_valid,
  output logic                  enq_ready,
  input  flow_t                 enq_flow,
  output logic                  deq_valid,
  input  logic                  deq_ready,
  output flow_t                 deq_flow,
  output logic [$clog2(NQ)-1:0] deq_q,
  output logic [1:0]            deq_dest
);

  localparam int unsigned QW = $clog2(NQ);
  localparam int unsigned FW = $clog2(NFLOWS);

  flow_t        nxt    [NFLOWS];
  flow_t        head   [NQ];
  flow_t        tail   [NQ];
  logic [FW:0]  cnt    [NQ];
  logic [7:0]   weight [NQ];
  logic [1:0]   dest   [NQ];
  logic [QW-1:0] cur;
  logic [7:0]   credit;

  logic [QW-1:0] sel;
  logic          reload;   // sel is a new turn
  logic [QW-1:0] enq_q;
  logic          deq_fire, enq_fire;

  always_comb begin
    int unsigned q;
    q         = 0;
    deq_valid = 1'b0;
    sel       = cur;
    reload    = 1'b0;
    if (cnt[cur] != 0 && credit != 0) begin
      deq_valid = 1'b1;
    end else begin
      for (int k = 1; k <= NQ; k++) begin
        q = (int'(cur) + k) % NQ;
        if (!deq_valid && cnt[q] != 0) begin
          deq_valid = 1'b1;
          sel       = QW'(q);
          reload    = 1'b1;
        end
      end
    end
  end

  assign deq_flow  = head[sel];
  assign deq_q     = sel;
  assign deq_dest  = dest[sel];
  assign deq_fire  = deq_valid && deq_ready;
  assign enq_q     = QW'(enq_flow);
  assign enq_ready = 1'b1;
  assign enq_fire  = enq_valid && enq_ready;

  always_ff @(posedge clk) begin
    if (enq_fire && cnt[enq_q] != 0) nxt[FW'(tail[enq_q])] <= enq_flow;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= '0;
      credit <= '0;
      for (int q = 0; q < NQ; q++) begin
        head[q]   <= '0;
        tail[q]   <= '0;
        cnt[q]    <= '0;
        weight[q] <= 8'd1;
        dest[q]   <= 2'd0;
      end
    end else begin
      if (cfg_we) begin
        weight[cfg_q] <= (cfg_weight == 0) ? 8'd1 : cfg_weight;
        dest[cfg_q]   <= cfg_dest;
      end
      if (deq_fire) begin
        cur    <= sel;
        credit <= (reload ? weight[sel] : credit) - 8'd1;
        if (cnt[sel] > 1) head[sel] <= nxt[FW'(head[sel])];
      end
      if (enq_fire) begin
        tail[enq_q] <= enq_flow;
        // an empty queue, or a one-flow queue losing that flow this cycle
        if (cnt[enq_q] == 0 || (deq_fire && sel == enq_q && cnt[enq_q] == 1))
          head[enq_q] <= enq_flow;
      end
      for (int q = 0; q < NQ; q++) begin
        cnt[q] <= cnt[q] + ((enq_fire && enq_q == QW'(q)) ? 1 : 0)
                         - ((deq_fire && sel == QW'(q)) ? 1 : 0);
      end
    end
  end

endmodule

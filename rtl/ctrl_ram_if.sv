// ctrl_ram_if: control RAM interface with the per-flow state memory.
//
// The control RAM holds one state word per flow (the connection state of the
// stateful-inspection firewall, NAT bindings and the like). Several blocks ask
// for flow state at different times: the two RPMs (their read/write control
// RAM units) and the host CPU, which initialises connection parameters. This
// block arbitrates among NCLI clients round robin, one access per cycle, and
// holds the memory itself as an array of NFLOWS words, modelling a
// zero-bus-turnaround SRAM: a read granted in cycle t returns its data with
// rvalid in cycle t+2, a write granted in cycle t is done in that cycle, and
// reads and writes can follow each other in any order with no idle cycle.
//
// Interface, per client c: req[c] with we[c], addr[c], wdata[c] held until
// gnt[c]; rvalid[c]/rdata for reads. rdata is shared by all clients.
//
// Follows the architecture: one state word per flow for 512K flows, a
// zero-bus-turnaround SRAM shared by several blocks. This design's own: the
// 64-bit state word, the round-robin arbitration and the two-cycle read.
//
// Lint notes: the loop variable c of the grant search is an int of which only
// the low bits are used. The reset also appears in the assertions' disable
// condition.
module ctrl_ram_if
  import pro3_pkg::*;
#(
  parameter int unsigned NCLI   = 3,
  parameter int unsigned NFLOWS = 1 << FLOW_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NCLI-1:0]    req,
  input  logic [NCLI-1:0]    we,
  input  flow_t              addr  [NCLI],
  input  logic [STATE_W-1:0] wdata [NCLI],
  output logic [NCLI-1:0]    gnt,
  output logic [NCLI-1:0]    rvalid,
  output logic [STATE_W-1:0] rdata
);

  localparam int unsigned CW = (NCLI > 1) ? $clog2(NCLI) : 1;
  localparam int unsigned AW = $clog2(NFLOWS);

  logic [STATE_W-1:0] mem [NFLOWS];
  logic [CW-1:0]      last;       // client granted most recently
  logic [CW-1:0]      sel;
  logic               any;
  logic [NCLI-1:0]    rv_p1, rv_p2;
  logic [STATE_W-1:0] rd_p1;

  // round robin: first requesting client after the last one served
  always_comb begin
    int unsigned c;
    c   = 0;
    any = 1'b0;
    sel = '0;
    for (int k = 1; k <= NCLI; k++) begin
      c = (int'(last) + k) % NCLI;
      if (!any && req[c]) begin
        any = 1'b1;
        sel = CW'(c);
      end
    end
    gnt = '0;
    if (any) gnt[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (any && we[sel]) mem[AW'(addr[sel])] <= wdata[sel];
    rd_p1 <= mem[AW'(addr[sel])];
    rdata <= rd_p1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last  <= CW'(NCLI - 1);
      rv_p1 <= '0;
      rv_p2 <= '0;
    end else begin
      if (any) last <= sel;
      rv_p1 <= (any && !we[sel]) ? gnt : '0;
      rv_p2 <= rv_p1;
    end
  end

  assign rvalid = rv_p2;

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule

// sync_fifo: single-clock first-in first-out buffer with valid/ready ports.
//
// Used as the RPM's packet delay FIFO: while the field extractor, the glue
// logic and the RISC work on a packet's fields, the packet's segments wait
// here for the field modifier. It is also used for the small command and
// result queues between blocks.
//
// Storage is a circular array of DEPTH entries with read and write pointers
// and an occupancy count. A write is taken when in_valid && in_ready
// (in_ready = not full); the head entry is shown on out_data while out_valid
// (not empty) and leaves when out_ready is high. Writing and reading in the
// same cycle is allowed; in_ready depends only on the fill level, so there is
// no combinational path from out_ready to in_ready. Output is from the array
// (first-word fall-through), so an entry can leave the cycle after it
// entered.
//
// The architecture names the packet delay FIFO but not its depth; the
// default depth of 64 beats (four two-segment headers) is this design's own.
//
// Lint notes: the reset also appears in the assertion's disable condition,
// which the linter reports as a reset used both ways.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign out_valid = (count != 0);
  assign in_ready  = (32'(count) < DEPTH);
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule

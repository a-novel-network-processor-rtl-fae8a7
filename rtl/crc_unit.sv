// crc_unit: CRC generator over a packet stream, 64 bits per clock.
//
// Dedicated CRC hardware for the pre-processing (receive) and post-processing
// (transmit) paths. It watches a beat stream and computes the CRC of each
// packet from sop to eop, most significant bit of the first byte first. Each
// beat advances the CRC register by all its valid bytes in one clock (the
// bitwise shift register unrolled 64 times). At eop the final value,
// XOR-ed with XOROUT, appears on crc with crc_valid for one cycle.
//
// Parameters: WIDTH and POLY (without the x^WIDTH term), INIT, XOROUT. The
// defaults give the 32-bit CRC of ATM AAL5 (generator 0x04C11DB7, preset to
// all ones, complemented result). With WIDTH=10, POLY=10'h233, INIT=0,
// XOROUT=0 it is the 10-bit CRC of ATM OAM cells
// (x^10+x^9+x^5+x^4+x+1).
//
// Interface: beat observed when valid (no back-pressure). Timing: result one
// cycle after the eop beat.
//
// The architecture asks for dedicated IP checksum, 10-bit and 32-bit CRC
// hardware; the generator polynomials and presets are those of the ATM
// standards, not given with the architecture.
module crc_unit
  import pro3_pkg::*;
#(
  parameter int unsigned WIDTH  = 32,
  parameter logic [WIDTH-1:0] POLY   = 32'h04C1_1DB7,
  parameter logic [WIDTH-1:0] INIT   = '1,
  parameter logic [WIDTH-1:0] XOROUT = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  beat_t            beat,
  output logic             crc_valid,
  output logic [WIDTH-1:0] crc
);

  logic [WIDTH-1:0] state, nxt;

  function automatic logic [WIDTH-1:0] step_byte(input logic [WIDTH-1:0] c, input logic [7:0] d);
    logic [WIDTH-1:0] r;
    r = c;
    for (int b = 7; b >= 0; b--) begin
      if (r[WIDTH-1] ^ d[b]) r = (r << 1) ^ POLY;
      else                   r = r << 1;
    end
    return r;
  endfunction

  always_comb begin
    nxt = beat.sop ? INIT : state;
    for (int i = 0; i < BUS_BYTES; i++)
      if (!beat.eop || i < int'(beat.nbytes))
        nxt = step_byte(nxt, beat.data[BUS_W-1-8*i -: 8]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= INIT;
      crc       <= '0;
      crc_valid <= 1'b0;
    end else begin
      crc_valid <= valid && beat.eop;
      if (valid) begin
        state <= nxt;
        if (beat.eop) crc <= nxt ^ XOROUT;
      end
    end
  end

endmodule

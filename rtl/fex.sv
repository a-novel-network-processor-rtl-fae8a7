// fex: microprogrammed field extractor (FEX).
//
// The FEX isolates header fields from a packet with a variable-width window
// that slides over the header. It takes one packet (or the first one or two
// 64-byte segments of one) as 64-bit beats, keeps the first 128 bytes in a
// byte buffer, and then runs a microprogram from its own 2K-instruction store.
// Each EXTR instruction copies 1..32 bits from the 32-bit big-endian window at
// base+offset into one of 16 field registers; ADDB moves the base pointer by
// four times a field (how the program skips an IP header of any length), SETB
// sets it. END hands the fields, the packet's tag and its byte count on.
//
// Interface: microcode is written through prog_* (the micro-processor bus).
// s_* is a valid/ready beat stream; the tag is taken with the first beat.
// f_* presents the result until f_ready. stall freezes the engine (the RISC's
// feedback signal that extends a packet's processing).
//
// Timing: one beat per cycle while receiving; then two cycles per instruction
// (fetch from the synchronous microcode store, execute); the result is valid
// the cycle after END executes. f_icount gives the instructions executed.
//
// The architecture fixes the microcode store size (2K instructions) and the
// engine's role; the instruction encoding (see pro3_pkg), the 16 field
// registers and the two-cycle instruction are this design's choices.
module fex
  import pro3_pkg::*;
#(
  parameter int unsigned DEPTH = UCODE_DEPTH,
  parameter int unsigned TAG_W = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     stall,
  // microcode write port
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [31:0]              prog_wdata,
  // packet in
  input  logic                     s_valid,
  output logic                     s_ready,
  input  beat_t                    s_beat,
  input  logic [TAG_W-1:0]         s_tag,
  // fields out
  output logic                     f_valid,
  input  logic                     f_ready,
  output field_t                   f_fields [NFIELDS],
  output logic [TAG_W-1:0]         f_tag,
  output logic [LEN_W-1:0]         f_len,
  output logic [15:0]              f_icount
);

  typedef enum logic [2:0] {S_RECV, S_FETCH, S_EXEC, S_DONE} state_e;

  logic [31:0]              ucode [DEPTH];
  hdr_bytes_t               buf_q;
  state_e                   state;
  logic [$clog2(DEPTH)-1:0] pc;
  fe_instr_t                ir;
  logic [7:0]               base;
  logic [5:0]               widx;     // beat index inside the packet
  logic                     got_sop;

  always_ff @(posedge clk) begin
    if (prog_we) ucode[prog_addr] <= prog_wdata;
  end

  assign s_ready = (state == S_RECV) && !stall;
  assign f_valid = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_RECV;
      pc       <= '0;
      ir       <= '0;
      base     <= '0;
      widx     <= '0;
      got_sop  <= 1'b0;
      f_tag    <= '0;
      f_len    <= '0;
      f_icount <= '0;
      for (int i = 0; i < NFIELDS; i++) f_fields[i] <= '0;
      for (int i = 0; i < HDR_BYTES; i++) buf_q[i] <= '0;
    end else if (!stall) begin
      unique case (state)
        S_RECV: if (s_valid) begin
          if (s_beat.sop) begin
            for (int i = 0; i < HDR_BYTES; i++) buf_q[i] <= '0;
            for (int i = 0; i < BUS_BYTES; i++) buf_q[i] <= s_beat.data[BUS_W-1-8*i -: 8];
            f_tag   <= s_tag;
            widx    <= 6'd1;
            got_sop <= 1'b1;
            f_len   <= LEN_W'(s_beat.eop ? s_beat.nbytes : 4'd8);
          end else if (got_sop) begin
            if (widx < 6'(HDR_WORDS))
              for (int i = 0; i < BUS_BYTES; i++)
                buf_q[int'(widx)*BUS_BYTES+i] <= s_beat.data[BUS_W-1-8*i -: 8];
            if (widx != 6'h3f) widx <= widx + 6'd1;
            f_len <= f_len + LEN_W'(s_beat.eop ? s_beat.nbytes : 4'd8);
          end
          if (s_beat.eop && (s_beat.sop || got_sop)) begin
            got_sop  <= 1'b0;
            state    <= S_FETCH;
            pc       <= '0;
            base     <= '0;
            f_icount <= '0;
            for (int i = 0; i < NFIELDS; i++) f_fields[i] <= '0;
          end
        end
        S_FETCH: begin
          ir    <= fe_instr_t'(ucode[pc]);
          pc    <= pc + 1'b1;
          state <= S_EXEC;
        end
        S_EXEC: begin
          f_icount <= f_icount + 16'd1;
          state    <= S_FETCH;
          unique case (ir.op)
            OP_EXTR: f_fields[ir.fld] <= (get_window(buf_q, int'(base) + int'(ir.off)) >> ir.shift)
                                         & width_mask(ir.width);
            OP_ADDB: base <= base + {f_fields[ir.fld][5:0], 2'b00};
            OP_SETB: base <= {ir.imm, 2'b00};
            default: state <= S_DONE;   // OP_END and anything this engine does not execute
          endcase
        end
        S_DONE: if (f_ready) state <= S_RECV;
        default: state <= S_RECV;
      endcase
    end
  end

endmodule

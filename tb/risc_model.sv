// risc_model: behavioural model of the RPM's RISC core running the
// stateful-inspection / address-translation routine. Not synthesizable logic
// of the design: it stands in for the embedded processor and its firmware in
// the testbenches.
//
// On start it reads the fields and the flow state from the glue logic's
// register file, waits LAT cycles (the processing time of the routine),
// optionally raises stall for STALL_LEN cycles on every STALL_EVERY-th
// packet (extended processing), and then:
//   state_hi[31]  1: the flow is blocked, verdict reject;
//   state_hi[30]  1: translate the source: src IP = state_lo,
//                 TCP source port = state_hi[15:0], TCP checksum updated
//                 incrementally;
//   state_hi[29:16] counts the packets seen on the flow (state update).
// It writes the verdict and ends with a one-cycle done.
module risc_model
  import pro3_pkg::*;
  import tb_util_pkg::*;
#(
  parameter int LAT         = 12,
  parameter int STALL_EVERY = 0,
  parameter int STALL_LEN   = 20
) (
  input  logic        clk,
  input  logic        start,
  output logic [4:0]  addr,
  output logic        we,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  output logic        done,
  output logic        stall,
  output int          n_done,
  output int          n_stalls
);
  initial begin
    addr = '0; we = 0; wdata = '0; done = 0; stall = 0; n_done = 0; n_stalls = 0;
  end

  task automatic rd(input int a, output logic [31:0] v);
    addr = 5'(a);
    #1 v = rdata;
  endtask

  task automatic wr(input int a, input logic [31:0] v);
    @(negedge clk);
    addr = 5'(a); wdata = v; we = 1;
    @(negedge clk);
    we = 0;
  endtask

  always begin
    logic [31:0] src, sport, ck, sl, sh;
    logic [15:0] nck;
    @(posedge clk);
    if (start) begin
      @(negedge clk);
      rd(F_SRC, src); rd(F_SPORT, sport); rd(F_CKSUM, ck);
      rd(REG_STATE_L, sl); rd(REG_STATE_H, sh);
      repeat (LAT) @(negedge clk);
      if (STALL_EVERY > 0 && (n_done % STALL_EVERY) == STALL_EVERY - 1) begin
        stall = 1; n_stalls++;
        repeat (STALL_LEN) @(negedge clk);
        stall = 0;
      end
      sh[29:16] = sh[29:16] + 14'd1;
      if (sh[30] && !sh[31]) begin
        nck = ck_update(ck[15:0], src[31:16], sl[31:16]);
        nck = ck_update(nck, src[15:0], sl[15:0]);
        nck = ck_update(nck, sport[15:0], sh[15:0]);
        wr(F_SRC, sl);
        wr(F_SPORT, {16'd0, sh[15:0]});
        wr(F_CKSUM, {16'd0, nck});
      end
      wr(REG_STATE_H, sh);
      wr(REG_VERDICT, {31'd0, !sh[31]});
      @(negedge clk);
      done = 1;
      @(negedge clk);
      done = 0;
      n_done++;
    end
  end
endmodule

// tcam_model: behavioural model of the external ternary CAM used for flow
// classification. Not part of the design. It holds NENT entries of a 144-bit
// value, a 144-bit care mask and a 19-bit flow ID, written through wr_*. A
// search is taken on req_valid (always ready); LAT cycles later rsp_valid
// pulses with hit and the flow ID of the lowest-numbered matching entry
// (key & mask == value & mask).
module tcam_model
  import pro3_pkg::*;
#(
  parameter int NENT = 16,
  parameter int LAT  = 4
) (
  input  logic             clk,
  input  logic             wr_en,
  input  int               wr_idx,
  input  logic [KEY_W-1:0] wr_value,
  input  logic [KEY_W-1:0] wr_mask,
  input  flow_t            wr_flow,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [KEY_W-1:0] key,
  output logic             rsp_valid,
  output logic             rsp_hit,
  output flow_t            rsp_flow,
  output int               n_search
);
  logic [KEY_W-1:0] val [NENT];
  logic [KEY_W-1:0] msk [NENT];
  flow_t            fl  [NENT];
  logic [NENT-1:0]  used;

  initial begin
    used = '0; rsp_valid = 0; rsp_hit = 0; rsp_flow = '0; n_search = 0;
  end
  assign req_ready = 1'b1;

  always @(posedge clk) begin
    if (wr_en) begin
      val[wr_idx] <= wr_value; msk[wr_idx] <= wr_mask; fl[wr_idx] <= wr_flow;
      used[wr_idx] <= 1'b1;
    end
  end

  always begin
    logic [KEY_W-1:0] k;
    logic             h;
    flow_t            f;
    @(posedge clk);
    if (req_valid) begin
      k = key; h = 0; f = '0; n_search++;
      for (int i = NENT - 1; i >= 0; i--)
        if (used[i] && ((k & msk[i]) == (val[i] & msk[i]))) begin h = 1; f = fl[i]; end
      repeat (LAT - 1) @(posedge clk);
      rsp_valid <= 1; rsp_hit <= h; rsp_flow <= f;
      @(posedge clk);
      rsp_valid <= 0;
    end
  end
endmodule

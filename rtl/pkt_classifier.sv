// pkt_classifier: packet classifier of the pre-processing block.
//
// Every packet that enters the chip also passes through the classifier, which
// decides the packet's flow and whether it may enter at all. It has three
// parts:
//  - verifier: checks the IPv4 header (version 4, header length at least 20
//    bytes, correct header checksum, total length within the bytes received);
//  - field extractor: the same microprogrammed engine as in the RPM (module
//    fex), with its own program, pulls the classification fields out of the
//    headers into field registers 0..4;
//  - classifier FSM with the CAM controller: builds the 144-bit search key
//    {field0, field1, field2, field3, field4[15:0]} (for IP the program puts
//    the 5-tuple there), starts a search in the external ternary CAM and
//    waits for the answer, a hit flag and a 19-bit flow ID.
// A packet whose header is bad, or whose key is not in the CAM, is to be
// dropped; otherwise the flow ID goes to the data memory manager. Results
// leave in packet order.
//
// Interface: in_* is the packet stream (valid/ready); prog_* loads the
// extractor; cam_req_*/cam_rsp_* is the CAM port (request valid/ready, then a
// response pulse); res_* is the verdict (valid/ready).
//
// Timing: two stages. The receive stage takes a packet's beats into the
// header buffer and the extractor, which then runs its program (2 cycles per
// instruction). As soon as the extractor is done, the lookup stage takes the
// key and the header check result and the receive stage is free for the next
// packet; the lookup stage searches the CAM and reports. A 40-byte packet
// with the 9-instruction 5-tuple program thus occupies the receive stage for
// about 5 + 18 + 2 cycles, while its search overlaps the next packet.
//
// Follows the architecture: the three submodules, the 144-bit key and the
// 19-bit flow ID, the CAM as an external device. This design's own: the
// checks the verifier makes, the key layout and the two-stage operation.
//
// Lint notes: the extractor's tag, length and instruction-count outputs
// (fx_tag, fx_len, fx_icount) are not needed here and are left unread. The
// reset also appears in the assertions' disable condition.
module pkt_classifier
  import pro3_pkg::*;
#(
  parameter int unsigned DEPTH = UCODE_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [31:0]              prog_wdata,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  beat_t                    in_beat,
  output logic                     cam_req_valid,
  input  logic                     cam_req_ready,
  output logic [KEY_W-1:0]         cam_key,
  input  logic                     cam_rsp_valid,
  input  logic                     cam_rsp_hit,
  input  flow_t                    cam_rsp_flow,
  output logic                     res_valid,
  input  logic                     res_ready,
  output logic                     res_drop,
  output flow_t                    res_flow,
  output logic [31:0]              st_bad_hdr,
  output logic [31:0]              st_miss
);

  typedef enum logic [1:0] {L_IDLE, L_REQ, L_WAIT, L_OUT} lstate_e;

  lstate_e          ls;
  logic [KEY_W-1:0] key_q;
  hdr_bytes_t       hb;
  logic [4:0]       widx;
  logic [LEN_W-1:0] rx_len;
  logic             fx_valid, fx_ready, fex_s_ready;
  field_t           fx_fields [NFIELDS];
  logic [0:0]       fx_tag;
  logic [LEN_W-1:0] fx_len;
  logic [15:0]      fx_icount;
  logic             hdr_ok;
  logic [15:0]      ip_total;

  fex #(.DEPTH(DEPTH), .TAG_W(1)) u_fex (
    .clk, .rst_n, .stall(1'b0),
    .prog_we, .prog_addr, .prog_wdata,
    .s_valid(in_valid), .s_ready(fex_s_ready), .s_beat(in_beat), .s_tag(1'b0),
    .f_valid(fx_valid), .f_ready(fx_ready), .f_fields(fx_fields), .f_tag(fx_tag),
    .f_len(fx_len), .f_icount(fx_icount)
  );

  assign in_ready = fex_s_ready;

  // verifier
  assign ip_total = {hb[2], hb[3]};
  assign hdr_ok   = (hb[0][7:4] == 4'd4) && (hb[0][3:0] >= 4'd5) &&
                    (ip_hdr_sum(hb, 0, 1'b0) == 16'hFFFF) &&
                    (ip_total >= {10'd0, hb[0][3:0], 2'b00}) && (ip_total <= rx_len);

  assign cam_key       = key_q;
  assign cam_req_valid = (ls == L_REQ);
  assign res_valid     = (ls == L_OUT);
  assign fx_ready      = (ls == L_IDLE);

  // receive stage: header buffer and byte count (beats go to the extractor too)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx   <= '0;
      rx_len <= '0;
      for (int i = 0; i < HDR_BYTES; i++) hb[i] <= '0;
    end else if (in_valid && in_ready) begin
      if (in_beat.sop) begin
        for (int i = 0; i < HDR_BYTES; i++) hb[i] <= '0;
        for (int i = 0; i < BUS_BYTES; i++) hb[i] <= in_beat.data[BUS_W-1-8*i -: 8];
        widx   <= 5'd1;
        rx_len <= LEN_W'(in_beat.eop ? in_beat.nbytes : 4'd8);
      end else begin
        if (widx < 5'(HDR_WORDS)) begin
          for (int i = 0; i < BUS_BYTES; i++)
            hb[int'(widx)*BUS_BYTES+i] <= in_beat.data[BUS_W-1-8*i -: 8];
          widx <= widx + 5'd1;
        end
        rx_len <= rx_len + LEN_W'(in_beat.eop ? in_beat.nbytes : 4'd8);
      end
    end
  end

  // lookup stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ls         <= L_IDLE;
      key_q      <= '0;
      res_drop   <= 1'b0;
      res_flow   <= '0;
      st_bad_hdr <= '0;
      st_miss    <= '0;
    end else begin
      unique case (ls)
        L_IDLE: if (fx_valid) begin
          // the extractor has run: take the key, check the header
          key_q <= {fx_fields[0], fx_fields[1], fx_fields[2], fx_fields[3], fx_fields[4][15:0]};
          if (hdr_ok) begin
            ls <= L_REQ;
          end else begin
            res_drop   <= 1'b1;
            res_flow   <= '0;
            st_bad_hdr <= st_bad_hdr + 32'd1;
            ls         <= L_OUT;
          end
        end
        L_REQ: if (cam_req_ready) ls <= L_WAIT;
        L_WAIT: if (cam_rsp_valid) begin
          res_drop <= !cam_rsp_hit;
          res_flow <= cam_rsp_flow;
          if (!cam_rsp_hit) st_miss <= st_miss + 32'd1;
          ls <= L_OUT;
        end
        L_OUT: if (res_ready) ls <= L_IDLE;
        default: ls <= L_IDLE;
      endcase
    end
  end

endmodule

// rpg: RPM glue logic (RPG) with the read/write control RAM unit (RWR).
//
// The RPG is the link between the field extractor, the RISC core and the field
// modifier of an RPM. Its centre is a register file split into two halves:
// while the RISC works on the packet held in one half, the RPG loads the next
// packet's extracted fields and flow state into the other. For each packet it
//   1. takes the extracted fields and tag from the extractor,
//   2. reads the flow's state word from the control RAM (the RWR role),
//   3. fills the free half and, when the RISC is idle, starts it on that half,
//   4. after the RISC reports done, hands the (possibly rewritten) fields and
//      the accept/reject verdict to the field modifier and writes the new
//      state back to the control RAM.
//
// RISC side: risc_start is a one-cycle pulse; the RISC then reads and writes
// the active half through risc_addr/risc_we/risc_wdata/risc_rdata
// (combinational read; register map in pro3_pkg: fields 0..15, state 16..17,
// verdict 18, flow 19, length 20) and ends with a one-cycle risc_done.
// risc_stall is the RISC's feedback that extends a packet's processing; it is
// passed on as rpm_stall, which freezes the whole RPM.
//
// Control RAM side: request/grant; a read returns cr_rvalid with data some
// cycles after the grant, a write completes at its grant.
//
// The two-part register file, the RISC's direct access to it and the stall
// signal follow the architecture; the register map and the handshakes are
// this design's own.
//
// Lint notes: the reset also appears in the assertions' disable condition,
// which the linter reports as a reset used both ways.
module rpg
  import pro3_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // from the field extractor
  input  logic             f_valid,
  output logic             f_ready,
  input  field_t           f_fields [NFIELDS],
  input  rpm_tag_t         f_tag,
  // control RAM port
  output logic             cr_req,
  output logic             cr_we,
  output flow_t            cr_addr,
  output logic [STATE_W-1:0] cr_wdata,
  input  logic             cr_gnt,
  input  logic             cr_rvalid,
  input  logic [STATE_W-1:0] cr_rdata,
  // RISC core side
  output logic             risc_start,
  output logic             risc_bank,
  input  logic [4:0]       risc_addr,
  input  logic             risc_we,
  input  logic [31:0]      risc_wdata,
  output logic [31:0]      risc_rdata,
  input  logic             risc_done,
  input  logic             risc_stall,
  output logic             rpm_stall,
  // to the field modifier
  output logic             n_valid,
  input  logic             n_ready,
  output field_t           n_fields [NFIELDS],
  output logic             n_accept,
  output rpm_tag_t         n_tag,
  // status
  output logic [1:0]       bank_full_o
);

  typedef enum logic [1:0] {L_IDLE, L_REQ, L_WAIT} lstate_e;
  typedef enum logic [1:0] {E_IDLE, E_RUN, E_POST} estate_e;

  field_t             bf   [2][NFIELDS];
  logic [STATE_W-1:0] bst  [2];
  logic               bver [2];
  rpm_tag_t           btag [2];
  logic [1:0]         full;
  logic               lb, eb;          // load half, execute half
  lstate_e            ls;
  estate_e            es;
  logic               n_done, w_done;  // post phase: record taken, state written

  assign rpm_stall   = risc_stall;
  assign risc_bank   = eb;
  assign bank_full_o = full;

  // control RAM port: the write-back of the post phase goes first
  logic wr_pending;
  assign wr_pending = (es == E_POST) && !w_done;
  assign cr_req   = wr_pending || (ls == L_REQ);
  assign cr_we    = wr_pending;
  assign cr_addr  = wr_pending ? btag[eb].flow : f_tag.flow;
  assign cr_wdata = bst[eb];

  assign f_ready  = (ls == L_WAIT) && cr_rvalid;

  assign n_valid  = (es == E_POST) && !n_done;
  assign n_fields = bf[eb];
  assign n_accept = bver[eb];
  assign n_tag    = btag[eb];

  always_comb begin
    risc_rdata = '0;
    if (risc_addr < 5'(NFIELDS))       risc_rdata = bf[eb][risc_addr[3:0]];
    else if (risc_addr == 5'(REG_STATE_L)) risc_rdata = bst[eb][31:0];
    else if (risc_addr == 5'(REG_STATE_H)) risc_rdata = bst[eb][63:32];
    else if (risc_addr == 5'(REG_VERDICT)) risc_rdata = {31'd0, bver[eb]};
    else if (risc_addr == 5'(REG_FLOW))    risc_rdata = 32'(btag[eb].flow);
    else if (risc_addr == 5'(REG_LEN))     risc_rdata = 32'(btag[eb].len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full       <= '0;
      lb         <= 1'b0;
      eb         <= 1'b0;
      ls         <= L_IDLE;
      es         <= E_IDLE;
      n_done     <= 1'b0;
      w_done     <= 1'b0;
      risc_start <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        bst[b]  <= '0;
        bver[b] <= 1'b0;
        btag[b] <= '0;
        for (int i = 0; i < NFIELDS; i++) bf[b][i] <= '0;
      end
    end else begin
      risc_start <= 1'b0;
      // ---- load side (RWR read) ----
      unique case (ls)
        L_IDLE: if (f_valid && !full[lb] && !risc_stall) ls <= L_REQ;
        L_REQ:  if (cr_gnt && !wr_pending) ls <= L_WAIT;
        L_WAIT: if (cr_rvalid) begin
          bf[lb]   <= f_fields;
          bst[lb]  <= cr_rdata;
          bver[lb] <= 1'b1;
          btag[lb] <= f_tag;
          full[lb] <= 1'b1;
          lb       <= ~lb;
          ls       <= L_IDLE;
        end
        default: ls <= L_IDLE;
      endcase
      // ---- execute side ----
      unique case (es)
        E_IDLE: if (full[eb] && !risc_stall) begin
          risc_start <= 1'b1;
          es         <= E_RUN;
        end
        E_RUN: begin
          if (risc_we) begin
            if (risc_addr < 5'(NFIELDS))       bf[eb][risc_addr[3:0]] <= risc_wdata;
            else if (risc_addr == 5'(REG_STATE_L)) bst[eb][31:0]          <= risc_wdata;
            else if (risc_addr == 5'(REG_STATE_H)) bst[eb][63:32]         <= risc_wdata;
            else if (risc_addr == 5'(REG_VERDICT)) bver[eb]               <= risc_wdata[0];
          end
          if (risc_done) begin
            es     <= E_POST;
            n_done <= 1'b0;
            w_done <= 1'b0;
          end
        end
        E_POST: begin
          if (n_valid && n_ready) n_done <= 1'b1;
          if (wr_pending && cr_gnt) w_done <= 1'b1;
          if ((n_done || (n_valid && n_ready)) && (w_done || (wr_pending && cr_gnt))) begin
            full[eb] <= 1'b0;
            eb       <= ~eb;
            es       <= E_IDLE;
          end
        end
        default: es <= E_IDLE;
      endcase
    end
  end

  a_no_load_into_full: assert property (@(posedge clk) disable iff (!rst_n)
                                        (ls == L_WAIT && cr_rvalid) |-> !full[lb]);

endmodule

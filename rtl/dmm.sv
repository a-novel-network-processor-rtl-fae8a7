// dmm: data memory manager.
//
// The DMM stores every incoming packet, keeps the packets of each flow in a
// queue of their own, hands the header segments of a packet to an RPM when
// the task scheduler picks the flow, puts the modified header back into the
// stored packet, and sends the packet out (or discards it).
//
// Storage. Packet memory is cut into NSEG segments of 64 bytes (eight 64-bit
// words). Free segments form a linked list; a packet is a chain of segments
// linked through seg_next. Per packet, at its first segment, the pointer
// memory holds the length, the last segment and the link to the next packet
// of the same flow. Per flow it holds head, tail, packet count and a busy bit
// (one of its packets is being served). After reset an initialisation sweep
// builds the free list and clears the flow table (max(NSEG, NFLOWS) cycles,
// init_done then goes high).
//
// Engines, all running concurrently:
//  - input: writes arriving beats into freshly allocated segments and queues
//    (first segment, last segment, length) as a pending packet;
//  - linker: pairs each pending packet with the classifier's verdict (same
//    order); a dropped packet's chain goes back to the free list, an accepted
//    one is appended to its flow queue, and a flow that becomes non-empty and
//    is not busy is entered in the scheduler;
//  - service: takes a flow from the scheduler, removes the flow's head packet
//    and either queues it for transmission (destination 0, forward) or sends
//    its first segment, or first two if it is longer than 64 bytes, to an RPM
//    (destination 1, process); the two RPMs are used in turn, skipping one that
//    is not ready;
//  - return: writes the modified segments that come back from an RPM over the
//    stored ones and queues the packet for transmission, or for discarding if
//    the RPM rejected it;
//  - transmit: streams a packet out, frees its chain and then, if the flow
//    still has packets, enters it in the scheduler again. One packet of a flow
//    is in service at a time, which keeps each flow in order.
//
// Interface: valid/ready streams in_*, cls_*, sq_enq_*, sq_deq_*, rpm_*,
// ret_*, out_*; beats as in pro3_pkg (big-endian, nbytes on the last beat).
//
// The architecture gives: per-flow queues as linked lists indexed by the flow
// ID, 64-byte segments, up to 512K flows, sending one or two header segments
// to an RPM, replacing them with the returned ones, and the external packet
// DRAM and pointer SRAM. Here both memories are arrays inside the module with
// as many ports as the engines use in a cycle; the real chip's DRAM access
// scheduling and its 10 Gb/s four-port bandwidth sharing are not modelled.
// The segment count and the engine structure are this design's own.
//
// Lint notes: the two internal FIFOs' occupancy pins are left open, and some
// bits of packed job and tag words (tj, r, rb, rtag) are unread because only
// parts of them are needed in that step. The reset also appears in the
// assertions' disable condition.
// The 13 reserved bits of the RPM tag (rsv) are driven 0.
module dmm
  import pro3_pkg::*;
#(
  parameter int unsigned NFLOWS = 1 << FLOW_W,
  parameter int unsigned NSEG   = 65536,
  parameter int unsigned NRPM   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  // packets in
  input  logic              in_valid,
  output logic              in_ready,
  input  beat_t             in_beat,
  // classification results, one per packet, in arrival order
  input  logic              cls_valid,
  output logic              cls_ready,
  input  logic              cls_drop,
  input  flow_t             cls_flow,
  // scheduler
  output logic              sq_enq_valid,
  input  logic              sq_enq_ready,
  output flow_t             sq_enq_flow,
  input  logic              sq_deq_valid,
  output logic              sq_deq_ready,
  input  flow_t             sq_deq_flow,
  input  logic [1:0]        sq_deq_dest,
  // header segments to the RPMs
  output logic [NRPM-1:0]   rpm_valid,
  input  logic [NRPM-1:0]   rpm_ready,
  output beat_t             rpm_beat,
  output rpm_tag_t          rpm_tag,
  // modified segments back from the RPMs
  input  logic [NRPM-1:0]   ret_valid,
  output logic [NRPM-1:0]   ret_ready,
  input  beat_t             ret_beat   [NRPM],
  input  rpm_tag_t          ret_tag    [NRPM],
  input  logic [NRPM-1:0]   ret_accept,
  // packets out
  output logic              out_valid,
  input  logic              out_ready,
  output beat_t             out_beat,
  // statistics
  output logic [31:0]       st_in, st_cls_drop, st_rejected, st_out,
  output logic [31:0]       st_to_rpm [NRPM],
  output logic [$clog2(NSEG):0] free_cnt
);

  localparam int unsigned SW = $clog2(NSEG);
  localparam int unsigned FW = $clog2(NFLOWS);
  localparam int unsigned RW = (NRPM > 1) ? $clog2(NRPM) : 1;
  localparam int unsigned NINIT = (NSEG > NFLOWS) ? NSEG : NFLOWS;

  typedef logic [SW-1:0] seg_t;

  typedef struct packed {
    seg_t             first;
    seg_t             last;
    logic [LEN_W-1:0] len;
  } pend_t;

  typedef struct packed {
    logic             drop;
    seg_t             first;
    seg_t             last;
    logic [LEN_W-1:0] len;
    flow_t            flow;
  } job_t;

  // ---------------- memories ----------------
  word_t            seg_mem  [NSEG*SEG_WORDS];
  seg_t             seg_next [NSEG];
  seg_t             pkt_next [NSEG];
  seg_t             pkt_last [NSEG];
  logic [LEN_W-1:0] pkt_len  [NSEG];
  seg_t             f_head   [NFLOWS];
  seg_t             f_tail   [NFLOWS];
  logic [15:0]      f_cnt    [NFLOWS];
  logic             f_busy   [NFLOWS];

  seg_t             free_head;
  logic             rt_job;     // return engine queues a packet this cycle
  logic [$clog2(NINIT):0] init_idx;

  function automatic logic [SW+2:0] waddr(input seg_t s, input logic [2:0] w);
    return {s, w};
  endfunction

  function automatic logic [LEN_W-1:0] nseg_of(input logic [LEN_W-1:0] len);
    return (len + LEN_W'(SEG_BYTES - 1)) >> $clog2(SEG_BYTES);
  endfunction

  // ---------------- input engine ----------------
  seg_t             ie_cur, ie_first;
  logic [2:0]       ie_widx;
  logic [LEN_W-1:0] ie_len;
  logic             ie_need_alloc, ie_fire, ie_alloc;
  logic             pend_in_ready, pend_valid, pend_pop;
  pend_t            pend_in, pend_out;
  logic [$bits(pend_t)-1:0] pend_raw;

  assign ie_need_alloc = in_beat.sop || (ie_widx == 3'd0);
  assign in_ready      = init_done && pend_in_ready && (!ie_need_alloc || free_cnt != 0);
  assign ie_fire       = in_valid && in_ready;
  assign ie_alloc      = ie_fire && ie_need_alloc;

  assign pend_in.first = in_beat.sop ? free_head : ie_first;
  assign pend_in.last  = ie_need_alloc ? free_head : ie_cur;
  assign pend_in.len   = (in_beat.sop ? '0 : ie_len) + LEN_W'(in_beat.nbytes);

  sync_fifo #(.W($bits(pend_t)), .DEPTH(8)) u_pend (
    .clk, .rst_n,
    .in_valid(ie_fire && in_beat.eop), .in_ready(pend_in_ready), .in_data(pend_in),
    .out_valid(pend_valid), .out_ready(pend_pop), .out_data(pend_raw), .count()
  );
  assign pend_out = pend_t'(pend_raw);

  // ---------------- transmit job queue ----------------
  logic  job_in_valid, job_in_ready, job_valid, job_pop;
  job_t  job_in, job;
  logic [$bits(job_t)-1:0] job_raw;

  sync_fifo #(.W($bits(job_t)), .DEPTH(8)) u_jobs (
    .clk, .rst_n,
    .in_valid(job_in_valid), .in_ready(job_in_ready), .in_data(job_in),
    .out_valid(job_valid), .out_ready(job_pop), .out_data(job_raw), .count()
  );
  assign job = job_t'(job_raw);

  // ---------------- transmit engine ----------------
  typedef enum logic [1:0] {T_IDLE, T_SEND, T_FREE, T_DONE} tstate_e;
  tstate_e          ts;
  job_t             tj;
  seg_t             t_cur;
  logic [2:0]       t_widx;
  logic [LEN_W-1:0] t_left;      // bytes still to send
  logic             t_free_go, t_done_go, t_enq;

  assign job_pop   = (ts == T_IDLE) && job_valid;
  assign out_valid = (ts == T_SEND);
  always_comb begin
    out_beat.data   = seg_mem[waddr(t_cur, t_widx)];
    out_beat.sop    = (t_left == tj.len);
    out_beat.eop    = (t_left <= LEN_W'(BUS_BYTES));
    out_beat.nbytes = out_beat.eop ? t_left[3:0] : 4'd8;
  end
  assign t_free_go = (ts == T_FREE) && !ie_alloc;
  assign t_enq     = (ts == T_DONE) && (f_cnt[FW'(tj.flow)] != 0);
  assign t_done_go = (ts == T_DONE) && (!t_enq || sq_enq_ready);

  // ---------------- service engine ----------------
  typedef enum logic [1:0] {S_IDLE, S_SEND} sstate_e;
  sstate_e          ss;
  seg_t             s_first, s_cur;
  flow_t            s_flow;
  logic [LEN_W-1:0] s_len;
  logic [4:0]       s_idx, s_nbeats;
  logic [RW-1:0]    s_rpm, rr_rpm;
  logic             sv_pop, sv_job;
  seg_t             hd_first;
  logic [LEN_W-1:0] hd_len;
  logic [4:0]       hd_nbeats;
  logic [RW-1:0]    pick;
  logic             pick_ok;

  assign hd_first  = f_head[FW'(sq_deq_flow)];
  assign hd_len    = pkt_len[hd_first];
  // beats sent to the RPM: whole words of the first one or two segments
  always_comb begin
    logic [LEN_W-1:0] words;
    words     = (hd_len + LEN_W'(BUS_BYTES - 1)) >> 3;
    hd_nbeats = (words > LEN_W'(HDR_WORDS)) ? 5'(HDR_WORDS) : words[4:0];
  end

  always_comb begin
    int unsigned r;
    r       = 0;
    pick_ok = 1'b0;
    pick    = rr_rpm;
    for (int k = 0; k < NRPM; k++) begin
      r = (int'(rr_rpm) + k) % NRPM;
      if (!pick_ok && rpm_ready[r]) begin
        pick_ok = 1'b1;
        pick    = RW'(r);
      end
    end
  end

  // the transmit engine's completion goes first, then the service engine
  assign sv_job       = (sq_deq_dest != 2'd1);
  assign sv_pop       = (ss == S_IDLE) && sq_deq_valid && !t_done_go &&
                        (sv_job ? (job_in_ready && !rt_job) : pick_ok);
  assign sq_deq_ready = sv_pop;

  always_comb begin
    rpm_valid = '0;
    if (ss == S_SEND) rpm_valid[s_rpm] = 1'b1;
    rpm_beat.data   = seg_mem[waddr(s_cur, s_idx[2:0])];
    rpm_beat.sop    = (s_idx == 5'd0);
    rpm_beat.eop    = (s_idx == s_nbeats - 5'd1);
    rpm_beat.nbytes = (rpm_beat.eop && (s_len <= LEN_W'({s_nbeats, 3'b000})) && s_len[2:0] != 3'd0)
                      ? {1'b0, s_len[2:0]} : 4'd8;
    rpm_tag         = '0;
    rpm_tag.len     = s_len;
    rpm_tag.seg     = 16'(s_first);
    rpm_tag.flow    = s_flow;
  end

  // ---------------- return engine ----------------
  logic          rt_lock;
  logic [RW-1:0] rt_sel, rt_cur;
  logic [4:0]    rt_idx;
  logic          rt_any;
  beat_t         rb;
  rpm_tag_t      rtag;
  seg_t          rt_seg;

  always_comb begin
    rt_any = 1'b0;
    rt_sel = rt_cur;
    if (rt_lock) begin
      rt_any = ret_valid[rt_cur];
    end else begin
      for (int r = 0; r < NRPM; r++)
        if (!rt_any && ret_valid[r]) begin
          rt_any = 1'b1;
          rt_sel = RW'(r);
        end
    end
    rb   = ret_beat[rt_sel];
    rtag = ret_tag[rt_sel];
    rt_seg = (rt_idx < 5'(SEG_WORDS)) ? seg_t'(rtag.seg) : seg_next[seg_t'(rtag.seg)];
  end
  // the last beat also queues the packet; it waits for room in the job queue
  assign rt_job = rt_any && rb.eop;
  always_comb begin
    ret_ready = '0;
    if (rt_any && (!rb.eop || job_in_ready)) ret_ready[rt_sel] = 1'b1;
  end

  always_comb begin
    job_in_valid = 1'b0;
    job_in       = '0;
    if (rt_job && job_in_ready) begin
      job_in_valid = 1'b1;
      job_in.drop  = !ret_accept[rt_sel];
      job_in.first = seg_t'(rtag.seg);
      job_in.last  = pkt_last[seg_t'(rtag.seg)];
      job_in.len   = rtag.len;
      job_in.flow  = rtag.flow;
    end else if (sv_pop && sv_job) begin
      job_in_valid = 1'b1;
      job_in.drop  = 1'b0;
      job_in.first = hd_first;
      job_in.last  = pkt_last[hd_first];
      job_in.len   = hd_len;
      job_in.flow  = sq_deq_flow;
    end
  end

  // ---------------- linker ----------------
  logic lk_go, lk_free, lk_enq;
  logic lk_empty;
  assign lk_empty  = (f_cnt[FW'(cls_flow)] == 0);
  assign lk_enq    = !cls_drop && lk_empty && !f_busy[FW'(cls_flow)];
  assign lk_go     = pend_valid && cls_valid && !t_done_go && !sv_pop &&
                     (cls_drop ? (!ie_alloc && !t_free_go) : (!lk_enq || (sq_enq_ready && !t_enq)));
  assign lk_free   = lk_go && cls_drop;
  assign pend_pop  = lk_go;
  assign cls_ready = lk_go;

  assign sq_enq_valid = t_enq || (lk_go && lk_enq);
  assign sq_enq_flow  = t_enq ? tj.flow : cls_flow;

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    // packet memory writes: input engine and return engine
    if (ie_fire)
      seg_mem[waddr(ie_need_alloc ? free_head : ie_cur, ie_widx)] <= in_beat.data;
    if (rt_any && ret_ready[rt_sel])
      seg_mem[waddr(rt_seg, rt_idx[2:0])] <= rb.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done  <= 1'b0;
      init_idx   <= '0;
      free_head  <= '0;
      free_cnt   <= '0;
      ie_cur     <= '0;
      ie_first   <= '0;
      ie_widx    <= '0;
      ie_len     <= '0;
      ts         <= T_IDLE;
      tj         <= '0;
      t_cur      <= '0;
      t_widx     <= '0;
      t_left     <= '0;
      ss         <= S_IDLE;
      s_first    <= '0;
      s_cur      <= '0;
      s_flow     <= '0;
      s_len      <= '0;
      s_idx      <= '0;
      s_nbeats   <= '0;
      s_rpm      <= '0;
      rr_rpm     <= '0;
      rt_lock    <= 1'b0;
      rt_cur     <= '0;
      rt_idx     <= '0;
      st_in      <= '0;
      st_cls_drop <= '0;
      st_rejected <= '0;
      st_out     <= '0;
      for (int r = 0; r < NRPM; r++) st_to_rpm[r] <= '0;
    end else if (!init_done) begin
      // ---- initialisation sweep ----
      if (init_idx < ($clog2(NINIT)+1)'(NSEG)) seg_next[SW'(init_idx)] <= SW'(init_idx + 1'b1);
      if (init_idx < ($clog2(NINIT)+1)'(NFLOWS)) begin
        f_cnt[FW'(init_idx)]  <= '0;
        f_busy[FW'(init_idx)] <= 1'b0;
      end
      init_idx <= init_idx + 1'b1;
      if (init_idx == ($clog2(NINIT)+1)'(NINIT - 1)) begin
        init_done <= 1'b1;
        free_head <= '0;
        free_cnt  <= ($clog2(NSEG)+1)'(NSEG);
      end
    end else begin
      // ---- input engine ----
      if (ie_fire) begin
        st_in <= st_in + (in_beat.eop ? 32'd1 : 32'd0);
        if (ie_need_alloc) begin
          if (!in_beat.sop) seg_next[ie_cur] <= free_head;
          ie_cur <= free_head;
        end
        if (in_beat.sop) ie_first <= free_head;
        ie_widx <= ie_widx + 3'd1;
        ie_len  <= pend_in.len;
        if (in_beat.eop) ie_widx <= '0;
      end

      // ---- free list: allocation and the return of whole chains ----
      begin
        seg_t             f_first, f_last;
        logic [LEN_W-1:0] f_len;
        logic             do_free;
        do_free = t_free_go || lk_free;
        f_first = t_free_go ? tj.first : pend_out.first;
        f_last  = t_free_go ? tj.last  : pend_out.last;
        f_len   = t_free_go ? tj.len   : pend_out.len;
        if (ie_alloc) begin
          free_head <= seg_next[free_head];
        end else if (do_free) begin
          seg_next[f_last] <= free_head;
          free_head        <= f_first;
        end
        free_cnt <= free_cnt - ($clog2(NSEG)+1)'(ie_alloc)
                             + (do_free ? ($clog2(NSEG)+1)'(nseg_of(f_len)) : '0);
      end

      // ---- linker ----
      if (lk_go) begin
        if (cls_drop) begin
          st_cls_drop <= st_cls_drop + 32'd1;
        end else begin
          pkt_len[pend_out.first]  <= pend_out.len;
          pkt_last[pend_out.first] <= pend_out.last;
          if (!lk_empty) pkt_next[f_tail[FW'(cls_flow)]] <= pend_out.first;
          else           f_head[FW'(cls_flow)] <= pend_out.first;
          f_tail[FW'(cls_flow)] <= pend_out.first;
          f_cnt[FW'(cls_flow)]  <= f_cnt[FW'(cls_flow)] + 16'd1;
        end
      end

      // ---- service engine ----
      if (sv_pop) begin
        f_head[FW'(sq_deq_flow)] <= pkt_next[hd_first];
        f_cnt[FW'(sq_deq_flow)]  <= f_cnt[FW'(sq_deq_flow)] - 16'd1;
        f_busy[FW'(sq_deq_flow)] <= 1'b1;
        if (!sv_job) begin
          ss       <= S_SEND;
          s_first  <= hd_first;
          s_cur    <= hd_first;
          s_flow   <= sq_deq_flow;
          s_len    <= hd_len;
          s_idx    <= '0;
          s_nbeats <= hd_nbeats;
          s_rpm    <= pick;
          rr_rpm   <= (pick == RW'(NRPM - 1)) ? '0 : pick + 1'b1;
          st_to_rpm[pick] <= st_to_rpm[pick] + 32'd1;
        end
      end
      if (ss == S_SEND && rpm_ready[s_rpm]) begin
        if (rpm_beat.eop) ss <= S_IDLE;
        s_idx <= s_idx + 5'd1;
        if (s_idx[2:0] == 3'd7) s_cur <= seg_next[s_cur];
      end

      // ---- return engine ----
      if (rt_any && ret_ready[rt_sel]) begin
        if (rb.eop) begin
          rt_lock <= 1'b0;
          rt_idx  <= '0;
          if (!ret_accept[rt_sel]) st_rejected <= st_rejected + 32'd1;
        end else begin
          rt_lock <= 1'b1;
          rt_cur  <= rt_sel;
          rt_idx  <= rt_idx + 5'd1;
        end
      end

      // ---- transmit engine ----
      unique case (ts)
        T_IDLE: if (job_valid) begin
          tj     <= job;
          t_cur  <= job.first;
          t_widx <= '0;
          t_left <= job.len;
          ts     <= job.drop ? T_FREE : T_SEND;
        end
        T_SEND: if (out_ready) begin
          t_left <= t_left - LEN_W'(BUS_BYTES);
          t_widx <= t_widx + 3'd1;
          if (t_widx == 3'd7) t_cur <= seg_next[t_cur];
          if (out_beat.eop) begin
            ts     <= T_FREE;
            st_out <= st_out + 32'd1;
          end
        end
        T_FREE: if (t_free_go) ts <= T_DONE;
        T_DONE: if (t_done_go) begin
          f_busy[FW'(tj.flow)] <= 1'b0;
          ts <= T_IDLE;
        end
        default: ts <= T_IDLE;
      endcase
    end
  end

  a_free_le_nseg: assert property (@(posedge clk) disable iff (!rst_n) free_cnt <= ($clog2(NSEG)+1)'(NSEG));

endmodule

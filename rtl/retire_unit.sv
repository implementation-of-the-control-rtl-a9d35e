// retire_unit: retirement table, completion detection, commit, flush and
// frame management of the GT.
//
// The table has one entry per frame (eight), not per instruction. An entry
// follows the state list of the design description: V, O (oldest in
// thread), Y (youngest), BADDR (block address), PADDR (predicted next block
// address), RADDR (resolved next block address), RC/SC/BC (registers,
// stores, branch completed), RCOMM/SCOMM (registers, stores committed),
// E (exception) and F (flushed). This design adds TID, PV (PADDR written),
// CS (commit sent), NS (no successor will be fetched: the thread was
// stopped before the block's prediction arrived, so the block commits
// without a prediction check) and the predictor history snapshot GH used
// for training and repair. O and Y are not stored: they follow from a per-thread head
// pointer (oldest frame) and allocation pointer (next frame to use).
//
// Frames: a thread allocates frames in ring order, all eight frames in
// single-threaded mode, frames {2t, 2t+1} in SMT mode (two blocks per
// thread), so blocks of a thread are ordered by ring position.
// `alloc_frame[t]`/`alloc_ok[t]` offer thread t its next frame.
//
// Completion: RTs and DTs each send one aggregated GSN message per block
// (registers, stores, with an exception flag); the branch result arrives
// from the OPN. A block whose RADDR differs from PADDR was mispredicted: in
// that same cycle all younger blocks of the thread are flushed, `redirect`
// sends the fetch unit to RADDR and a predictor repair is queued; PADDR is
// corrected so the block can commit. An exception is taken when the
// excepting block is the oldest of its thread: it and all younger blocks
// are flushed and `exc_*` reports it. Flushed entries (F) are deallocated
// in the next cycle. The GCN flush message goes out one cycle after the
// flush. Only one flush is taken per cycle: the oldest candidate of the
// lowest-numbered thread.
//
// Commit (Figure 6 of the description): completion received in cycle 0,
// commit detected in cycle 1, the GCN commit and the predictor update sent
// in cycle 2; when both the RT and DT acknowledgements have arrived
// (cycle X), the frame is deallocated in cycle X+1. A block may be committed
// once it is complete, correctly predicted, without exception, and every
// older block of its thread has had its commit sent; one commit per cycle.
// Commit waits while the predictor's update queue is nearly full.
module retire_unit
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        smt,
  // frame allocation (fetch unit, hit/miss cycle)
  input  logic        alloc_valid,
  input  tid_t        alloc_tid,
  input  vaddr_t      alloc_baddr,
  // thread stopped through the control registers
  input  logic        stop_valid,
  input  tid_t        stop_tid,
  output frame_t      alloc_frame [NUM_THREADS],
  output logic [NUM_THREADS-1:0] alloc_ok,
  output logic [NUM_THREADS-1:0] thread_empty,
  // predicted successor of a fetched block
  input  logic        pwr_valid,
  input  frame_t      pwr_frame,
  input  vaddr_t      pwr_addr,
  input  ghist_t      pwr_ghist,
  // networks
  input  gsn_blk_t    gsn,
  input  opn_br_t     opn,
  output gcn_msg_t    gcn,
  // to the fetch unit
  output redirect_t   redirect,
  output logic        exc_valid,
  output tid_t        exc_tid,
  output vaddr_t      exc_baddr,
  output frame_mask_t exc_mask,
  // to the exit predictor
  input  logic        pred_upd_ready,
  output pred_train_t pred_upd,
  output pred_train_t pred_rep,
  // status
  output logic        dealloc_valid,
  output frame_t      dealloc_frame,
  output frame_mask_t valid_frames
);

  typedef struct packed {
    logic   v;
    tid_t   tid;
    vaddr_t baddr;
    vaddr_t paddr;
    logic   pv;
    vaddr_t raddr;
    logic   rc, sc, bc;
    logic   rcomm, scomm;
    logic   e;
    logic   f;
    logic   cs;
    logic   ns;
    ghist_t gh;
  } rt_ent_t;

  rt_ent_t tbl [NUM_FRAMES];
  frame_t  head [NUM_THREADS];   // oldest frame of the thread
  frame_t  nxt  [NUM_THREADS];   // next frame the thread allocates
  logic    smt_q;

  function automatic frame_t ring_base(input int t, input logic m);
    return m ? frame_t'(2 * t) : frame_t'(0);
  endfunction

  // ---- derived O / Y, frame offer ----
  logic [NUM_FRAMES-1:0] live, oldest;
  always_comb begin
    for (int f = 0; f < NUM_FRAMES; f++) begin
      live[f]     = tbl[f].v && !tbl[f].f;
      oldest[f]   = live[f] && (frame_t'(f) == head[tbl[f].tid]);
    end
    for (int t = 0; t < NUM_THREADS; t++) begin
      alloc_frame[t]  = nxt[t];
      alloc_ok[t]     = !tbl[nxt[t]].v && (smt_q || t == 0);
      thread_empty[t] = 1'b1;
      for (int f = 0; f < NUM_FRAMES; f++)
        if (live[f] && tbl[f].tid == tid_t'(t)) thread_empty[t] = 1'b0;
    end
    valid_frames = live;
  end

  // ---- flush detection ----
  logic        fl_valid, fl_exc;
  frame_t      fl_frame;
  tid_t        fl_tid;
  frame_mask_t fl_mask;
  always_comb begin
    logic [TID_W+FRAME_W:0] best, key;
    fl_valid = 1'b0;
    fl_exc   = 1'b0;
    fl_frame = '0;
    fl_tid   = '0;
    best     = '1;
    for (int f = 0; f < NUM_FRAMES; f++) begin
      logic mis, ex;
      mis = live[f] && tbl[f].bc && tbl[f].pv && !tbl[f].e && (tbl[f].raddr != tbl[f].paddr);
      ex  = live[f] && tbl[f].e && oldest[f] && !tbl[f].cs;
      key = {1'b0, tbl[f].tid, ring_age(frame_t'(f), head[tbl[f].tid], smt_q)};
      if ((mis || ex) && key < best) begin
        best     = key;
        fl_valid = 1'b1;
        fl_exc   = ex;
        fl_frame = frame_t'(f);
        fl_tid   = tbl[f].tid;
      end
    end
    fl_mask = '0;
    for (int g = 0; g < NUM_FRAMES; g++) begin
      frame_t ag, af;
      ag = ring_age(frame_t'(g), head[fl_tid], smt_q);
      af = ring_age(fl_frame, head[fl_tid], smt_q);
      if (fl_valid && live[g] && tbl[g].tid == fl_tid &&
          ((ag > af) || (fl_exc && ag == af)))
        fl_mask[g] = 1'b1;
    end
  end

  assign redirect.valid = fl_valid && !fl_exc;
  assign redirect.tid   = fl_tid;
  assign redirect.addr  = tbl[fl_frame].raddr;
  assign redirect.mask  = fl_mask;
  assign exc_valid      = fl_valid && fl_exc;
  assign exc_tid        = fl_tid;
  assign exc_baddr      = tbl[fl_frame].baddr;
  assign exc_mask       = fl_mask;

  // ---- commit detection (cycle 1 of Figure 6) ----
  logic   cm_valid;
  frame_t cm_frame;
  always_comb begin
    cm_valid = 1'b0;
    cm_frame = '0;
    for (int f = NUM_FRAMES - 1; f >= 0; f--) begin
      if (live[f] && !fl_mask[f] && tbl[f].rc && tbl[f].sc && tbl[f].bc &&
          (tbl[f].ns || (tbl[f].pv && tbl[f].raddr == tbl[f].paddr)) && !tbl[f].e && !tbl[f].cs &&
          (oldest[f] || tbl[ring_pred(frame_t'(f), smt_q)].cs) && pred_upd_ready) begin
        cm_valid = 1'b1;
        cm_frame = frame_t'(f);
      end
    end
  end

  // ---- deallocation: oldest committed block of a thread, or a flushed one ----
  logic [NUM_FRAMES-1:0] dealloc_cm, dealloc_fl;
  always_comb begin
    for (int f = 0; f < NUM_FRAMES; f++) begin
      dealloc_cm[f] = oldest[f] && tbl[f].cs && tbl[f].rcomm && tbl[f].scomm;
      dealloc_fl[f] = tbl[f].v && tbl[f].f;
    end
    dealloc_valid = 1'b0;
    dealloc_frame = '0;
    for (int f = NUM_FRAMES - 1; f >= 0; f--)
      if (dealloc_cm[f]) begin
        dealloc_valid = 1'b1;
        dealloc_frame = frame_t'(f);
      end
  end

  // ---- state update ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NUM_FRAMES; f++) tbl[f] <= '0;
      for (int t = 0; t < NUM_THREADS; t++) begin
        head[t] <= '0;
        nxt[t]  <= '0;
      end
      smt_q    <= 1'b0;
      gcn      <= '0;
      pred_upd <= '0;
      pred_rep <= '0;
    end else begin
      smt_q <= smt;
      if (smt != smt_q) begin
        // Mode change (only while the core is idle): restart every ring.
        for (int t = 0; t < NUM_THREADS; t++) begin
          head[t] <= ring_base(t, smt);
          nxt[t]  <= ring_base(t, smt);
        end
      end

      // completion and acknowledgement messages for live frames
      if (gsn.reg_done && live[gsn.reg_frame]) begin
        tbl[gsn.reg_frame].rc <= 1'b1;
        if (gsn.reg_exc) tbl[gsn.reg_frame].e <= 1'b1;
      end
      if (gsn.st_done && live[gsn.st_frame]) begin
        tbl[gsn.st_frame].sc <= 1'b1;
        if (gsn.st_exc) tbl[gsn.st_frame].e <= 1'b1;
      end
      if (opn.valid && live[opn.frame]) begin
        tbl[opn.frame].bc    <= 1'b1;
        tbl[opn.frame].raddr <= opn.target;
        if (opn.exc) tbl[opn.frame].e <= 1'b1;
      end
      if (gsn.reg_ack && live[gsn.reg_ack_frame]) tbl[gsn.reg_ack_frame].rcomm <= 1'b1;
      if (gsn.st_ack  && live[gsn.st_ack_frame])  tbl[gsn.st_ack_frame].scomm  <= 1'b1;
      if (pwr_valid && live[pwr_frame] && !fl_mask[pwr_frame]) begin
        tbl[pwr_frame].paddr <= pwr_addr;
        tbl[pwr_frame].gh    <= pwr_ghist;
        tbl[pwr_frame].pv    <= 1'b1;
      end
      // a stopped thread fetches no successor: its youngest block, whose
      // prediction was dropped, commits without a prediction check
      if (stop_valid)
        for (int f = 0; f < NUM_FRAMES; f++)
          if (live[f] && tbl[f].tid == stop_tid && !tbl[f].pv &&
              !(pwr_valid && pwr_frame == frame_t'(f)))
            tbl[f].ns <= 1'b1;

      // commit: GCN commit and predictor update go out in the next cycle
      gcn.commit       <= cm_valid;
      gcn.commit_frame <= cm_frame;
      pred_upd.valid   <= cm_valid;
      pred_upd.tid     <= tbl[cm_frame].tid;
      pred_upd.baddr   <= tbl[cm_frame].baddr;
      pred_upd.target  <= tbl[cm_frame].raddr;
      pred_upd.ghist   <= tbl[cm_frame].gh;
      if (cm_valid) tbl[cm_frame].cs <= 1'b1;

      // flush
      gcn.flush      <= fl_valid && (fl_mask != '0);
      gcn.flush_mask <= fl_mask;
      pred_rep.valid  <= fl_valid && !fl_exc;
      pred_rep.tid    <= fl_tid;
      pred_rep.baddr  <= tbl[fl_frame].baddr;
      pred_rep.target <= tbl[fl_frame].raddr;
      pred_rep.ghist  <= tbl[fl_frame].gh;
      if (fl_valid) begin
        for (int g = 0; g < NUM_FRAMES; g++)
          if (fl_mask[g]) tbl[g].f <= 1'b1;
        if (fl_exc) begin
          nxt[fl_tid] <= fl_frame;
        end else begin
          nxt[fl_tid] <= ring_succ(fl_frame, smt_q);
          tbl[fl_frame].paddr <= tbl[fl_frame].raddr;
        end
      end

      // deallocation
      for (int f = 0; f < NUM_FRAMES; f++) begin
        if (dealloc_fl[f]) tbl[f].v <= 1'b0;
      end
      if (dealloc_valid) begin
        tbl[dealloc_frame].v        <= 1'b0;
        head[tbl[dealloc_frame].tid] <= ring_succ(dealloc_frame, smt_q);
      end

      // allocation of a new block in the thread's next frame
      if (alloc_valid) begin
        tbl[nxt[alloc_tid]] <= '{v: 1'b1, tid: alloc_tid, baddr: alloc_baddr,
                                 paddr: '0, pv: 1'b0, raddr: '0, rc: 1'b0,
                                 sc: 1'b0, bc: 1'b0, rcomm: 1'b0, scomm: 1'b0,
                                 e: 1'b0, f: 1'b0, cs: 1'b0, ns: 1'b0, gh: '0};
        nxt[alloc_tid] <= ring_succ(nxt[alloc_tid], smt_q);
      end
    end
  end

  // The fetch unit allocates only a free frame and never for a thread that
  // is being flushed in the same cycle.
  // Assertions are enabled by a flag set after reset, so that rst_n is
  // only ever used as an asynchronous reset.
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;

  a_alloc_free: assert property (@(posedge clk) disable iff (!chk_en)
    alloc_valid |-> alloc_ok[alloc_tid] && !(fl_valid && fl_tid == alloc_tid));

endmodule

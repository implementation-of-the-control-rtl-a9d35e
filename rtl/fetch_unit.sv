// fetch_unit: block fetch pipeline of the GT, with the per-thread program
// counters, the ITLB and the I-cache directory.
//
// A block is fetched through four steps (Figures 4 and 5 of the design
// description):
//   address select  a thread whose next block address is known is chosen;
//   TLB cycle       ITLB translation and I-cache directory read;
//   hit/miss cycle  tag compare; on a hit a frame is allocated in the
//                   retirement table; on a miss a refill is started (the GRN
//                   command leaves in the next cycle) and the thread waits;
//   fetch slots     eight cycles on the GDN; the command (block address,
//                   frame, I-cache set/way, update flag) goes out in slot 0.
// While a block is in its fetch slots, the exit predictor predicts its
// successor (3 cycles from slot 0). The next block's address select is held
// until slot 5 of the current fetch, so its slot 0 follows slot 7 directly:
// one block every eight cycles (128 instructions / 8 cycles = 16 per cycle).
// When the fetch engine is idle, address select shares the cycle with the
// last predictor stage (cycle 2 of Figure 5); when it is busy, address
// select is a cycle of its own after the prediction, so a prediction
// delayed by a predictor update makes a bubble (the description's example:
// predict from cycle 8 makes the second fetch start in cycle 14).
//
// Refills: when the ITs report a refill complete, the waiting thread gets a
// frame in that same cycle and its fetch starts in the next (Figure 4,
// cycles X and X+1); that fetch carries the update flag, which makes the
// ITs copy the fill buffer into the I-cache, and the directory entry is
// written at the same time. A block of a segment that is not L1-cacheable
// is refilled and fetched from the fill buffer without an update.
//
// Redirects: a misprediction redirect from the retire unit kills the
// thread's work in every stage (front stages, pending prediction, its
// fetch if its frame is flushed, a pending refill is cancelled) and its
// address select happens in the same cycle, so the new fetch starts three
// cycles after the flush. An exception halts the thread. An ITLB miss or
// protection violation holds the thread; it is reported on `fault_*` once
// no older block of the thread is in flight (it may be on a wrong path),
// and the thread halts.
//
// Control: `start_*` loads a thread's PC and starts it, `stop_*` halts it,
// `smt` selects SMT mode (four threads, two frames each) or single-threaded
// mode (thread 0, eight frames). Threads are picked round-robin.
// The pipeline shape and cycle positions follow the description; the
// thread states, the arbitration and the exact merge/stall rules are this
// design's own, chosen to reproduce the printed timings.
module fetch_unit
  import gt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // control registers
  input  logic        smt,
  input  logic        start_valid,
  input  tid_t        start_tid,
  input  vaddr_t      start_pc,
  input  logic        stop_valid,
  input  tid_t        stop_tid,
  input  logic        tlb_wr_valid,
  input  tlb_idx_t    tlb_wr_idx,
  input  tlb_entry_t  tlb_wr_entry,
  // exit predictor
  output logic        pred_req_valid,
  input  logic        pred_req_ready,
  output tid_t        pred_req_tid,
  output vaddr_t      pred_req_baddr,
  input  logic        pred_resp_valid,
  input  tid_t        pred_resp_tid,
  input  vaddr_t      pred_resp_target,
  input  ghist_t      pred_resp_ghist,
  // retire unit
  output logic        alloc_valid,
  output tid_t        alloc_tid,
  output vaddr_t      alloc_baddr,
  input  frame_t      alloc_frame [NUM_THREADS],
  input  logic [NUM_THREADS-1:0] alloc_ok,
  input  logic [NUM_THREADS-1:0] thread_empty,
  output logic        pwr_valid,
  output frame_t      pwr_frame,
  output vaddr_t      pwr_addr,
  output ghist_t      pwr_ghist,
  input  redirect_t   redirect,
  input  logic        exc_valid,
  input  tid_t        exc_tid,
  input  frame_mask_t exc_mask,
  // refill unit
  output logic        rf_alloc_valid,
  output tid_t        rf_alloc_tid,
  output set_t        rf_alloc_set,
  output logic        rf_alloc_way,
  output paddr_t      rf_alloc_paddr,
  output logic        rf_alloc_cacheable,
  input  logic [NUM_THREADS-1:0] rf_busy,
  input  logic [NUM_THREADS-1:0] rf_done,
  input  set_t        rf_set       [NUM_THREADS],
  input  logic        rf_way       [NUM_THREADS],
  input  ptag_t       rf_ptag      [NUM_THREADS],
  input  logic        rf_cacheable [NUM_THREADS],
  input  hdr_t        rf_hdr       [NUM_THREADS],
  output logic [NUM_THREADS-1:0] rf_cancel,
  output logic [NUM_THREADS-1:0] rf_consume,
  // GDN
  output gdn_msg_t    gdn,
  output logic        fetch_busy,
  output slot_t       fetch_slot,
  // faults
  output logic        fault_valid,
  output tid_t        fault_tid,
  output vaddr_t      fault_addr,
  output logic [NUM_THREADS-1:0] thread_running
);

  typedef enum logic [2:0] {
    T_OFF, T_READY, T_FRONT, T_PRED, T_REFILL, T_FAULT
  } tstate_e;

  tstate_e st [NUM_THREADS];
  vaddr_t  pc [NUM_THREADS];
  logic [NUM_THREADS-1:0] p_pend, p_fly;
  vaddr_t  p_baddr [NUM_THREADS];
  frame_t  p_frame [NUM_THREADS];
  tid_t    rr;

  // front stages
  logic    lu_v;   tid_t lu_tid; vaddr_t lu_va;
  logic    hm_v;   tid_t hm_tid; vaddr_t hm_va; paddr_t hm_pa;
  logic    hm_tlbmiss, hm_prot, hm_ca;
  // fetch engine
  logic    eng_busy; slot_t eng_slot; frame_t eng_frame; tid_t eng_tid;

  // ---- kills ----
  logic [NUM_THREADS-1:0] kill;
  frame_mask_t kill_mask;
  always_comb begin
    kill      = '0;
    kill_mask = '0;
    if (redirect.valid) begin kill[redirect.tid] = 1'b1; kill_mask |= redirect.mask; end
    if (exc_valid)      begin kill[exc_tid]      = 1'b1; kill_mask |= exc_mask;      end
    if (stop_valid)       kill[stop_tid] = 1'b1;
  end
  logic eng_kill;
  assign eng_kill = eng_busy && kill[eng_tid] &&
                    (kill_mask[eng_frame] || (stop_valid && stop_tid == eng_tid));
  logic lu_live, hm_live;
  assign lu_live = lu_v && !kill[lu_tid];
  assign hm_live = hm_v && !kill[hm_tid];

  // ---- ITLB and directory ----
  paddr_t tlb_pa; logic tlb_miss, tlb_prot, tlb_ca;
  itlb u_itlb (
    .clk, .rst_n,
    .wr_valid (tlb_wr_valid), .wr_idx (tlb_wr_idx), .wr_entry (tlb_wr_entry),
    .lk_vaddr (lu_va), .lk_paddr (tlb_pa), .lk_miss (tlb_miss),
    .lk_prot (tlb_prot), .lk_cacheable (tlb_ca)
  );

  logic   d_hit, d_hit_way, d_victim;
  hdr_t   d_hdr;
  logic   touch_v, dwr_v;
  set_t   touch_set, dwr_set;
  logic   touch_way, dwr_way;
  ptag_t  dwr_ptag;
  hdr_t   dwr_hdr;
  icache_dir u_dir (
    .clk, .rst_n,
    .lk_valid (lu_v), .lk_set (lu_va[CHUNK_OFF +: SET_W]),
    .cmp_ptag (hm_pa[PA_W-1:CHUNK_OFF]),
    .hit (d_hit), .hit_way (d_hit_way), .hit_hdr (d_hdr), .victim_way (d_victim),
    .touch_valid (touch_v), .touch_set (touch_set), .touch_way (touch_way),
    .wr_valid (dwr_v), .wr_set (dwr_set), .wr_way (dwr_way),
    .wr_ptag (dwr_ptag), .wr_hdr (dwr_hdr)
  );

  // ---- hit/miss stage, fed by the TLB stage or by a finished refill ----
  logic eng_free_next;
  assign eng_free_next = !eng_busy || eng_slot == slot_t'(FETCH_SLOTS - 1) || eng_kill;

  logic rf_pick_v; tid_t rf_pick;
  always_comb begin
    rf_pick_v = 1'b0;
    rf_pick   = '0;
    for (int i = NUM_THREADS - 1; i >= 0; i--)
      if (st[i] == T_REFILL && rf_done[i] && !kill[i]) begin
        rf_pick_v = 1'b1;
        rf_pick   = tid_t'(i);
      end
  end
  logic use_rf;
  assign use_rf = !hm_v && rf_pick_v;

  logic   start_v;          // a block enters its fetch slots next cycle
  tid_t   start_tid_w;
  gdn_msg_t start_cmd;
  logic   hm_fault, hm_refill;
  always_comb begin
    start_v = 1'b0; start_tid_w = '0; start_cmd = '0;
    hm_fault = 1'b0; hm_refill = 1'b0;
    touch_v = 1'b0; touch_set = '0; touch_way = 1'b0;
    dwr_v = 1'b0; dwr_set = '0; dwr_way = 1'b0; dwr_ptag = '0; dwr_hdr = '0;
    rf_consume = '0;
    rf_alloc_valid = 1'b0; rf_alloc_tid = hm_tid; rf_alloc_set = hm_va[CHUNK_OFF +: SET_W];
    rf_alloc_way = d_victim; rf_alloc_paddr = hm_pa; rf_alloc_cacheable = hm_ca;
    if (hm_live) begin
      if (hm_tlbmiss || hm_prot) begin
        hm_fault = 1'b1;
      end else if (d_hit && hm_ca) begin
        if (alloc_ok[hm_tid] && eng_free_next) begin
          start_v     = 1'b1;
          start_tid_w = hm_tid;
          start_cmd   = '{valid: 1'b1, frame: alloc_frame[hm_tid], tid: hm_tid,
                          vaddr: hm_va, paddr: hm_pa, set: hm_va[CHUNK_OFF +: SET_W],
                          way: d_hit_way, update: 1'b0, from_fill: 1'b0, hdr: d_hdr};
          touch_v   = 1'b1;
          touch_set = hm_va[CHUNK_OFF +: SET_W];
          touch_way = d_hit_way;
        end
      end else if (!rf_busy[hm_tid]) begin
        hm_refill      = 1'b1;
        rf_alloc_valid = 1'b1;
      end
    end else if (use_rf) begin
      if (alloc_ok[rf_pick] && eng_free_next) begin
        start_v     = 1'b1;
        start_tid_w = rf_pick;
        start_cmd   = '{valid: 1'b1, frame: alloc_frame[rf_pick], tid: rf_pick,
                        vaddr: pc[rf_pick], paddr: {rf_ptag[rf_pick], {CHUNK_OFF{1'b0}}},
                        set: rf_set[rf_pick], way: rf_way[rf_pick],
                        update: rf_cacheable[rf_pick], from_fill: 1'b1,
                        hdr: rf_hdr[rf_pick]};
        rf_consume[rf_pick] = 1'b1;
        if (rf_cacheable[rf_pick]) begin
          dwr_v    = 1'b1;
          dwr_set  = rf_set[rf_pick];
          dwr_way  = rf_way[rf_pick];
          dwr_ptag = rf_ptag[rf_pick];
          dwr_hdr  = rf_hdr[rf_pick];
        end
      end
    end
  end
  logic hm_stall;
  assign hm_stall = hm_live && !start_v && !hm_fault && !hm_refill;

  assign alloc_valid = start_v;
  assign alloc_tid   = start_tid_w;
  assign alloc_baddr = start_cmd.vaddr;

  // ---- address select ----
  logic front_free, eng_free3, eng_idle;
  assign eng_idle   = !eng_busy || eng_kill;
  assign eng_free3  = eng_idle || eng_slot >= slot_t'(FETCH_SLOTS - 3);
  // A thread whose refill has finished has priority over new blocks: no new
  // block enters the front end until the hit/miss stage is free for it.
  assign front_free = !lu_live && !(hm_live && hm_stall) && !rf_pick_v;

  logic   merge_ok;
  assign merge_ok = pred_resp_valid && st[pred_resp_tid] == T_PRED &&
                    p_fly[pred_resp_tid] && !kill[pred_resp_tid];

  logic [NUM_THREADS-1:0] cand;
  vaddr_t cand_addr [NUM_THREADS];
  always_comb begin
    for (int t = 0; t < NUM_THREADS; t++) begin
      cand[t]      = 1'b0;
      cand_addr[t] = pc[t];
      if (redirect.valid && redirect.tid == tid_t'(t) && st[t] != T_OFF &&
          !(stop_valid && stop_tid == tid_t'(t))) begin
        cand[t]      = 1'b1;
        cand_addr[t] = redirect.addr;
      end else if (!kill[t] && st[t] == T_READY) begin
        cand[t] = 1'b1;
      end else if (!kill[t] && merge_ok && pred_resp_tid == tid_t'(t) && eng_idle) begin
        cand[t]      = 1'b1;
        cand_addr[t] = pred_resp_target;
      end
    end
  end

  logic asel_v; tid_t asel_tid;
  always_comb begin
    tid_t t;
    asel_v   = 1'b0;
    asel_tid = '0;
    t        = '0;
    if (front_free && eng_free3) begin
      for (int k = NUM_THREADS - 1; k >= 0; k--) begin
        t = rr + tid_t'(k);
        if (cand[t] && (smt || t == '0)) begin
          asel_v   = 1'b1;
          asel_tid = t;
        end
      end
    end
  end

  // ---- predictor request ----
  always_comb begin
    pred_req_valid = 1'b0;
    pred_req_tid   = '0;
    for (int t = NUM_THREADS - 1; t >= 0; t--)
      if (p_pend[t] && !kill[t]) begin
        pred_req_valid = 1'b1;
        pred_req_tid   = tid_t'(t);
      end
    pred_req_baddr = p_baddr[pred_req_tid];
  end

  assign pwr_valid = merge_ok;
  assign pwr_frame = p_frame[pred_resp_tid];
  assign pwr_addr  = pred_resp_target;
  assign pwr_ghist = pred_resp_ghist;

  // refills of killed threads are cancelled
  always_comb
    for (int t = 0; t < NUM_THREADS; t++)
      rf_cancel[t] = kill[t] && st[t] == T_REFILL;

  // ---- faults ----
  logic ft_v; tid_t ft_tid;
  always_comb begin
    ft_v = 1'b0; ft_tid = '0;
    for (int t = NUM_THREADS - 1; t >= 0; t--)
      if (st[t] == T_FAULT && !kill[t] && thread_empty[t]) begin
        ft_v = 1'b1; ft_tid = tid_t'(t);
      end
  end
  assign fault_valid = ft_v;
  assign fault_tid   = ft_tid;
  assign fault_addr  = pc[ft_tid];

  assign fetch_busy = eng_busy;
  assign fetch_slot = eng_slot;
  always_comb
    for (int t = 0; t < NUM_THREADS; t++) thread_running[t] = st[t] != T_OFF;

  // ---- sequential ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++) begin
        st[t]      <= T_OFF;
        pc[t]      <= '0;
        p_baddr[t] <= '0;
        p_frame[t] <= '0;
      end
      p_pend <= '0; p_fly <= '0; rr <= '0;
      lu_v <= 1'b0; lu_tid <= '0; lu_va <= '0;
      hm_v <= 1'b0; hm_tid <= '0; hm_va <= '0; hm_pa <= '0;
      hm_tlbmiss <= 1'b0; hm_prot <= 1'b0; hm_ca <= 1'b0;
      eng_busy <= 1'b0; eng_slot <= '0; eng_frame <= '0; eng_tid <= '0;
      gdn <= '0;
    end else begin
      // fetch engine
      gdn <= start_cmd;
      if (start_v) begin
        eng_busy  <= 1'b1;
        eng_slot  <= '0;
        eng_frame <= start_cmd.frame;
        eng_tid   <= start_tid_w;
      end else if (eng_kill || (eng_busy && eng_slot == slot_t'(FETCH_SLOTS - 1))) begin
        eng_busy <= 1'b0;
      end else if (eng_busy) begin
        eng_slot <= eng_slot + slot_t'(1);
      end

      // hit/miss stage register
      if (!hm_stall) begin
        hm_v       <= lu_live;
        hm_tid     <= lu_tid;
        hm_va      <= lu_va;
        hm_pa      <= tlb_pa;
        hm_tlbmiss <= tlb_miss;
        hm_prot    <= tlb_prot;
        hm_ca      <= tlb_ca;
      end

      // TLB stage register
      lu_v   <= asel_v;
      lu_tid <= asel_tid;
      lu_va  <= cand_addr[asel_tid];
      if (asel_v) rr <= asel_tid + tid_t'(1);

      // predictor handshake
      if (pred_req_valid && pred_req_ready) begin
        p_pend[pred_req_tid] <= 1'b0;
        p_fly[pred_req_tid]  <= 1'b1;
      end
      if (pred_resp_valid) p_fly[pred_resp_tid] <= 1'b0;

      // thread states
      for (int t = 0; t < NUM_THREADS; t++) begin
        if (merge_ok && pred_resp_tid == tid_t'(t)) begin
          st[t] <= T_READY;
          pc[t] <= pred_resp_target;
        end
        if (hm_live && hm_tid == tid_t'(t)) begin
          if (hm_fault) begin
            st[t] <= T_FAULT;
            pc[t] <= hm_va;
          end else if (hm_refill) begin
            st[t] <= T_REFILL;
            pc[t] <= hm_va;
          end
        end
        if (start_v && start_tid_w == tid_t'(t)) begin
          st[t]      <= T_PRED;
          p_pend[t]  <= 1'b1;
          p_baddr[t] <= start_cmd.vaddr;
          p_frame[t] <= start_cmd.frame;
        end
        if (asel_v && asel_tid == tid_t'(t)) st[t] <= T_FRONT;
        if (ft_v && ft_tid == tid_t'(t)) st[t] <= T_OFF;
        if (kill[t]) begin
          p_pend[t] <= 1'b0;
          p_fly[t]  <= 1'b0;
          if (redirect.valid && redirect.tid == tid_t'(t) && st[t] != T_OFF) begin
            pc[t] <= redirect.addr;
            st[t] <= (asel_v && asel_tid == tid_t'(t)) ? T_FRONT : T_READY;
          end
          if ((exc_valid && exc_tid == tid_t'(t)) || (stop_valid && stop_tid == tid_t'(t)))
            st[t] <= T_OFF;
        end
        if (start_valid && start_tid == tid_t'(t)) begin
          st[t] <= T_READY;
          pc[t] <= start_pc;
        end
      end
    end
  end

  // Assertions are enabled by a flag set after reset, so that rst_n is
  // only ever used as an asynchronous reset.
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;

  a_one_block_per_slot0: assert property (@(posedge clk) disable iff (!chk_en)
    start_v |-> eng_free_next);

endmodule

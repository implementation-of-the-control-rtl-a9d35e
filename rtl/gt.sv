// gt: Global control Tile of a TRIPS-style core.
//
// The GT is the single master that sequences execution for the whole core.
// It holds the fetch unit (PCs, ITLB, I-cache directory, fetch pipeline),
// the refill unit (pending I-cache refills), the retire unit (retirement
// table, commit and flush control) and the exit predictor, wired as in the
// GT organisation of the design description (Figure 3): the fetch unit
// drives the GDN and, through the refill unit, the GRN; the retire unit
// drives the GCN; the GSN (completions, commit acknowledgements, refill
// completions) and the OPN branch results come in.
//
// The slave tiles (ITs, RTs, DTs, ETs), the network routers and the OPN
// router are outside this module: the network ports here are the messages
// the GT sends into its first network link and receives from it. All
// outgoing messages are registered; incoming ones are used in the cycle
// they arrive.
//
// Timing summary (cycle 0 = first predictor stage of a block, as in the
// description's Figure 5): address select 2, TLB/directory 3, hit/miss and
// frame allocation 4, GDN fetch slots 5..12, next block's slot 0 at 13.
// Refill: GRN command in cycle 5; fetch in the cycle after the refill
// completes. Commit: completion in cycle 0, commit detect 1, GCN commit and
// predictor update 2, deallocation the cycle after both acknowledgements.
// A misprediction flush restarts fetch three cycles later.
module gt
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
  // control networks
  output grn_msg_t    grn,
  output gdn_msg_t    gdn,
  output gcn_msg_t    gcn,
  input  gsn_msg_t    gsn,
  input  opn_br_t     opn,
  // exceptions
  output logic        exc_valid,
  output tid_t        exc_tid,
  output vaddr_t      exc_baddr,
  output logic        fault_valid,
  output tid_t        fault_tid,
  output vaddr_t      fault_addr,
  // status
  output logic        fetch_busy,
  output slot_t       fetch_slot,
  output logic [1:0]  pred_op,
  output logic        pred_busy,
  output logic        redirect_valid,
  output logic        dealloc_valid,
  output frame_t      dealloc_frame,
  output frame_mask_t valid_frames,
  output logic [NUM_THREADS-1:0] thread_running
);

  // predictor <-> fetch
  logic   pq_valid, pq_ready, pr_valid;
  tid_t   pq_tid, pr_tid;
  vaddr_t pq_baddr, pr_target;
  ghist_t pr_ghist;
  pred_train_t p_upd, p_rep;
  logic   p_upd_ready;

  // retire <-> fetch
  logic   al_valid;
  tid_t   al_tid;
  vaddr_t al_baddr;
  frame_t al_frame [NUM_THREADS];
  logic [NUM_THREADS-1:0] al_ok, th_empty;
  logic   pw_valid;
  frame_t pw_frame;
  vaddr_t pw_addr;
  ghist_t pw_ghist;
  redirect_t rdr;
  frame_mask_t ex_mask;

  // refill <-> fetch
  logic   ra_valid, ra_way, ra_ca;
  tid_t   ra_tid;
  set_t   ra_set;
  paddr_t ra_paddr;
  logic [NUM_THREADS-1:0] rf_busy, rf_done, rf_cancel, rf_consume;
  set_t   rf_set   [NUM_THREADS];
  logic   rf_way   [NUM_THREADS];
  ptag_t  rf_ptag  [NUM_THREADS];
  logic   rf_ca    [NUM_THREADS];
  hdr_t   rf_hdr   [NUM_THREADS];

  fetch_unit u_fetch (
    .clk, .rst_n, .smt,
    .start_valid, .start_tid, .start_pc, .stop_valid, .stop_tid,
    .tlb_wr_valid, .tlb_wr_idx, .tlb_wr_entry,
    .pred_req_valid (pq_valid), .pred_req_ready (pq_ready),
    .pred_req_tid (pq_tid), .pred_req_baddr (pq_baddr),
    .pred_resp_valid (pr_valid), .pred_resp_tid (pr_tid),
    .pred_resp_target (pr_target), .pred_resp_ghist (pr_ghist),
    .alloc_valid (al_valid), .alloc_tid (al_tid), .alloc_baddr (al_baddr),
    .alloc_frame (al_frame), .alloc_ok (al_ok), .thread_empty (th_empty),
    .pwr_valid (pw_valid), .pwr_frame (pw_frame), .pwr_addr (pw_addr),
    .pwr_ghist (pw_ghist),
    .redirect (rdr), .exc_valid, .exc_tid, .exc_mask (ex_mask),
    .rf_alloc_valid (ra_valid), .rf_alloc_tid (ra_tid), .rf_alloc_set (ra_set),
    .rf_alloc_way (ra_way), .rf_alloc_paddr (ra_paddr),
    .rf_alloc_cacheable (ra_ca),
    .rf_busy, .rf_done, .rf_set, .rf_way, .rf_ptag, .rf_cacheable (rf_ca),
    .rf_hdr, .rf_cancel, .rf_consume,
    .gdn, .fetch_busy, .fetch_slot,
    .fault_valid, .fault_tid, .fault_addr, .thread_running
  );

  refill_unit u_refill (
    .clk, .rst_n,
    .alloc_valid (ra_valid), .alloc_tid (ra_tid), .alloc_set (ra_set),
    .alloc_way (ra_way), .alloc_paddr (ra_paddr), .alloc_cacheable (ra_ca),
    .fill_done (gsn.fill.done), .fill_tid (gsn.fill.tid), .fill_hdr (gsn.fill.hdr),
    .cancel (rf_cancel), .consume (rf_consume),
    .busy (rf_busy), .done (rf_done),
    .ent_set (rf_set), .ent_way (rf_way), .ent_ptag (rf_ptag),
    .ent_cacheable (rf_ca), .ent_hdr (rf_hdr),
    .grn
  );

  retire_unit u_retire (
    .clk, .rst_n, .smt,
    .alloc_valid (al_valid), .alloc_tid (al_tid), .alloc_baddr (al_baddr),
    .stop_valid, .stop_tid,
    .alloc_frame (al_frame), .alloc_ok (al_ok), .thread_empty (th_empty),
    .pwr_valid (pw_valid), .pwr_frame (pw_frame), .pwr_addr (pw_addr),
    .pwr_ghist (pw_ghist),
    .gsn (gsn.blk), .opn, .gcn,
    .redirect (rdr), .exc_valid, .exc_tid, .exc_baddr, .exc_mask (ex_mask),
    .pred_upd_ready (p_upd_ready), .pred_upd (p_upd), .pred_rep (p_rep),
    .dealloc_valid, .dealloc_frame, .valid_frames
  );

  exit_predictor u_pred (
    .clk, .rst_n,
    .pred_req_valid (pq_valid), .pred_req_ready (pq_ready),
    .pred_req_tid (pq_tid), .pred_req_baddr (pq_baddr),
    .pred_resp_valid (pr_valid), .pred_resp_tid (pr_tid),
    .pred_resp_target (pr_target), .pred_resp_ghist (pr_ghist),
    .upd (p_upd), .upd_ready (p_upd_ready), .rep (p_rep),
    .busy (pred_busy), .op (pred_op)
  );

  assign redirect_valid = rdr.valid;

endmodule

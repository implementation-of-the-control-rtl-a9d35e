// refill_unit: pending I-cache refills of the GT (the GT's I-cache MSHRs).
//
// A refill brings a missing block from secondary memory into the fill
// buffers of the ITs (the "fill" step). Up to four refills may be pending,
// at most one per thread, so entry t belongs to thread t. Each entry keeps
// the state of the description's refill table: V, S (set), W (way), TID
// (implied by the entry), PTAG, F (flushed/cancelled), C (completed),
// Ca (L1 cacheable) and H (the block's meta information, returned by the
// ITs with the completion).
//
// Protocol: `alloc_*` in the hit/miss cycle creates the entry; the refill
// command goes out on the GRN in the next cycle (cycle 5 of Figure 4 of the
// description). The ITs answer with one aggregated GSN completion carrying
// the thread id. `done[t]` is high while entry t is complete and not
// cancelled, and already in the cycle the completion arrives, so that frame
// allocation can happen in that cycle and the fetch (the "update" step) in
// the next. `consume[t]` frees the entry when that fetch starts.
// `cancel[t]` (the thread was redirected) sets F: a cancelled entry stays
// busy until its completion arrives and is then dropped, its fill buffer
// contents never written into the I-cache. Entry layout and the one-thread
// slot mapping are this design's own choices.
module refill_unit
  import gt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // allocation from the fetch pipeline (hit/miss cycle)
  input  logic       alloc_valid,
  input  tid_t       alloc_tid,
  input  set_t       alloc_set,
  input  logic       alloc_way,
  input  paddr_t     alloc_paddr,
  input  logic       alloc_cacheable,
  // GSN completion from the ITs
  input  logic       fill_done,
  input  tid_t       fill_tid,
  input  hdr_t       fill_hdr,
  // control from the fetch unit
  input  logic [NUM_THREADS-1:0] cancel,
  input  logic [NUM_THREADS-1:0] consume,
  // state
  output logic [NUM_THREADS-1:0] busy,
  output logic [NUM_THREADS-1:0] done,
  output set_t       ent_set       [NUM_THREADS],
  output logic       ent_way       [NUM_THREADS],
  output ptag_t      ent_ptag      [NUM_THREADS],
  output logic       ent_cacheable [NUM_THREADS],
  output hdr_t       ent_hdr       [NUM_THREADS],
  // GRN
  output grn_msg_t   grn
);

  typedef struct packed {
    logic   v;
    set_t   s;
    logic   w;
    ptag_t  ptag;
    logic   f;
    logic   c;
    logic   ca;
    hdr_t   h;
  } refill_ent_t;

  refill_ent_t ent [NUM_THREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++) ent[t] <= '0;
      grn <= '0;
    end else begin
      grn.valid <= 1'b0;
      for (int t = 0; t < NUM_THREADS; t++) begin
        if (fill_done && fill_tid == tid_t'(t) && ent[t].v) begin
          ent[t].c <= 1'b1;
          ent[t].h <= fill_hdr;
          if (ent[t].f || cancel[t]) ent[t].v <= 1'b0;
        end
        if (cancel[t] && ent[t].v) begin
          ent[t].f <= 1'b1;
          if (ent[t].c) ent[t].v <= 1'b0;
        end
        if (consume[t]) ent[t].v <= 1'b0;
        if (alloc_valid && alloc_tid == tid_t'(t)) begin
          ent[t] <= '{v: 1'b1, s: alloc_set, w: alloc_way,
                      ptag: alloc_paddr[PA_W-1:CHUNK_OFF], f: 1'b0, c: 1'b0,
                      ca: alloc_cacheable, h: '0};
        end
      end
      if (alloc_valid) begin
        grn.valid <= 1'b1;
        grn.tid   <= alloc_tid;
        grn.paddr <= alloc_paddr;
      end
    end
  end

  always_comb begin
    for (int t = 0; t < NUM_THREADS; t++) begin
      logic arriving;
      arriving         = fill_done && fill_tid == tid_t'(t);
      busy[t]          = ent[t].v;
      done[t]          = ent[t].v && !ent[t].f && (ent[t].c || arriving);
      ent_set[t]       = ent[t].s;
      ent_way[t]       = ent[t].w;
      ent_ptag[t]      = ent[t].ptag;
      ent_cacheable[t] = ent[t].ca;
      ent_hdr[t]       = ent[t].c ? ent[t].h : fill_hdr;
    end
  end

  // At most one refill per thread: never allocate over a busy entry.
  // Assertions are enabled by a flag set after reset, so that rst_n is
  // only ever used as an asynchronous reset.
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;

  a_one_per_thread: assert property (@(posedge clk) disable iff (!chk_en)
    alloc_valid |-> !ent[alloc_tid].v);

endmodule

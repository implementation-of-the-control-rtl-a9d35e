// gt_pkg: sizes, types and message formats shared by the units of the
// Global control Tile (GT) of a TRIPS-style distributed processor core.
//
// The GT is the single master of the core. It fetches blocks of up to 128
// instructions, keeps eight block "frames" in flight and drives the control
// networks: GRN (refill), GDN (fetch/dispatch), GCN (commit/flush). Status
// comes back on the GSN and branch results on the operand network (OPN).
//
// Numbers taken from the design description: 8 frames, 4 threads (four
// refills, at most one per thread; two blocks per thread in SMT mode),
// 5 chunks of 128 bytes per block, 8 fetch slots per block, a 128-entry
// 2-way I-cache directory and 16 ITLB segment registers whose segments span
// 64 KB to 1 TB. Address widths, the header-field width and all message
// formats are this design's own choices.
package gt_pkg;

  localparam int NUM_FRAMES  = 8;
  localparam int NUM_THREADS = 4;
  localparam int FRAME_W     = $clog2(NUM_FRAMES);
  localparam int TID_W       = $clog2(NUM_THREADS);

  // Addresses. A 1 TB segment needs 40 bits; both spaces are 40 bits wide.
  localparam int VA_W        = 40;
  localparam int PA_W        = 40;
  localparam int CHUNK_BYTES = 128;
  localparam int CHUNK_OFF   = $clog2(CHUNK_BYTES);  // block addresses are chunk aligned
  localparam int BLOCK_CHUNKS = 5;                   // header + 4 instruction chunks
  localparam int BLOCK_BYTES = BLOCK_CHUNKS * CHUNK_BYTES;
  localparam int FETCH_SLOTS = 8;                    // GDN cycles per block fetch
  localparam int HDR_W       = 8;                    // meta information kept for a block

  typedef logic [$clog2(FETCH_SLOTS)-1:0] slot_t;
  typedef logic [VA_W-1:0]    vaddr_t;
  typedef logic [PA_W-1:0]    paddr_t;
  typedef logic [FRAME_W-1:0] frame_t;
  typedef logic [TID_W-1:0]   tid_t;
  typedef logic [HDR_W-1:0]   hdr_t;
  typedef logic [NUM_FRAMES-1:0] frame_mask_t;

  // I-cache directory geometry.
  localparam int DIR_ENTRIES = 128;
  localparam int DIR_WAYS    = 2;
  localparam int DIR_SETS    = DIR_ENTRIES / DIR_WAYS;
  localparam int SET_W       = $clog2(DIR_SETS);
  localparam int PTAG_W      = PA_W - CHUNK_OFF;     // whole physical block address
  typedef logic [SET_W-1:0]  set_t;
  typedef logic [PTAG_W-1:0] ptag_t;

  // Exit predictor global history length.
  localparam int GHIST_W     = 11;
  typedef logic [GHIST_W-1:0] ghist_t;

  // ITLB segment register.
  localparam int TLB_ENTRIES = 16;
  localparam int SEG_MIN_LOG2 = 16;   // 64 KB
  localparam int SEG_MAX_LOG2 = 40;   // 1 TB
  typedef struct packed {
    logic       valid;
    logic [5:0] size_log2;   // segment size is 2**size_log2 bytes, 16..40
    vaddr_t     vbase;       // virtual base, aligned to the segment size
    paddr_t     pbase;       // physical base, aligned to the segment size
    logic       rd;          // read permission
    logic       ex;          // execute permission (needed to fetch)
    logic       cacheable;   // L1 I-cacheable
  } tlb_entry_t;

  typedef logic [$clog2(TLB_ENTRIES)-1:0] tlb_idx_t;

  // Mask of the address bits inside a segment of 2**lg bytes; sizes outside
  // 64 KB .. 1 TB are clamped.
  function automatic logic [63:0] seg_mask(input logic [5:0] lg);
    logic [5:0] l;
    l = (lg < 6'(SEG_MIN_LOG2)) ? 6'(SEG_MIN_LOG2) :
        (lg > 6'(SEG_MAX_LOG2)) ? 6'(SEG_MAX_LOG2) : lg;
    return (64'd1 << l) - 64'd1;
  endfunction

  // Address of the block that follows block a in memory (fall-through).
  function automatic logic [VA_W-1:0] fall_through(input logic [VA_W-1:0] a);
    return a + (VA_W)'(BLOCK_BYTES);
  endfunction

  // ---- network messages ------------------------------------------------

  // GRN: start the fill step of a refill in every IT.
  typedef struct packed {
    logic   valid;
    tid_t   tid;
    paddr_t paddr;
  } grn_msg_t;

  // GDN: fetch command, sent in fetch slot 0 of a block.
  typedef struct packed {
    logic   valid;
    frame_t frame;
    tid_t   tid;
    vaddr_t vaddr;
    paddr_t paddr;
    set_t   set;       // I-cache set/way that holds (or will hold) the block
    logic   way;
    logic   update;    // write the IT fill buffer into the I-cache bank
    logic   from_fill; // take the instructions from the fill buffer
    hdr_t   hdr;
  } gdn_msg_t;

  // GCN: commit and flush commands. Both may be sent in the same cycle.
  typedef struct packed {
    logic        commit;
    frame_t      commit_frame;
    logic        flush;
    frame_mask_t flush_mask;
  } gcn_msg_t;

  // GSN: aggregated status messages. Block status comes from the RTs and
  // DTs, refill completions from the ITs; both share the network.
  typedef struct packed {
    logic   reg_done;     // RTs: all register outputs of a block produced
    frame_t reg_frame;
    logic   reg_exc;
    logic   st_done;      // DTs: all stores of a block produced
    frame_t st_frame;
    logic   st_exc;
    logic   reg_ack;      // RTs: register commit finished
    frame_t reg_ack_frame;
    logic   st_ack;       // DTs: store commit finished
    frame_t st_ack_frame;
  } gsn_blk_t;

  typedef struct packed {
    logic   done;         // ITs: refill (fill step) finished
    tid_t   tid;
    hdr_t   hdr;
  } gsn_fill_t;

  typedef struct packed {
    gsn_blk_t  blk;
    gsn_fill_t fill;
  } gsn_msg_t;

  // OPN: branch result of a block, delivered to the GT.
  typedef struct packed {
    logic   valid;
    frame_t frame;
    vaddr_t target;
    logic   exc;
  } opn_br_t;

  // ---- internal GT messages ---------------------------------------------

  typedef struct packed {
    logic   valid;
    tid_t   tid;
    vaddr_t baddr;
    vaddr_t target;
    ghist_t ghist;
  } pred_train_t;

  typedef struct packed {
    logic        valid;
    tid_t        tid;
    vaddr_t      addr;
    frame_mask_t mask;
  } redirect_t;

  // Ring of frames a thread allocates from: all eight in single-threaded
  // mode, frames {2t, 2t+1} in SMT mode.
  function automatic frame_t ring_succ(input frame_t f, input logic smt);
    frame_t r;
    if (smt) r = {f[FRAME_W-1:1], ~f[0]};
    else     r = f + frame_t'(1);
    return r;
  endfunction

  function automatic frame_t ring_pred(input frame_t f, input logic smt);
    frame_t r;
    if (smt) r = {f[FRAME_W-1:1], ~f[0]};
    else     r = f - frame_t'(1);
    return r;
  endfunction

  // Position of frame f in its thread's ring, counted from the oldest frame.
  function automatic frame_t ring_age(input frame_t f, input frame_t oldest, input logic smt);
    frame_t r;
    if (smt) r = {{(FRAME_W-1){1'b0}}, f[0] ^ oldest[0]};
    else     r = f - oldest;
    return r;
  endfunction

  function automatic tid_t frame_owner(input frame_t f, input logic smt);
    tid_t r;
    if (smt) r = tid_t'(f >> 1);
    else     r = '0;
    return r;
  endfunction

endpackage

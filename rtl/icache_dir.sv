// icache_dir: the GT's directory of blocks resident in the I-cache.
//
// One directory serves all ITs: a block is striped over the five ITs (one
// chunk each) and only the GT keeps its tag, so the ITs need no tag arrays
// and every IT always agrees on which blocks are cached. 128 entries are
// organised as 64 sets of 2 ways, indexed by the block's virtual address
// and tagged with its physical block address. Each entry holds V (valid),
// PTAG and H (part of the block's meta information); each set holds one L
// (LRU) bit naming the way to replace next.
//
// Timing: a lookup is started with `lk_valid/lk_set` (the TLB cycle) and
// the set is read into a register; in the next cycle (hit/miss detection)
// `cmp_ptag` is compared against both ways, giving `hit`, `hit_way`,
// `hit_hdr` and the LRU `victim_way`. `touch_*` marks a way most recently
// used, `wr_*` installs a block (and marks it MRU). Writes take effect at the next clock edge; the comparison uses the
// set as read, so a write to the same set in the lookup cycle is not seen.
// Reset clears every V bit. Size, associativity, LRU replacement, virtual
// indexing and the fields follow the design description; physical tags of
// the whole block address and the port structure are this design's choice.
module icache_dir
  import gt_pkg::*;
#(
  parameter int SETS = DIR_SETS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lookup (cycle 1: read set)
  input  logic                    lk_valid,
  input  logic [$clog2(SETS)-1:0] lk_set,
  // compare (cycle 2)
  input  ptag_t                   cmp_ptag,
  output logic                    hit,
  output logic                    hit_way,
  output hdr_t                    hit_hdr,
  output logic                    victim_way,
  // LRU update on a hit
  input  logic                    touch_valid,
  input  logic [$clog2(SETS)-1:0] touch_set,
  input  logic                    touch_way,
  // install a refilled block
  input  logic                    wr_valid,
  input  logic [$clog2(SETS)-1:0] wr_set,
  input  logic                    wr_way,
  input  ptag_t                   wr_ptag,
  input  hdr_t                    wr_hdr
);

  typedef struct packed {
    ptag_t ptag;
    hdr_t  hdr;
  } dir_data_t;

  logic [1:0]  v     [SETS];
  logic        lru   [SETS];   // way to replace next
  dir_data_t   data0 [SETS];
  dir_data_t   data1 [SETS];

  logic [1:0]  rd_v;
  logic        rd_lru;
  dir_data_t   rd_d0, rd_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        v[s]   <= 2'b00;
        lru[s] <= 1'b0;
      end
    end else begin
      if (touch_valid) lru[touch_set] <= ~touch_way;
      if (wr_valid) begin
        v[wr_set][wr_way] <= 1'b1;
        lru[wr_set]       <= ~wr_way;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      if (wr_way) data1[wr_set] <= '{ptag: wr_ptag, hdr: wr_hdr};
      else        data0[wr_set] <= '{ptag: wr_ptag, hdr: wr_hdr};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v   <= 2'b00;
      rd_lru <= 1'b0;
      rd_d0  <= '0;
      rd_d1  <= '0;
    end else if (lk_valid) begin
      rd_v   <= v[lk_set];
      rd_lru <= lru[lk_set];
      rd_d0  <= data0[lk_set];
      rd_d1  <= data1[lk_set];
    end
  end

  logic h0, h1;
  assign h0         = rd_v[0] && (rd_d0.ptag == cmp_ptag);
  assign h1         = rd_v[1] && (rd_d1.ptag == cmp_ptag);
  assign hit        = h0 || h1;
  assign hit_way    = !h0 && h1;
  assign hit_hdr    = h0 ? rd_d0.hdr : rd_d1.hdr;
  // Prefer an empty way, otherwise the least recently used one.
  assign victim_way = !rd_v[0] ? 1'b0 : !rd_v[1] ? 1'b1 : rd_lru;

endmodule

// itlb: instruction TLB of the GT, built from segment registers.
//
// Sixteen registers each map one naturally aligned memory segment of
// 2**size_log2 bytes (64 KB .. 1 TB) from virtual to physical addresses and
// hold its read/execute permissions and L1 cacheability. A lookup compares
// the block address against every register in parallel; the lowest-numbered
// matching register wins. No match raises `miss`; a match without execute
// permission raises `prot`. Either one makes the fetch of the block fault.
//
// Interface: registers are written through `wr_*` (one per cycle, visible
// the next cycle) and cleared by reset. The lookup is combinational; the
// fetch pipeline uses it in its TLB cycle (cycle 3 of Figures 4/5 of the
// design description). The segment-register organisation, the sizes and
// the miss/protection exception follow the description; matching priority,
// the write port and the use of the execute bit as the fetch permission are
// this design's own choices.
module itlb
  import gt_pkg::*;
#(
  parameter int ENTRIES = TLB_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_valid,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  tlb_entry_t                 wr_entry,
  input  vaddr_t                     lk_vaddr,
  output paddr_t                     lk_paddr,
  output logic                       lk_miss,
  output logic                       lk_prot,
  output logic                       lk_cacheable
);

  tlb_entry_t regs [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) regs[i] <= '0;
    end else if (wr_valid) begin
      regs[wr_idx] <= wr_entry;
    end
  end

  always_comb begin
    logic        found;
    logic [63:0] m;
    found        = 1'b0;
    lk_paddr     = '0;
    lk_prot      = 1'b0;
    lk_cacheable = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      m = seg_mask(regs[i].size_log2);
      if (!found && regs[i].valid &&
          ((64'(lk_vaddr) & ~m) == (64'(regs[i].vbase) & ~m))) begin
        found        = 1'b1;
        lk_paddr     = PA_W'((64'(regs[i].pbase) & ~m) | (64'(lk_vaddr) & m));
        lk_prot      = !regs[i].ex;
        lk_cacheable = regs[i].cacheable;
      end
    end
    lk_miss = !found;
  end

endmodule

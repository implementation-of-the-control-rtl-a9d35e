// itlb_tb: self-checking test of the segment-register ITLB.
// Programs segments of 64 KB, 1 MB and 1 TB plus a non-executable and an
// uncacheable one, then checks translation, miss, protection, cacheability
// and lowest-index priority against addresses worked out by hand.
// Segment sizes and permission checks follow the description; the lowest-
// index priority for overlapping segments is this design's own.
module itlb_tb;
  import gt_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real reset edge at the start
  always #5 clk = ~clk;

  logic       wr_valid = 0;
  logic [3:0] wr_idx = 0;
  tlb_entry_t wr_entry = '0;
  vaddr_t     va = '0;
  paddr_t     pa;
  logic       miss, prot, ca;
  int checks = 0, failures = 0;

  itlb dut (.clk, .rst_n, .wr_valid, .wr_idx, .wr_entry,
            .lk_vaddr (va), .lk_paddr (pa), .lk_miss (miss), .lk_prot (prot),
            .lk_cacheable (ca));

  task automatic prog_seg(input int idx, input int lg, input vaddr_t vb, input paddr_t pb,
                         input logic ex, input logic c);
    @(negedge clk);
    wr_valid = 1; wr_idx = 4'(idx);
    wr_entry = '{valid: 1'b1, size_log2: 6'(lg), vbase: vb, pbase: pb, rd: 1'b1,
                 ex: ex, cacheable: c};
    @(negedge clk);
    wr_valid = 0;
  endtask

  task automatic look(input vaddr_t a, input logic e_miss, input logic e_prot,
                      input paddr_t e_pa, input logic e_ca);
    va = a;
    #1;
    checks++;
    if (miss !== e_miss || (!e_miss && (prot !== e_prot || pa !== e_pa || ca !== e_ca))) begin
      failures++;
      $display("FAIL va=%h miss=%b prot=%b pa=%h ca=%b (exp %b %b %h %b)",
               a, miss, prot, pa, ca, e_miss, e_prot, e_pa, e_ca);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    look(40'h00_0001_0000, 1, 0, '0, 0);                   // empty TLB: miss
    prog_seg(3, 16, 40'h00_1234_0000, 40'h80_0000_0000, 1, 1);   // 64 KB
    prog_seg(5, 20, 40'h00_5550_0000, 40'h12_3450_0000, 1, 1);   // 1 MB
    prog_seg(7, 16, 40'h00_7777_0000, 40'h00_0001_0000, 0, 1);   // no execute
    prog_seg(9, 16, 40'h00_9999_0000, 40'h00_0002_0000, 1, 0);   // uncacheable
    prog_seg(2, 16, 40'h00_5551_0000, 40'h33_0000_0000, 1, 1);   // overlaps seg 5, wins
    look(40'h00_1234_1280, 0, 0, 40'h80_0000_1280, 1);
    look(40'h00_1234_ff80, 0, 0, 40'h80_0000_ff80, 1);
    look(40'h00_1235_0000, 1, 0, '0, 0);                   // just past 64 KB
    look(40'h00_555a_bc80, 0, 0, 40'h12_345a_bc80, 1);
    look(40'h00_5551_0100, 0, 0, 40'h33_0000_0100, 1);     // lower index wins
    look(40'h00_7777_0080, 0, 1, 40'h00_0001_0080, 1);     // protection
    look(40'h00_9999_0400, 0, 0, 40'h00_0002_0400, 0);     // uncacheable
    prog_seg(15, 40, 40'h00_0000_0000, 40'h00_0000_0000, 1, 1); // 1 TB identity
    look(40'hab_cdef_0180, 0, 0, 40'hab_cdef_0180, 1);
    look(40'h00_1234_0080, 0, 0, 40'h80_0000_0080, 1);     // seg 3 still first
    // random 64 KB segment translations
    for (int i = 0; i < 40; i++) begin
      vaddr_t off;
      off = vaddr_t'($urandom_range(0, 65535)) & ~vaddr_t'(127);
      look(40'h00_1234_0000 | off, 0, 0, 40'h80_0000_0000 | off, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

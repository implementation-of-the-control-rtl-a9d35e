// refill_unit_tb: self-checking test of the pending-refill table.
// Checks: GRN command one cycle after allocation with the right address;
// four refills outstanding at once, one per thread; `done` raised in the
// cycle the GSN completion arrives and held until consumed; the header
// returned with the completion kept; a cancelled refill is dropped when its
// completion arrives and never reports done.
// The four entries, one per thread, and the GRN timing follow the
// description; cancel-until-completion is this design's own rule.
module refill_unit_tb;
  import gt_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real reset edge at the start
  always #5 clk = ~clk;

  logic alloc_valid = 0, alloc_way = 0, alloc_cacheable = 0;
  tid_t alloc_tid = '0; set_t alloc_set = '0; paddr_t alloc_paddr = '0;
  logic fill_done = 0; tid_t fill_tid = '0; hdr_t fill_hdr = '0;
  logic [NUM_THREADS-1:0] cancel = '0, consume = '0, busy, done;
  set_t ent_set [NUM_THREADS]; logic ent_way [NUM_THREADS];
  ptag_t ent_ptag [NUM_THREADS]; logic ent_cacheable [NUM_THREADS];
  hdr_t ent_hdr [NUM_THREADS];
  grn_msg_t grn;
  int checks = 0, failures = 0;

  refill_unit dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic paddr_t pa_of(input int t);
    return paddr_t'(40'h12_0000_0000 + t * 40'h1_0080);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // allocate one refill per thread on consecutive cycles
    for (int t = 0; t < NUM_THREADS; t++) begin
      @(negedge clk);
      alloc_valid = 1; alloc_tid = tid_t'(t); alloc_set = set_t'(10 + t);
      alloc_way = 1'(t); alloc_paddr = pa_of(t); alloc_cacheable = (t != 3);
      if (t > 0) check(grn.valid && grn.tid == tid_t'(t - 1) && grn.paddr == pa_of(t - 1),
                       "GRN command one cycle after allocation");
    end
    @(negedge clk);
    alloc_valid = 0;
    check(grn.valid && grn.tid == tid_t'(3) && grn.paddr == pa_of(3), "last GRN command");
    check(busy == 4'b1111 && done == 4'b0000, "four refills outstanding, none done");
    for (int t = 0; t < NUM_THREADS; t++)
      check(ent_set[t] == set_t'(10 + t) && ent_way[t] == 1'(t) && ent_ptag[t] == pa_of(t)[PA_W-1:CHUNK_OFF] &&
            ent_cacheable[t] == (t != 3), "entry fields");
    @(negedge clk);
    check(!grn.valid, "GRN idle");
    // thread 2 is cancelled before its completion
    cancel = 4'b0100;
    @(negedge clk);
    cancel = '0;
    check(busy[2] && !done[2], "cancelled refill stays busy until completed");
    // completion for thread 1: done in the same cycle
    fill_done = 1; fill_tid = 1; fill_hdr = 8'hA5;
    #1;
    check(done == 4'b0010 && ent_hdr[1] == 8'hA5, "done bypassed in the completion cycle");
    @(negedge clk);
    fill_done = 0;
    check(done == 4'b0010 && ent_hdr[1] == 8'hA5, "done held with header");
    // completion of the cancelled one: dropped
    fill_done = 1; fill_tid = 2; fill_hdr = 8'h11;
    #1;
    check(!done[2], "cancelled refill never done");
    @(negedge clk);
    fill_done = 0;
    check(!busy[2], "cancelled refill freed on completion");
    // consume thread 1
    consume = 4'b0010;
    @(negedge clk);
    consume = '0;
    check(!busy[1] && !done[1], "consumed entry freed");
    // thread 1 can refill again
    alloc_valid = 1; alloc_tid = 1; alloc_paddr = pa_of(7);
    @(negedge clk);
    alloc_valid = 0;
    check(busy[1] && grn.valid && grn.paddr == pa_of(7), "re-allocation after free");
    // complete threads 0 and 3
    fill_done = 1; fill_tid = 0; fill_hdr = 8'h3C;
    @(negedge clk);
    fill_tid = 3; fill_hdr = 8'h5A;
    @(negedge clk);
    fill_done = 0;
    check(done[0] && done[3] && ent_hdr[0] == 8'h3C && ent_hdr[3] == 8'h5A,
          "independent completions per thread");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

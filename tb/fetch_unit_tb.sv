// fetch_unit_tb: self-checking test of the fetch pipeline timing.
// The fetch unit runs with the real refill unit; the exit predictor and
// the retirement table are small models here (3-cycle predictor that
// predicts fall-through, block + 640; a frame counter). Checked against the
// cycle positions of the fetch and refill pipelines:
//   miss: GRN refill command 3 cycles after address select;
//   refill complete in cycle X: fetch slot 0 (update, from fill) in X+1;
//   hits: slot 0 three cycles after a redirect, next block 8 cycles later;
//   a predictor update at slot 0 delays the next block by one cycle;
//   an idle fetch engine lets address select share the last predict cycle;
//   an uncacheable block is fetched from the fill buffer without update and
//   is not entered in the directory; an ITLB protection fault stops the
//   thread and is reported.
// The cycle numbers checked are those of the description's fetch and refill
// pipelines; the models' latencies are this testbench's own.
module fetch_unit_tb;
  import gt_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real reset edge at the start
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic smt = 0;
  logic start_valid = 0; tid_t start_tid = '0; vaddr_t start_pc = '0;
  logic stop_valid = 0; tid_t stop_tid = '0;
  logic tlb_wr_valid = 0; logic [3:0] tlb_wr_idx = '0; tlb_entry_t tlb_wr_entry = '0;
  logic pred_req_valid, pred_req_ready, pred_resp_valid;
  tid_t pred_req_tid, pred_resp_tid; vaddr_t pred_req_baddr, pred_resp_target;
  ghist_t pred_resp_ghist;
  logic alloc_valid; tid_t alloc_tid; vaddr_t alloc_baddr;
  frame_t alloc_frame [NUM_THREADS];
  logic [NUM_THREADS-1:0] alloc_ok, thread_empty;
  logic pwr_valid; frame_t pwr_frame; vaddr_t pwr_addr; ghist_t pwr_ghist;
  redirect_t redirect = '0;
  logic exc_valid = 0; tid_t exc_tid = '0; frame_mask_t exc_mask = '0;
  logic rf_alloc_valid, rf_alloc_way, rf_alloc_cacheable;
  tid_t rf_alloc_tid; set_t rf_alloc_set; paddr_t rf_alloc_paddr;
  logic [NUM_THREADS-1:0] rf_busy, rf_done, rf_cancel, rf_consume;
  set_t rf_set [NUM_THREADS]; logic rf_way [NUM_THREADS];
  ptag_t rf_ptag [NUM_THREADS]; logic rf_cacheable [NUM_THREADS];
  hdr_t rf_hdr [NUM_THREADS];
  gdn_msg_t gdn; grn_msg_t grn;
  logic fetch_busy; logic [2:0] fetch_slot;
  logic fault_valid; tid_t fault_tid; vaddr_t fault_addr;
  logic [NUM_THREADS-1:0] thread_running;
  logic fill_done = 0; tid_t fill_tid = '0; hdr_t fill_hdr = '0;
  int checks = 0, failures = 0;

  fetch_unit dut (.*);

  refill_unit u_rf (
    .clk, .rst_n, .alloc_valid (rf_alloc_valid), .alloc_tid (rf_alloc_tid),
    .alloc_set (rf_alloc_set), .alloc_way (rf_alloc_way), .alloc_paddr (rf_alloc_paddr),
    .alloc_cacheable (rf_alloc_cacheable), .fill_done, .fill_tid, .fill_hdr,
    .cancel (rf_cancel), .consume (rf_consume), .busy (rf_busy), .done (rf_done),
    .ent_set (rf_set), .ent_way (rf_way), .ent_ptag (rf_ptag),
    .ent_cacheable (rf_cacheable), .ent_hdr (rf_hdr), .grn);

  // ---- predictor model: 3 cycles, fall-through, can be held busy ----
  int  pm_busy_until = 0;
  int  pm_stage = 0;
  tid_t pm_tid; vaddr_t pm_addr;
  assign pred_req_ready  = (pm_stage == 0) && (cyc >= pm_busy_until);
  assign pred_resp_valid = (pm_stage == 3);
  assign pred_resp_tid   = pm_tid;
  assign pred_resp_target = pm_addr + vaddr_t'(BLOCK_BYTES);
  assign pred_resp_ghist = '0;
  always @(posedge clk) begin
    if (pm_stage == 0 && pred_req_valid && pred_req_ready) begin
      pm_stage <= 2; pm_tid <= pred_req_tid; pm_addr <= pred_req_baddr;
    end else if (pm_stage == 2) pm_stage <= 3;
    else if (pm_stage == 3) pm_stage <= 0;
  end

  // ---- retirement model ----
  frame_t nf [NUM_THREADS];
  always_comb
    for (int t = 0; t < NUM_THREADS; t++) begin
      alloc_frame[t] = nf[t];
      alloc_ok[t]    = 1'b1;
    end
  assign thread_empty = '1;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) for (int t = 0; t < NUM_THREADS; t++) nf[t] <= '0;
    else if (alloc_valid) nf[alloc_tid] <= nf[alloc_tid] + 1'b1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // GDN and GRN messages are logged with their cycle; tests take them in order
  int gdn_c[$], grn_c[$];
  gdn_msg_t gdn_q[$];
  grn_msg_t grn_q[$];
  always @(negedge clk) begin
    if (gdn.valid) begin gdn_c.push_back(cyc); gdn_q.push_back(gdn); end
    if (grn.valid) begin grn_c.push_back(cyc); grn_q.push_back(grn); end
  end
  task automatic next_gdn(output int c, output gdn_msg_t m);
    while (gdn_c.size() == 0) @(negedge clk);
    c = gdn_c.pop_front(); m = gdn_q.pop_front();
  endtask
  task automatic next_grn(output int c, output grn_msg_t m);
    while (grn_c.size() == 0) @(negedge clk);
    c = grn_c.pop_front(); m = grn_q.pop_front();
  endtask
  task automatic drain();
    gdn_c.delete(); gdn_q.delete(); grn_c.delete(); grn_q.delete();
  endtask

  task automatic tlb(input int idx, input vaddr_t base, input logic ex, input logic ca);
    @(negedge clk);
    tlb_wr_valid = 1; tlb_wr_idx = 4'(idx);
    tlb_wr_entry = '{valid: 1'b1, size_log2: 6'd20, vbase: base, pbase: paddr_t'(base) | 40'h80_0000_0000,
                     rd: 1'b1, ex: ex, cacheable: ca};
    @(negedge clk);
    tlb_wr_valid = 0;
  endtask

  // redirect thread 0 in the current cycle; returns that cycle
  task automatic redir(input vaddr_t a, output int c);
    @(negedge clk);
    redirect = '{valid: 1'b1, tid: '0, addr: a, mask: 8'hff};
    c = cyc;
    @(negedge clk);
    redirect = '0;
  endtask

  task automatic fill(input hdr_t h, output int c);
    @(negedge clk);
    fill_done = 1; fill_tid = 0; fill_hdr = h;
    c = cyc;
    @(negedge clk);
    fill_done = 0;
  endtask

  localparam vaddr_t A = 40'h00_0010_0000;
  localparam vaddr_t B = A + vaddr_t'(BLOCK_BYTES);
  localparam vaddr_t U = 40'h00_0020_0000;
  localparam vaddr_t P = 40'h00_0030_0000;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, c1, c2, cx; gdn_msg_t g; grn_msg_t r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    tlb(0, A & ~vaddr_t'(20'hfffff), 1, 1);
    tlb(1, U, 1, 0);
    tlb(2, P, 0, 1);
    tlb(3, 40'h00_0040_0000, 0, 1);
    // ---- cold start: A misses ----
    @(negedge clk);
    start_valid = 1; start_tid = 0; start_pc = A;
    c0 = cyc;                               // start written at the end of c0
    @(negedge clk);
    start_valid = 0;
    next_grn(c1, r);
    check(c1 - (c0 + 1) == 3, "refill command 3 cycles after address select");
    check(r.paddr == (paddr_t'(A) | 40'h80_0000_0000), "refill physical address");
    repeat (10) @(negedge clk);
    fill(8'h5A, cx);
    next_gdn(c1, g);
    check(c1 == cx + 1, "fetch starts the cycle after refill completion");
    check(g.update && g.from_fill && g.vaddr == A && g.frame == 0 && g.hdr == 8'h5A,
          "refill fetch carries update, frame and header");
    // ---- B (predicted fall-through) misses, is refilled ----
    next_grn(c2, r);
    check(c2 - c1 == 8, "next block's refill command in its hit/miss cycle + 1 (slot 8)");
    fill(8'h33, cx);
    next_gdn(c1, g);
    check(g.vaddr == B && g.update && c1 == cx + 1, "second refill fetch");
    // ---- redirect to A: hits, fetch 3 cycles after the flush ----
    repeat (12) @(negedge clk);
    drain();
    redir(A, c0);
    next_gdn(c1, g);
    check(c1 - c0 == 3, "fetch three cycles after a flush");
    check(!g.update && !g.from_fill && g.vaddr == A && g.hdr == 8'h5A, "hit fetch from the I-cache");
    next_gdn(c2, g);
    check(c2 - c1 == 8 && g.vaddr == B && g.hdr == 8'h33, "next block fetched 8 cycles later (no bubble)");
    // ---- predictor update at slot 0 delays the next block by one ----
    repeat (12) @(negedge clk);
    drain();
    redir(A, c0);
    pm_busy_until = c0 + 6;                 // update occupies slots 0..2
    next_gdn(c1, g);
    next_gdn(c2, g);
    check(c2 - c1 == 9 && g.vaddr == B, "update before predict makes a one-cycle bubble");
    // ---- a long predictor stall: address select shares the predict cycle ----
    repeat (12) @(negedge clk);
    drain();
    redir(A, c0);
    pm_busy_until = c0 + 14;                // predict accepted at c0+14 (engine idle)
    next_gdn(c1, g);
    next_gdn(c2, g);
    check(c2 - (c0 + 14) == 5 && g.vaddr == B,
          "idle engine: predict (3) + lookup + hit/miss, then slot 0");
    // ---- uncacheable block: fetched from the fill buffer, no update ----
    repeat (12) @(negedge clk);
    drain();
    redir(U, c0);
    fill_done = 1; fill_tid = 0; fill_hdr = '0;   // the ITs finish the cancelled wrong-path refill
    @(negedge clk);
    fill_done = 0;
    next_grn(c1, r);
    check(c1 - c0 == 3, $sformatf("uncacheable block misses (%0d)", c1 - c0));
    fill(8'h77, cx);
    next_gdn(c1, g);
    check(g.from_fill && !g.update && g.vaddr == U, "uncacheable fetch without update");
    repeat (12) @(negedge clk);
    drain();
    redir(U, c0);
    fill_done = 1; fill_tid = 0; fill_hdr = '0;   // the ITs finish the cancelled wrong-path refill
    @(negedge clk);
    fill_done = 0;
    next_grn(c1, r);
    check(c1 - c0 == 3, $sformatf("uncacheable block never enters the directory (%0d)", c1-c0));
    fill(8'h77, cx);
    // ---- protection fault ----
    repeat (12) @(negedge clk);
    drain();
    redir(P, c0);
    do @(negedge clk); while (!fault_valid && cyc < c0 + 20);
    check(fault_valid && fault_addr == P && fault_tid == 0, "ITLB protection fault reported");
    @(negedge clk);
    check(!thread_running[0], "thread stopped after the fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// gt_tb: end-to-end test of the Global control Tile.
//
// The slave tiles are behavioural models in this testbench. ITs answer a
// GRN refill with a GSN completion after REFILL_LAT cycles. When a block is
// fetched (GDN), its branch result arrives on the OPN and its register and
// store completions on the GSN some cycles later; a GCN commit is answered
// by RT and DT acknowledgements; a GCN flush discards everything pending
// for the flushed frames. The "program" is a fixed successor function over
// block addresses: loops whose last block jumps back to the first (the
// predictor first predicts fall-through, so each loop is mispredicted until
// trained), one block that raises an exception, one segment that is not
// L1-cacheable and one without execute permission.
//
// Checked: every committed block is the architectural successor of the
// previous committed block of its thread (so wrong-path blocks never
// commit), the exception is reported for the right block, the fault for the
// right address, and, in single-threaded mode, hit fetches of a trained loop
// come 8 cycles apart. Each mechanism must occur at least once: refill,
// fetch with I-cache update, uncached fetch, hit fetch, commit,
// deallocation, misprediction flush with redirect, predictor update and
// repair, all eight frames in flight, a prediction delayed by an update,
// a fetch bubble (9 to 11 cycles between fetches) behind such a delay,
// exception, ITLB fault, SMT operation of all four threads.
// The tile latencies and the program are this testbench's own; the cycle
// relations checked (commit 2 cycles after the last completion,
// deallocation 1 cycle after the last acknowledgement, 8 cycles between
// fetches) follow the description's commit and fetch pipelines. All
// parameters are at their defaults.
module gt_tb;
  import gt_pkg::*;

  localparam int REFILL_LAT = 20;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real reset edge at the start
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic smt = 0;
  logic start_valid = 0; tid_t start_tid = '0; vaddr_t start_pc = '0;
  logic stop_valid = 0; tid_t stop_tid = '0;
  logic tlb_wr_valid = 0; logic [3:0] tlb_wr_idx = '0; tlb_entry_t tlb_wr_entry = '0;
  grn_msg_t grn; gdn_msg_t gdn; gcn_msg_t gcn;
  gsn_msg_t gsn; opn_br_t opn;
  logic exc_valid; tid_t exc_tid; vaddr_t exc_baddr;
  logic fault_valid; tid_t fault_tid; vaddr_t fault_addr;
  logic fetch_busy; logic [2:0] fetch_slot; logic [1:0] pred_op; logic pred_busy;
  logic redirect_valid, dealloc_valid; frame_t dealloc_frame; frame_mask_t valid_frames;
  logic [NUM_THREADS-1:0] thread_running;

  gt dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- program ----------------
  localparam vaddr_t SEG_C = 40'h00_0010_0000;   // cacheable, executable
  localparam vaddr_t SEG_U = 40'h00_0020_0000;   // not L1-cacheable
  localparam vaddr_t SEG_P = 40'h00_0030_0000;   // no execute permission
  localparam vaddr_t SEG_S = 40'h00_0040_0000;   // SMT threads
  localparam vaddr_t BB    = vaddr_t'(BLOCK_BYTES);
  localparam vaddr_t LOOP0 = SEG_C;               // 4-block loop
  localparam vaddr_t YB    = SEG_C + 40'h8000;    // Y -> X, X raises an exception
  localparam vaddr_t XB    = YB + BB;

  vaddr_t loop_base [6];
  int     loop_len  [6];
  initial begin
    loop_base[0] = LOOP0;             loop_len[0] = 4;
    loop_base[1] = SEG_S;             loop_len[1] = 3;
    loop_base[2] = SEG_S + 40'h4000;  loop_len[2] = 2;
    loop_base[3] = SEG_S + 40'h8000;  loop_len[3] = 4;
    loop_base[4] = SEG_U;             loop_len[4] = 2;
    loop_base[5] = SEG_S + 40'hc000;  loop_len[5] = 3;
  end

  function automatic vaddr_t succ(input vaddr_t a);
    for (int l = 0; l < 6; l++)
      if (a >= loop_base[l] && a < loop_base[l] + BB * vaddr_t'(loop_len[l]))
        return (a == loop_base[l] + BB * vaddr_t'(loop_len[l] - 1)) ? loop_base[l] : a + BB;
    return a + BB;
  endfunction

  // ---------------- tile models ----------------
  vaddr_t f_addr [NUM_FRAMES];
  tid_t   f_tid  [NUM_FRAMES];
  int     br_at [NUM_FRAMES], rg_at [NUM_FRAMES], st_at [NUM_FRAMES];
  int     ra_at [NUM_FRAMES], sa_at [NUM_FRAMES];
  int     fill_at [NUM_THREADS];
  hdr_t   fill_h  [NUM_THREADS];
  localparam int NEVER = 32'h7fff_ffff;
  int     done_c [NUM_FRAMES], ack_c [NUM_FRAMES];   // last completion / acknowledgement

  initial begin
    for (int f = 0; f < NUM_FRAMES; f++) begin
      br_at[f] = NEVER; rg_at[f] = NEVER; st_at[f] = NEVER; ra_at[f] = NEVER; sa_at[f] = NEVER;
    end
    for (int t = 0; t < NUM_THREADS; t++) fill_at[t] = NEVER;
    gsn = '0; opn = '0;
  end

  // drive at negative edges: at most one message of each kind per cycle
  always @(negedge clk) begin
    int fb, fr, fs, far, fsa, ti;
    gsn = '0; opn = '0;
    fb = -1; fr = -1; fs = -1; far = -1; fsa = -1; ti = -1;
    for (int f = NUM_FRAMES - 1; f >= 0; f--) begin
      if (br_at[f] <= cyc) fb = f;
      if (rg_at[f] <= cyc) fr = f;
      if (st_at[f] <= cyc) fs = f;
      if (ra_at[f] <= cyc) far = f;
      if (sa_at[f] <= cyc) fsa = f;
    end
    for (int t = NUM_THREADS - 1; t >= 0; t--) if (fill_at[t] <= cyc) ti = t;
    if (fb >= 0) begin
      opn = '{valid: 1'b1, frame: frame_t'(fb), target: succ(f_addr[fb]), exc: 1'b0};
      br_at[fb] = NEVER; done_c[fb] = cyc;
    end
    if (fr >= 0) begin
      gsn.blk.reg_done = 1; gsn.blk.reg_frame = frame_t'(fr); gsn.blk.reg_exc = (f_addr[fr] == XB);
      rg_at[fr] = NEVER; done_c[fr] = cyc;
    end
    if (fs >= 0) begin
      gsn.blk.st_done = 1; gsn.blk.st_frame = frame_t'(fs); st_at[fs] = NEVER; done_c[fs] = cyc;
    end
    if (far >= 0) begin
      gsn.blk.reg_ack = 1; gsn.blk.reg_ack_frame = frame_t'(far); ra_at[far] = NEVER; ack_c[far] = cyc;
    end
    if (fsa >= 0) begin
      gsn.blk.st_ack = 1; gsn.blk.st_ack_frame = frame_t'(fsa); sa_at[fsa] = NEVER; ack_c[fsa] = cyc;
    end
    if (ti >= 0) begin
      gsn.fill.done = 1; gsn.fill.tid = tid_t'(ti); gsn.fill.hdr = fill_h[ti];
      fill_at[ti] = NEVER;
    end
  end

  // react to GT commands (sampled just before the rising edge)
  int n_refill = 0, n_upd_fetch = 0, n_unc_fetch = 0, n_hit_fetch = 0, n_commit = 0;
  int n_dealloc = 0, n_redirect = 0, n_flush = 0, n_pupd = 0, n_prep = 0, n_full = 0;
  int n_bubble = 0, n_pwait = 0, pwait_since = 0, n_fast_commit = 0, n_fast_dealloc = 0, n_back2back = 0, n_exc = 0, n_fault = 0;
  int n_commit_t [NUM_THREADS];
  int last_gdn_cyc [NUM_THREADS];
  logic   have_last [NUM_THREADS];
  vaddr_t last_commit [NUM_THREADS];
  vaddr_t start_of [NUM_THREADS];
  vaddr_t exc_seen; int fault_seen; vaddr_t fault_seen_addr;
  initial begin
    for (int t = 0; t < NUM_THREADS; t++) begin
      n_commit_t[t] = 0; have_last[t] = 0; last_gdn_cyc[t] = -100;
    end
    exc_seen = '0; fault_seen = 0; fault_seen_addr = '0;
  end

  always @(negedge clk) if (rst_n) begin
    if (grn.valid) begin
      n_refill++;
      fill_at[grn.tid] = cyc + REFILL_LAT + int'($urandom_range(0, 20));
      fill_h[grn.tid]  = hdr_t'(grn.paddr >> 7);
    end
    if (gdn.valid) begin
      frame_t f;
      f = gdn.frame;
      if (gdn.update) n_upd_fetch++;
      else if (gdn.from_fill) n_unc_fetch++;
      else n_hit_fetch++;
      // a late fetch whose prediction waited for a predictor update
      if (!smt && !gdn.from_fill && pwait_since && cyc - last_gdn_cyc[gdn.tid] inside {[9:11]})
        n_bubble++;
      pwait_since = 0;
      if (!smt && cyc - last_gdn_cyc[gdn.tid] == 8) n_back2back++;
      last_gdn_cyc[gdn.tid] = cyc;
      f_addr[f] = gdn.vaddr; f_tid[f] = gdn.tid;
      // execution latencies grow with the frame number (farther tiles)
      br_at[f] = cyc + 12 + int'(f) % 3 + int'($urandom_range(0, 6));
      // the third block of every loop waits on a long-latency load
      rg_at[f] = cyc + 16 + int'(f) % 4 + int'($urandom_range(0, 8)) +
                 ((gdn.vaddr[11:7] == 5'd10) ? 60 : 0);
      st_at[f] = cyc + 18 + int'(f) % 2 + int'($urandom_range(0, 8));
      ra_at[f] = NEVER; sa_at[f] = NEVER;
    end
    if (gcn.flush) begin
      n_flush++;
      for (int f = 0; f < NUM_FRAMES; f++)
        if (gcn.flush_mask[f]) begin
          br_at[f] = NEVER; rg_at[f] = NEVER; st_at[f] = NEVER;
        end
    end
    if (gcn.commit) begin
      frame_t f; tid_t t;
      f = gcn.commit_frame; t = f_tid[f];
      n_commit++; n_commit_t[t]++;
      // completion received in cycle 0, commit detected in 1, GCN commit in 2
      check(cyc - done_c[f] >= 2, "commit at least 2 cycles after the last completion");
      if (cyc - done_c[f] == 2) n_fast_commit++;
      ra_at[f] = cyc + 4 + int'($urandom_range(0, 4));
      sa_at[f] = cyc + 4 + int'($urandom_range(0, 6));
      if (have_last[t])
        check(f_addr[f] == succ(last_commit[t]),
              $sformatf("thread %0d commits %h after %h", t, f_addr[f], last_commit[t]));
      else
        check(f_addr[f] == start_of[t], "first commit is the start block");
      have_last[t] = 1; last_commit[t] = f_addr[f];
    end
    if (dealloc_valid) begin
      n_dealloc++;
      // deallocation in the cycle after the last acknowledgement at the earliest
      check(cyc - ack_c[dealloc_frame] >= 1, "deallocation after the acknowledgements");
      if (cyc - ack_c[dealloc_frame] == 1) n_fast_dealloc++;
    end
    if (redirect_valid) n_redirect++;
    if (pred_op == 2'd2) n_pupd++;
    if (pred_op == 2'd2 && dut.pq_valid) begin n_pwait++; pwait_since = 1; end
    if (pred_op == 2'd3) n_prep++;
    if (valid_frames == 8'hff) n_full++;
    if (exc_valid) begin n_exc++; exc_seen = exc_baddr; end
    if (fault_valid) begin n_fault++; fault_seen_addr = fault_addr; end
  end

  // ---------------- control ----------------
  task automatic tlb(input int idx, input vaddr_t base, input logic ex, input logic ca);
    @(negedge clk);
    tlb_wr_valid = 1; tlb_wr_idx = 4'(idx);
    tlb_wr_entry = '{valid: 1'b1, size_log2: 6'd20, vbase: base,
                     pbase: paddr_t'(base) + 40'h01_0000_0000, rd: 1'b1, ex: ex, cacheable: ca};
    @(negedge clk);
    tlb_wr_valid = 0;
  endtask

  task automatic start(input tid_t t, input vaddr_t pc);
    @(negedge clk);
    start_valid = 1; start_tid = t; start_pc = pc;
    start_of[t] = pc; have_last[t] = 0;
    @(negedge clk);
    start_valid = 0;
  endtask

  task automatic stop(input tid_t t);
    @(negedge clk);
    stop_valid = 1; stop_tid = t;
    @(negedge clk);
    stop_valid = 0;
  endtask

  task automatic drain();
    int c0;
    c0 = cyc;
    while ((valid_frames != 0 || dut.rf_busy != 0) && cyc < c0 + 400) @(negedge clk);
    repeat (40) @(negedge clk);
    check(valid_frames == 0, "all frames drained");
    if (valid_frames != 0)
      for (int f = 0; f < NUM_FRAMES; f++)
        $display("  frame %0d: v%b f%b t%0d rc%b sc%b bc%b e%b pv%b cs%b rcomm%b scomm%b ba %h pa %h ra %h  head %0d nxt %0d",
                 f, dut.u_retire.tbl[f].v, dut.u_retire.tbl[f].f, dut.u_retire.tbl[f].tid,
                 dut.u_retire.tbl[f].rc, dut.u_retire.tbl[f].sc, dut.u_retire.tbl[f].bc,
                 dut.u_retire.tbl[f].e, dut.u_retire.tbl[f].pv, dut.u_retire.tbl[f].cs,
                 dut.u_retire.tbl[f].rcomm, dut.u_retire.tbl[f].scomm, dut.u_retire.tbl[f].baddr,
                 dut.u_retire.tbl[f].paddr, dut.u_retire.tbl[f].raddr,
                 dut.u_retire.head[dut.u_retire.tbl[f].tid], dut.u_retire.nxt[dut.u_retire.tbl[f].tid]);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: stopped at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    tlb(0, SEG_C, 1, 1);
    tlb(1, SEG_U, 1, 0);
    tlb(2, SEG_P, 0, 1);
    tlb(3, SEG_S, 1, 1);
    // ---- phase 1: single-threaded loop ----
    start(0, LOOP0);
    c0 = cyc;
    while (n_commit_t[0] < 80 && cyc < c0 + 6000) @(negedge clk);
    check(n_commit_t[0] >= 80, "single-threaded loop commits");
    stop(0);
    drain();
    // ---- phase 2: exception, then ITLB fault ----
    start(0, YB);
    c0 = cyc;
    while (n_exc == 0 && cyc < c0 + 400) @(negedge clk);
    check(n_exc == 1 && exc_seen == XB, "exception reported for the excepting block");
    check(have_last[0] && last_commit[0] == YB, "block before the exception committed");
    drain();
    start(0, SEG_P);
    c0 = cyc;
    while (n_fault == 0 && cyc < c0 + 200) @(negedge clk);
    check(n_fault == 1 && fault_seen_addr == SEG_P, "ITLB protection fault");
    drain();
    // ---- phase 3: SMT, four threads ----
    @(negedge clk);
    smt = 1;
    repeat (3) @(negedge clk);
    for (int t = 0; t < NUM_THREADS; t++) n_commit_t[t] = 0;
    start(0, loop_base[1]);
    start(1, loop_base[2]);
    start(2, loop_base[3]);
    start(3, loop_base[4]);
    c0 = cyc;
    while ((n_commit_t[0] < 12 || n_commit_t[1] < 12 || n_commit_t[2] < 12 || n_commit_t[3] < 12)
           && cyc < c0 + 8000) @(negedge clk);
    for (int t = 0; t < NUM_THREADS; t++)
      check(n_commit_t[t] >= 12, $sformatf("SMT thread %0d commits (%0d, state %0d)", t, n_commit_t[t], dut.u_fetch.st[t]));
    for (int t = 0; t < NUM_THREADS; t++) stop(tid_t'(t));
    drain();

    $display("refills=%0d update-fetches=%0d uncached-fetches=%0d hit-fetches=%0d",
             n_refill, n_upd_fetch, n_unc_fetch, n_hit_fetch);
    $display("commits=%0d deallocs=%0d redirects=%0d gcn-flushes=%0d",
             n_commit, n_dealloc, n_redirect, n_flush);
    $display("pred-update-cycles=%0d pred-repair-cycles=%0d all-frames-full=%0d",
             n_pupd, n_prep, n_full);
    $display("predictions-delayed-by-update=%0d", n_pwait);
    $display("back-to-back=%0d bubbles=%0d exceptions=%0d faults=%0d",
             n_back2back, n_bubble, n_exc, n_fault);
    check(n_refill > 0,     "mechanism: refill");
    check(n_upd_fetch > 0,  "mechanism: fetch with I-cache update");
    check(n_unc_fetch > 0,  "mechanism: uncached fetch from fill buffer");
    check(n_hit_fetch > 0,  "mechanism: I-cache hit fetch");
    check(n_commit > 0,     "mechanism: commit");
    check(n_dealloc > 0,    "mechanism: deallocation");
    check(n_redirect > 0,   "mechanism: misprediction redirect");
    check(n_flush > 0,      "mechanism: GCN flush");
    check(n_pupd > 0,       "mechanism: predictor update");
    check(n_prep > 0,       "mechanism: predictor repair");
    check(n_full > 0,       "mechanism: eight blocks in flight");
    check(n_back2back > 0,  "mechanism: fetches 8 cycles apart");
    $display("commits-2-cycles-after-completion=%0d deallocs-1-cycle-after-ack=%0d",
             n_fast_commit, n_fast_dealloc);
    check(n_fast_commit > 0,  "commit 2 cycles after the last completion");
    check(n_fast_dealloc > 0, "deallocation 1 cycle after the last acknowledgement");
    check(n_pwait > 0,      "mechanism: prediction delayed by an update");
    check(n_bubble > 0,     "mechanism: fetch bubble caused by a predictor update");
    check(n_exc > 0,        "mechanism: exception");
    check(n_fault > 0,      "mechanism: ITLB fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

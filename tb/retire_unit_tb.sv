// retire_unit_tb: self-checking test of the retirement table.
// Directed scenarios, each checked cycle by cycle against the commit
// pipeline (completion in cycle 0, commit detect 1, GCN commit and
// predictor update 2, deallocation the cycle after both acknowledgements):
// in-order frame allocation, in-order commit of three blocks, a branch
// misprediction that flushes the younger blocks and redirects fetch in the
// same cycle, an exception taken when the block is oldest, and SMT mode
// with two frames per thread.
// The commit cycle numbers follow the description; the ring allocation of
// frames and the flush order are this design's own.
module retire_unit_tb;
  import gt_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real reset edge at the start
  always #5 clk = ~clk;

  logic smt = 0;
  logic stop_valid = 0; tid_t stop_tid = '0;
  logic alloc_valid = 0; tid_t alloc_tid = '0; vaddr_t alloc_baddr = '0;
  frame_t alloc_frame [NUM_THREADS];
  logic [NUM_THREADS-1:0] alloc_ok, thread_empty;
  logic pwr_valid = 0; frame_t pwr_frame = '0; vaddr_t pwr_addr = '0; ghist_t pwr_ghist = '0;
  gsn_blk_t gsn = '0; opn_br_t opn = '0; gcn_msg_t gcn;
  redirect_t redirect;
  logic exc_valid; tid_t exc_tid; vaddr_t exc_baddr; frame_mask_t exc_mask;
  logic pred_upd_ready = 1; pred_train_t pred_upd, pred_rep;
  logic dealloc_valid; frame_t dealloc_frame; frame_mask_t valid_frames;
  int checks = 0, failures = 0;

  retire_unit dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic vaddr_t ba(input int i);
    return vaddr_t'(40'h10_0000 + i * 40'h400);
  endfunction

  // allocate a block for thread t and write its predicted successor
  task automatic alloc(input tid_t t, input vaddr_t a, input vaddr_t pred, output frame_t f);
    @(negedge clk);
    check(alloc_ok[t], "frame available");
    f = alloc_frame[t];
    alloc_valid = 1; alloc_tid = t; alloc_baddr = a;
    @(negedge clk);
    alloc_valid = 0;
    pwr_valid = 1; pwr_frame = f; pwr_addr = pred; pwr_ghist = ghist_t'(a >> 7);
    @(negedge clk);
    pwr_valid = 0;
  endtask

  // all three completions for a frame in one cycle (cycle 0)
  task automatic complete(input frame_t f, input vaddr_t tgt, input logic e);
    gsn.reg_done = 1; gsn.reg_frame = f; gsn.reg_exc = e;
    gsn.st_done = 1; gsn.st_frame = f; gsn.st_exc = 1'b0;
    opn = '{valid: 1'b1, frame: f, target: tgt, exc: 1'b0};
  endtask

  task automatic idle_msgs();
    gsn.reg_done = 0; gsn.st_done = 0; gsn.reg_ack = 0; gsn.st_ack = 0; opn = '0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t f0, f1, f2, f3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(thread_empty == 4'b1111 && alloc_frame[0] == 0, "empty after reset");
    // ---- single-threaded: three blocks in frames 0,1,2 ----
    alloc(0, ba(0), ba(1), f0);
    alloc(0, ba(1), ba(2), f1);
    alloc(0, ba(2), ba(3), f2);
    check(f0 == 0 && f1 == 1 && f2 == 2, "ring-order allocation");
    check(valid_frames == 8'b0000_0111 && !thread_empty[0], "three live frames");
    // block 1 completes first: must wait for block 0
    @(negedge clk);
    complete(f1, ba(2), 0);
    @(negedge clk);
    idle_msgs();
    @(negedge clk);
    check(!gcn.commit, "younger block does not commit before older");
    // block 0 completes in cycle 0
    complete(f0, ba(1), 0);
    @(negedge clk);           // cycle 1: commit detect
    idle_msgs();
    check(!gcn.commit, "no commit in detect cycle");
    @(negedge clk);           // cycle 2: commit send + predictor update
    check(gcn.commit && gcn.commit_frame == f0, "GCN commit of block 0 in cycle 2");
    check(pred_upd.valid && pred_upd.baddr == ba(0) && pred_upd.target == ba(1) &&
          pred_upd.ghist == ghist_t'(ba(0) >> 7), "predictor update in cycle 2");
    @(negedge clk);
    check(gcn.commit && gcn.commit_frame == f1, "block 1 commit pipelined one cycle later");
    // acknowledgements for block 0: RT first, DT later
    gsn.reg_ack = 1; gsn.reg_ack_frame = f0;
    @(negedge clk);
    gsn.reg_ack = 0;
    check(!dealloc_valid, "no deallocation with only the RT acknowledgement");
    gsn.st_ack = 1; gsn.st_ack_frame = f0;    // cycle X
    @(negedge clk);                           // cycle X+1
    gsn.st_ack = 0;
    check(dealloc_valid && dealloc_frame == f0, "deallocation in cycle X+1");
    @(negedge clk);
    check(valid_frames == 8'b0000_0110, "frame 0 freed");
    // ---- misprediction of block 2 with a younger block 3 ----
    alloc(0, ba(3), ba(4), f3);
    check(f3 == 3, "next frame");
    complete(f2, ba(9), 0);        // predicted ba(3), real ba(9)
    @(negedge clk);
    idle_msgs();
    #1;
    check(redirect.valid && redirect.addr == ba(9) && redirect.mask == 8'b0000_1000,
          "redirect and flush mask in the resolving cycle");
    @(negedge clk);
    check(gcn.flush && gcn.flush_mask == 8'b0000_1000, "GCN flush one cycle later");
    check(pred_rep.valid && pred_rep.target == ba(9) && pred_rep.ghist == ghist_t'(ba(2) >> 7),
          "predictor repair");
    check(!redirect.valid, "single redirect");
    @(negedge clk);
    check(valid_frames == 8'b0000_0110 && alloc_frame[0] == 3 && alloc_ok[0],
          "flushed frame freed and reused next");
    // block 2 now commits with its corrected successor (after block 1)
    repeat (2) @(negedge clk);
    check(gcn.commit == 0, "block 2 already committed");
    // ---- exception: block in frame 3, with younger block in frame 4 ----
    alloc(0, ba(9), ba(10), f3);
    alloc(0, ba(10), ba(11), f0);
    gsn.reg_ack = 1; gsn.reg_ack_frame = 1; gsn.st_ack = 1; gsn.st_ack_frame = 1;
    @(negedge clk);
    gsn.reg_ack_frame = 2; gsn.st_ack_frame = 2;
    @(negedge clk);
    idle_msgs();
    @(negedge clk);
    check(valid_frames == 8'b0001_1000, "blocks 1 and 2 deallocated");
    gsn.reg_done = 1; gsn.reg_frame = f3; gsn.reg_exc = 1;
    @(negedge clk);
    idle_msgs();
    #1;
    check(exc_valid && exc_baddr == ba(9) && exc_mask == 8'b0001_1000 && !redirect.valid,
          "exception of oldest block flushes it and younger blocks");
    @(negedge clk);
    check(gcn.flush && gcn.flush_mask == 8'b0001_1000, "GCN flush for exception");
    @(negedge clk);
    check(thread_empty[0] && valid_frames == 0 && alloc_frame[0] == 3, "thread empty after exception");
    // ---- SMT mode: thread 2 uses frames 4 and 5 ----
    smt = 1;
    repeat (2) @(negedge clk);
    check(alloc_frame[2] == 4 && alloc_frame[1] == 2 && alloc_ok == 4'b1111, "SMT frame rings");
    alloc(2, ba(20), ba(21), f0);
    alloc(2, ba(21), ba(22), f1);
    alloc(1, ba(30), ba(31), f2);
    check(f0 == 4 && f1 == 5 && f2 == 2 && !alloc_ok[2], "two frames per thread");
    complete(f0, ba(21), 0);
    @(negedge clk);
    idle_msgs();
    @(negedge clk);
    check(gcn.commit && gcn.commit_frame == 4, "SMT commit");
    gsn.reg_ack = 1; gsn.reg_ack_frame = 4; gsn.st_ack = 1; gsn.st_ack_frame = 4;
    @(negedge clk);
    idle_msgs();
    check(dealloc_valid && dealloc_frame == 4, "SMT deallocation");
    @(negedge clk);
    check(alloc_ok[2] && alloc_frame[2] == 4, "frame 4 reused by thread 2");
    // ---- a block whose prediction never arrives: waits until its thread stops ----
    @(negedge clk);
    alloc_valid = 1; alloc_tid = 3; alloc_baddr = ba(40);
    @(negedge clk);
    alloc_valid = 0;
    complete(6, ba(41), 0);
    @(negedge clk);
    idle_msgs();
    repeat (4) begin
      @(negedge clk);
      check(!gcn.commit, "no commit without a predicted successor");
    end
    stop_valid = 1; stop_tid = 3;
    @(negedge clk);
    stop_valid = 0;
    #1;
    check(!gcn.commit, "commit detected the cycle after the stop");
    @(negedge clk);
    check(gcn.commit && gcn.commit_frame == 6, "stopped thread's last block commits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

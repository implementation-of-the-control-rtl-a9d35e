// exit_predictor_tb: self-checking test of the next-block predictor.
// Checks the operation latencies (predict 3 cycles, update 3, repair 2,
// no overlap, update and repair ahead of predict), the fall-through
// prediction of an unknown block, learning of a trained successor,
// speculative history advance and its repair, and the update queue's
// ready signal.
// The latencies checked are the description's; the table contents expected
// follow this design's own table organisation.
module exit_predictor_tb;
  import gt_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real reset edge at the start
  always #5 clk = ~clk;

  logic   pred_req_valid = 0, pred_req_ready, pred_resp_valid, upd_ready, busy;
  tid_t   pred_req_tid = '0, pred_resp_tid;
  vaddr_t pred_req_baddr = '0, pred_resp_target;
  ghist_t pred_resp_ghist;
  pred_train_t upd = '0, rep = '0;
  logic [1:0] op;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  exit_predictor dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic ghist_t push(input ghist_t h, input vaddr_t t);
    logic [1:0] b;
    b = {t[8] ^ t[10], t[7] ^ t[9]};
    return {h[GHIST_W-3:0], b};
  endfunction

  // Issue a prediction; return target, history and cycles from request to response.
  task automatic predict(input tid_t t, input vaddr_t a, output vaddr_t tgt,
                         output ghist_t gh, output int lat);
    int c0;
    @(negedge clk);
    pred_req_valid = 1; pred_req_tid = t; pred_req_baddr = a;
    c0 = cyc;
    while (!pred_req_ready) @(negedge clk);
    @(negedge clk);
    pred_req_valid = 0;
    while (!pred_resp_valid) @(negedge clk);
    check(pred_resp_tid == t, "response thread");
    tgt = pred_resp_target; gh = pred_resp_ghist; lat = cyc - c0 + 1;
  endtask

  task automatic train(input tid_t t, input vaddr_t a, input vaddr_t tgt, input ghist_t gh);
    @(negedge clk);
    upd = '{valid: 1'b1, tid: t, baddr: a, target: tgt, ghist: gh};
    @(negedge clk);
    upd = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vaddr_t tgt; ghist_t gh, gh0; int lat, c0, busy_cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. unknown block: fall through, 3-cycle predict
    predict(0, 40'h00_0010_0000, tgt, gh, lat);
    check(tgt == 40'h00_0010_0280, "fall-through prediction = block + 640");
    check(lat == 3, "predict takes three cycles");
    check(gh == '0, "initial history");
    gh0 = push('0, tgt);
    // 2. train block with a taken successor; update takes 3 cycles
    train(0, 40'h00_0010_0000, 40'h00_0020_0000, '0);
    busy_cycles = 0;
    @(negedge clk);
    while (busy) begin busy_cycles++; @(negedge clk); end
    check(busy_cycles == 1, "update occupies its arrival cycle and two more");
    // history of thread 0 has advanced with the previous prediction
    predict(0, 40'h00_0010_0000, tgt, gh, lat);
    check(gh == gh0, "history advanced speculatively by prediction");
    // local table hits regardless of history
    check(tgt == 40'h00_0020_0000, "trained successor predicted");
    // 3. update delays a prediction: request both in the same cycle
    @(negedge clk);
    upd = '{valid: 1'b1, tid: 1, baddr: 40'h00_0030_0000, target: 40'h00_0040_0000, ghist: '0};
    pred_req_valid = 1; pred_req_tid = 1; pred_req_baddr = 40'h00_0050_0000;
    c0 = cyc;
    @(negedge clk);
    upd = '0;
    check(op == 2'd2 && !pred_req_ready, "update runs first");
    while (!pred_req_ready) @(negedge clk);
    check(cyc - c0 == 3, "predict accepted after the 3-cycle update");
    @(negedge clk);
    pred_req_valid = 0;
    while (!pred_resp_valid) @(negedge clk);
    check(cyc - c0 == 5, "delayed prediction answered in its third cycle");
    // 4. repair: two cycles, history rebuilt from snapshot + real target
    @(negedge clk);
    rep = '{valid: 1'b1, tid: 2, baddr: 40'h0, target: 40'h00_0000_0380, ghist: 11'h155};
    @(negedge clk);
    rep = '0;
    check(op == 2'd3, "repair starts");
    @(negedge clk);
    check(op == 2'd3 && busy, "repair second cycle");
    @(negedge clk);
    check(!busy, "repair done after two cycles");
    predict(2, 40'h00_0060_0000, tgt, gh, lat);
    check(gh == push(11'h155, 40'h00_0000_0380), "history repaired");
    // 5. update queue back-pressure
    @(negedge clk);
    for (int i = 0; i < 11; i++) begin
      upd = '{valid: 1'b1, tid: 3, baddr: vaddr_t'(i) << 7, target: vaddr_t'(i + 1) << 7, ghist: '0};
      @(negedge clk);
    end
    upd = '0;
    check(!upd_ready, "update queue reports nearly full");
    while (busy || !pred_req_ready) @(negedge clk);
    check(upd_ready, "update queue drained");
    // trained entries are predicted (local table)
    for (int i = 0; i < 11; i++) begin
      predict(3, vaddr_t'(i) << 7, tgt, gh, lat);
      check(tgt == vaddr_t'(i + 1) << 7, "queued updates all applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

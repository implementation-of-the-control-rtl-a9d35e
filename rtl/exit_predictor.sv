// exit_predictor: next-block address predictor of the GT.
//
// Predicts, for a block of a thread, the address of the block that will
// follow it. A tournament of two predictors, in the style of the Alpha
// 21264: a local table indexed by the block address and a global table
// indexed by the block address XOR the thread's global history; a chooser
// table of 2-bit counters, indexed by the global history, picks between
// them. Each table entry holds a full next-block address. A block with no
// entry in either table is predicted to fall through to the next block
// address (block address + 640 bytes, the size of a block).
//
// Three operations, never overlapped with each other:
//   predict (3 cycles)  request accepted in cycle 0 (pred_req_valid and
//                       pred_req_ready); pred_resp_valid in cycle 2 with
//                       the target and the history snapshot the prediction
//                       used. The thread's history is advanced speculatively.
//   update  (3 cycles)  training with a committed block's real successor;
//                       requests wait in a FIFO (one arriving at an idle
//                       predictor with an empty FIFO starts at once);
//                       upd_ready tells the retire unit there is room for
//                       two more.
//   repair  (2 cycles)  after a misprediction: the thread's history is
//                       rebuilt from the snapshot and the real successor.
//                       One pending repair per thread; a newer one replaces
//                       an older one.
// Priority when idle: repair, then update, then predict, so an update can
// delay a prediction, as the design description notes.
//
// The description gives the tournament structure, the three operations,
// their latencies, the absence of overlap and the total state (74 Kbits).
// The table organisation is this design's own: 1024 local and 1024 global
// entries of 33-bit targets plus valid bits, and 2048 two-bit chooser
// counters plus valid bits: 75,776 bits, the 74 Kbit the description gives.
module exit_predictor
  import gt_pkg::*;
#(
  parameter int LOC_ENTRIES = 1024,
  parameter int GLB_ENTRIES = 1024,
  parameter int UPD_DEPTH   = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  // predict
  input  logic   pred_req_valid,
  output logic   pred_req_ready,
  input  tid_t   pred_req_tid,
  input  vaddr_t pred_req_baddr,
  output logic   pred_resp_valid,
  output tid_t   pred_resp_tid,
  output vaddr_t pred_resp_target,
  output ghist_t pred_resp_ghist,
  // update (commit)
  input  pred_train_t upd,
  output logic   upd_ready,
  // repair (misprediction)
  input  pred_train_t rep,
  // status
  output logic   busy,
  output logic [1:0] op      // 0 none, 1 predict, 2 update, 3 repair
);

  localparam int TGT_W   = VA_W - CHUNK_OFF;
  localparam int LIDX_W  = $clog2(LOC_ENTRIES);
  localparam int GIDX_W  = $clog2(GLB_ENTRIES);
  localparam int CHO_ENTRIES = 1 << GHIST_W;
  localparam int UPTR_W  = $clog2(UPD_DEPTH);

  typedef logic [TGT_W-1:0] tgt_t;
  typedef enum logic [2:0] {S_IDLE, S_P1, S_P2, S_U1, S_U2, S_R1} state_e;

  // ---- tables ----
  tgt_t                   loc_tgt [LOC_ENTRIES];
  logic [LOC_ENTRIES-1:0] loc_v;
  tgt_t                   glb_tgt [GLB_ENTRIES];
  logic [GLB_ENTRIES-1:0] glb_v;
  logic [1:0]             cho     [CHO_ENTRIES];
  logic [CHO_ENTRIES-1:0] cho_v;   // unwritten counters read as weakly local
  ghist_t                 ghr     [NUM_THREADS];

  // ---- update FIFO ----
  pred_train_t            ufifo [UPD_DEPTH];
  logic [UPTR_W-1:0]      u_rd, u_wr;
  logic [UPTR_W:0]        u_cnt;

  // ---- pending repairs ----
  logic [NUM_THREADS-1:0] rep_pend;
  pred_train_t            rep_q [NUM_THREADS];

  // ---- operation registers ----
  state_e      state;
  tid_t        o_tid;
  vaddr_t      o_baddr;
  tgt_t        o_target;
  ghist_t      o_ghist;
  logic [LIDX_W-1:0] o_lidx;
  logic [GIDX_W-1:0] o_gidx;
  logic [GHIST_W-1:0] o_cidx;
  tgt_t        r_loc, r_glb;
  logic        r_loc_v, r_glb_v;
  logic [1:0]  r_cho;
  vaddr_t      o_result;

  // ---- arbitration in the idle state ----
  logic   rep_any;
  tid_t   rep_sel;
  always_comb begin
    rep_any = |rep_pend;
    rep_sel = '0;
    for (int t = NUM_THREADS - 1; t >= 0; t--)
      if (rep_pend[t]) rep_sel = tid_t'(t);
  end

  logic start_rep, start_upd, start_pred;
  assign start_rep  = (state == S_IDLE) && rep_any;
  assign start_upd  = (state == S_IDLE) && !rep_any && (u_cnt != 0 || upd.valid);
  assign pred_req_ready = (state == S_IDLE) && !rep_any && (u_cnt == 0) && !upd.valid;
  assign start_pred = pred_req_ready && pred_req_valid;
  assign upd_ready  = u_cnt <= (UPTR_W+1)'(UPD_DEPTH - 2);

  // An update arriving at an empty queue starts in its arrival cycle.
  pred_train_t u_head;
  logic        u_bypass, u_push, u_pop;
  assign u_bypass = start_upd && (u_cnt == 0);
  assign u_head   = u_bypass ? upd : ufifo[u_rd];
  assign u_push   = upd.valid && !u_bypass;
  assign u_pop    = start_upd && !u_bypass;

  // Table indices: the local table by block address, the global table by
  // block address XOR global history, the chooser by global history. The
  // history shifts in two bits of each next-block address.
  logic [LIDX_W-1:0] u_lidx, p_lidx;
  logic [GIDX_W-1:0] u_gidx, p_gidx;
  ghist_t            p_hist;
  logic [1:0]        res_bits, tgt_bits;
  assign u_lidx   = u_head.baddr[CHUNK_OFF +: LIDX_W];
  assign u_gidx   = u_head.baddr[CHUNK_OFF +: GIDX_W] ^ GIDX_W'(u_head.ghist);
  assign p_hist   = ghr[pred_req_tid];
  assign p_lidx   = pred_req_baddr[CHUNK_OFF +: LIDX_W];
  assign p_gidx   = pred_req_baddr[CHUNK_OFF +: GIDX_W] ^ GIDX_W'(p_hist);
  assign res_bits = o_result[CHUNK_OFF +: 2] ^ o_result[CHUNK_OFF+2 +: 2];
  assign tgt_bits = o_target[1:0] ^ o_target[3:2];

  // Prediction result, formed in stage 1 and presented in stage 2.
  vaddr_t pick;
  always_comb begin
    logic use_glb;
    use_glb = r_cho[1];
    if (use_glb && r_glb_v)       pick = {r_glb, {CHUNK_OFF{1'b0}}};
    else if (r_loc_v)             pick = {r_loc, {CHUNK_OFF{1'b0}}};
    else if (r_glb_v)             pick = {r_glb, {CHUNK_OFF{1'b0}}};
    else                          pick = fall_through(o_baddr);
  end

  assign pred_resp_valid  = (state == S_P2);
  assign pred_resp_tid    = o_tid;
  assign pred_resp_target = o_result;
  assign pred_resp_ghist  = o_ghist;
  assign busy = (state != S_IDLE);
  always_comb begin
    unique case (state)
      S_P1, S_P2: op = 2'd1;
      S_U1, S_U2: op = 2'd2;
      S_R1:       op = 2'd3;
      default:    op = (start_rep ? 2'd3 : start_upd ? 2'd2 : start_pred ? 2'd1 : 2'd0);
    endcase
  end

  // ---- control and small state (reset) ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      u_rd     <= '0;
      u_wr     <= '0;
      u_cnt    <= '0;
      rep_pend <= '0;
      loc_v    <= '0;
      glb_v    <= '0;
      cho_v    <= '0;
      for (int t = 0; t < NUM_THREADS; t++) ghr[t] <= '0;
    end else begin
      // enqueue updates
      if (u_push) u_wr <= u_wr + 1'b1;
      u_cnt <= u_cnt + (UPTR_W+1)'(u_push) - (UPTR_W+1)'(u_pop);
      if (u_pop) u_rd <= u_rd + 1'b1;
      // pending repairs
      for (int t = 0; t < NUM_THREADS; t++) begin
        if (rep.valid && rep.tid == tid_t'(t)) rep_pend[t] <= 1'b1;
        else if (start_rep && rep_sel == tid_t'(t)) rep_pend[t] <= 1'b0;
      end

      unique case (state)
        S_IDLE: begin
          if (start_rep)       state <= S_R1;
          else if (start_upd)  state <= S_U1;
          else if (start_pred) state <= S_P1;
        end
        S_P1: state <= S_P2;
        S_P2: begin
          state      <= S_IDLE;
          ghr[o_tid] <= {o_ghist[GHIST_W-3:0], res_bits};
        end
        S_U1: state <= S_U2;
        S_U2: begin
          state          <= S_IDLE;
          loc_v[o_lidx]  <= 1'b1;
          glb_v[o_gidx]  <= 1'b1;
          cho_v[o_cidx]  <= 1'b1;
        end
        S_R1: begin
          state      <= S_IDLE;
          ghr[o_tid] <= {o_ghist[GHIST_W-3:0], tgt_bits};
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- datapath registers and table writes (no reset needed) ----
  always_ff @(posedge clk) begin
    if (u_push) ufifo[u_wr] <= upd;
    if (rep.valid) rep_q[rep.tid] <= rep;

    if (state == S_IDLE) begin
      if (start_rep) begin
        o_tid    <= rep_sel;
        o_ghist  <= rep_q[rep_sel].ghist;
        o_target <= rep_q[rep_sel].target[VA_W-1:CHUNK_OFF];
      end else if (start_upd && u_head.valid) begin
        o_tid    <= u_head.tid;
        o_baddr  <= u_head.baddr;
        o_ghist  <= u_head.ghist;
        o_target <= u_head.target[VA_W-1:CHUNK_OFF];
        o_lidx   <= u_lidx;
        o_gidx   <= u_gidx;
        o_cidx   <= u_head.ghist;
        r_loc    <= loc_tgt[u_lidx];
        r_loc_v  <= loc_v[u_lidx];
        r_glb    <= glb_tgt[u_gidx];
        r_glb_v  <= glb_v[u_gidx];
        r_cho    <= cho_v[u_head.ghist] ? cho[u_head.ghist] : 2'b01;
      end else if (start_pred) begin
        o_tid    <= pred_req_tid;
        o_baddr  <= pred_req_baddr;
        o_ghist  <= p_hist;
        r_loc    <= loc_tgt[p_lidx];
        r_loc_v  <= loc_v[p_lidx];
        r_glb    <= glb_tgt[p_gidx];
        r_glb_v  <= glb_v[p_gidx];
        r_cho    <= cho_v[p_hist] ? cho[p_hist] : 2'b01;
      end
    end

    if (state == S_P1) o_result <= pick;

    if (state == S_U1) begin
      // Train the chooser towards the component that was right.
      logic lc, gc;
      lc = r_loc_v && (r_loc == o_target);
      gc = r_glb_v && (r_glb == o_target);
      if (gc && !lc && r_cho != 2'b11) r_cho <= r_cho + 2'b01;
      if (lc && !gc && r_cho != 2'b00) r_cho <= r_cho - 2'b01;
    end

    if (state == S_U2) begin
      loc_tgt[o_lidx] <= o_target;
      glb_tgt[o_gidx] <= o_target;
      cho[o_cidx]     <= r_cho;
    end
  end

  // Assertions are enabled by a flag set after reset, so that rst_n is
  // only ever used as an asynchronous reset.
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;

  a_upd_no_overflow: assert property (@(posedge clk) disable iff (!chk_en)
    u_push |-> (u_cnt < (UPTR_W+1)'(UPD_DEPTH)) || u_pop);


endmodule

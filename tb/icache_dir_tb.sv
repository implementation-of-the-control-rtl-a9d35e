// icache_dir_tb: self-checking test of the 2-way LRU I-cache directory.
// A reference model (per set: two valid/tag/header ways and an LRU bit)
// runs beside the directory. Random block addresses are looked up; on a
// hit the way is touched, on a miss the block is installed in the victim
// way. Hit, hit way, header and victim way are checked after each lookup,
// which exercises replacement, LRU order and virtual indexing.
// Size (64 sets x 2 ways) and LRU replacement follow the description; the
// invalid-way-first victim choice is this design's own.
module icache_dir_tb;
  import gt_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real reset edge at the start
  always #5 clk = ~clk;

  logic  lk_valid = 0; set_t lk_set = '0; ptag_t cmp_ptag = '0;
  logic  hit, hit_way, victim_way; hdr_t hit_hdr;
  logic  touch_valid = 0, touch_way = 0; set_t touch_set = '0;
  logic  wr_valid = 0, wr_way = 0; set_t wr_set = '0; ptag_t wr_ptag = '0; hdr_t wr_hdr = '0;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_evict = 0;

  icache_dir dut (.clk, .rst_n, .lk_valid, .lk_set, .cmp_ptag, .hit, .hit_way,
                  .hit_hdr, .victim_way, .touch_valid, .touch_set, .touch_way,
                  .wr_valid, .wr_set, .wr_way, .wr_ptag, .wr_hdr);

  // reference model
  logic  m_v   [DIR_SETS][2];
  ptag_t m_tag [DIR_SETS][2];
  hdr_t  m_hdr [DIR_SETS][2];
  logic  m_lru [DIR_SETS];

  function automatic hdr_t hdr_of(input ptag_t t);
    return hdr_t'(t ^ (t >> 8));
  endfunction

  task automatic access(input ptag_t tag, input set_t s);
    logic e_hit, e_way, e_vic;
    @(negedge clk);
    lk_valid = 1; lk_set = s;
    @(negedge clk);
    lk_valid = 0; cmp_ptag = tag;
    e_hit = 0; e_way = 0;
    for (int w = 0; w < 2; w++)
      if (m_v[s][w] && m_tag[s][w] == tag && !e_hit) begin e_hit = 1; e_way = 1'(w); end
    e_vic = !m_v[s][0] ? 1'b0 : !m_v[s][1] ? 1'b1 : m_lru[s];
    #1;
    checks++;
    if (hit !== e_hit || (e_hit && (hit_way !== e_way || hit_hdr !== m_hdr[s][e_way])) ||
        (!e_hit && victim_way !== e_vic)) begin
      failures++;
      $display("FAIL set=%0d tag=%h hit=%b way=%b vic=%b exp hit=%b way=%b vic=%b",
               s, tag, hit, hit_way, victim_way, e_hit, e_way, e_vic);
    end
    if (e_hit) begin
      n_hit++;
      touch_valid = 1; touch_set = s; touch_way = e_way;
      m_lru[s] = ~e_way;
    end else begin
      n_miss++;
      if (m_v[s][0] && m_v[s][1]) n_evict++;
      wr_valid = 1; wr_set = s; wr_way = e_vic; wr_ptag = tag; wr_hdr = hdr_of(tag);
      m_v[s][e_vic] = 1; m_tag[s][e_vic] = tag; m_hdr[s][e_vic] = hdr_of(tag);
      m_lru[s] = ~e_vic;
    end
    @(negedge clk);
    touch_valid = 0; wr_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < DIR_SETS; s++) begin
      m_v[s][0] = 0; m_v[s][1] = 0; m_lru[s] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Three blocks mapping to one set: A, B, A (hit), C evicts B (LRU), B misses.
    access(ptag_t'(33'h100), 6'd5);
    access(ptag_t'(33'h200), 6'd5);
    access(ptag_t'(33'h100), 6'd5);
    access(ptag_t'(33'h300), 6'd5);
    access(ptag_t'(33'h200), 6'd5);
    access(ptag_t'(33'h300), 6'd5);
    // random traffic over a small tag pool so hits and evictions both occur
    for (int i = 0; i < 3000; i++) begin
      ptag_t t;
      t = ptag_t'($urandom_range(0, 11)) << 8 | ptag_t'($urandom_range(0, 3));
      access(t, set_t'(t[1:0]));
    end
    checks++;
    if (n_hit == 0 || n_evict == 0) begin
      failures++;
      $display("FAIL coverage hits=%0d evictions=%0d", n_hit, n_evict);
    end
    $display("hits=%0d misses=%0d evictions=%0d", n_hit, n_miss, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

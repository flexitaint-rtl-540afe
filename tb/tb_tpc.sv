// tb_tpc: self-checking test of the Taint Propagation Cache.
// A reference model is kept per index: it holds the last key filled there,
// or nothing after a flash clear. Random lookups must hit exactly when the
// model holds the same key, and must return its taint and exception bit.
// Keys are drawn from a small pool so that hits, conflict misses and
// replacements all happen.
module tb_tpc;
  import ft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flash_clr;
  tpc_key_t lk_key, fill_key;
  logic lk_hit, lk_exc, fill_en, fill_exc;
  taint_t lk_taint, fill_taint;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  tpc #(.ENTRIES(128)) dut (.*);

  logic     m_v   [128];
  tpc_key_t m_key [128];
  taint_t   m_t   [128];
  logic     m_e   [128];
  tpc_key_t pool  [64];

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flash_clr = 0; fill_en = 0; fill_key = '0; fill_taint = '0; fill_exc = 0; lk_key = '0;
    for (int i = 0; i < 128; i++) m_v[i] = 0;
    for (int i = 0; i < 64; i++) pool[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int unsigned idx;
      @(negedge clk);
      lk_key = pool[$urandom_range(0, 63)];
      #1;
      idx = tpc_fold(lk_key);
      checks++;
      if (lk_hit !== (m_v[idx] && m_key[idx] == lk_key) ||
          (lk_hit && (lk_taint !== m_t[idx] || lk_exc !== m_e[idx]))) begin
        failures++;
        $display("FAIL it=%0d key %h hit %0d", it, lk_key, lk_hit);
      end
      if (lk_hit) hits++; else misses++;
      // the handler fills a miss; now and then the policy changes
      fill_en = !lk_hit;
      fill_key = lk_key;
      fill_taint = taint_t'($urandom);
      fill_exc = 1'($urandom);
      flash_clr = ($urandom_range(0, 499) == 0);
      @(posedge clk);
      if (flash_clr) for (int i = 0; i < 128; i++) m_v[i] = 0;
      else if (fill_en) begin
        m_v[idx] = 1; m_key[idx] = fill_key; m_t[idx] = fill_taint; m_e[idx] = fill_exc;
      end
      #1 fill_en = 0; flash_clr = 0;
    end
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

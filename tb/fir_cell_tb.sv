// fir_cell_tb: self-checking test of one basic cell.
//
// Drives random configurations (every select code of the four multiplexers),
// random S(p), M(p), A(p), spare and constants, and random step pulses.  The
// expected S(n), M(n), A(n) come from a small model of the cell kept in this
// file; the delayed S path is checked to hold its value while step is low
// and to load the Mux 1 value one step later.  A watchdog ends the run.
module fir_cell_tb;
  import fir_pkg::*;

  logic      clk = 1'b0;
  logic      rst, step;
  cell_cfg_t cfg;
  sample_t   spare, s_p, m_p, a_p, s_n, m_n, a_n;
  int        checks = 0, failures = 0;
  int        seen_sel [4][4];   // [mux][code] coverage

  fir_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t pick(logic [1:0] c, sample_t s, sample_t m,
                                   sample_t a, sample_t k);
    return c == 0 ? s : c == 1 ? m : c == 2 ? a : k;
  endfunction

  sample_t ref_dly, e_s, e_m, e_a, e_mux1;

  initial begin
    rst = 1; step = 0; cfg = '0; spare = 0; s_p = 0; m_p = 0; a_p = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    ref_dly = 0;
    // directed: canonical tap, k=3, sum in 100, x = 7 then 9
    cfg = '{sel: '{mux4: SRC_A, mux3: SRC_CONST, mux2: S_DELAYED, mux1: SRC_S},
            mul_k: 16'sd3, add_k: 16'sd0};
    s_p = 7; a_p = 100; step = 1;
    @(negedge clk);
    s_p = 9; step = 0; #1;
    checks++; if (s_n !== 7 || m_n !== 21 || a_n !== 121) begin
      failures++; $display("canonical tap: s=%0d m=%0d a=%0d", s_n, m_n, a_n);
    end
    ref_dly = 7;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      cfg.sel   = cell_sel_t'($urandom_range(0, 127));
      cfg.mul_k = sample_t'($urandom);
      cfg.add_k = sample_t'($urandom);
      if (it % 7 == 0) cfg.mul_k = 1;     // multiplier bypass
      if (it % 5 == 0) cfg.add_k = 0;     // adder bypass
      s_p = sample_t'($urandom); m_p = sample_t'($urandom);
      a_p = sample_t'($urandom); spare = sample_t'($urandom);
      step = $urandom_range(0, 2) != 0;
      #1;
      e_mux1 = pick(cfg.sel.mux1, s_p, m_p, a_p, spare);
      e_s    = cfg.sel.mux2 == S_DELAYED ? ref_dly : e_mux1;
      e_m    = sample_t'(e_s * pick(cfg.sel.mux3, s_p, m_p, a_p, cfg.mul_k));
      e_a    = sample_t'(e_m + pick(cfg.sel.mux4, s_p, m_p, a_p, cfg.add_k));
      seen_sel[0][int'(cfg.sel.mux1)]++; seen_sel[1][int'(cfg.sel.mux2)]++;
      seen_sel[2][cfg.sel.mux3]++; seen_sel[3][cfg.sel.mux4]++;
      checks++;
      if (s_n !== e_s || m_n !== e_m || a_n !== e_a) begin
        failures++;
        if (failures < 10)
          $display("it %0d sel=%b: got %0d/%0d/%0d exp %0d/%0d/%0d", it, cfg.sel,
                   s_n, m_n, a_n, e_s, e_m, e_a);
      end
      if (step) ref_dly = e_mux1;
    end
    // reset clears the delay register
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    cfg.sel.mux2 = S_DELAYED; #1;
    checks++; if (s_n !== 0) begin failures++; $display("reset did not clear delay"); end
    for (int m = 0; m < 4; m++)
      for (int c = 0; c < (m == 1 ? 2 : 4); c++) begin
        checks++;
        if (seen_sel[m][c] == 0) begin failures++; $display("mux %0d code %0d never used", m+1, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fir_256tap_tb: a 256-tap filter on a line of 256 basic cells, fed one
// sample per clock.
//
// 256 taps is the size used to contrast a fully parallel filter (all taps in
// one clock) with a sequential one (one tap per clock).  The line of cells is
// built with N_CELLS = 256, configured as a canonical direct-form filter with
// random coefficients, and step is held high so a new sample enters every
// clock.  Checks: the impulse response reads out all 256 coefficients on 256
// consecutive clocks; then 600 random samples, one per clock, each output
// compared with the 256-term convolution sum one clock after its sample
// entered (one output per clock, no stall); then the filter is cut to 100
// taps on the fly and checked again.
module fir_256tap_tb;
  import fir_pkg::*;

  localparam int N = 256;

  logic      clk = 1'b0;
  logic      rst, step;
  sample_t   x_in, y, s_last, m_last;
  cell_cfg_t cfg [N];
  int        checks = 0, failures = 0, outputs = 0;

  fir_array #(.N_CELLS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  shortint hist [N];
  shortint k [N];

  function automatic shortint conv(int taps);
    int acc = 0;
    for (int i = 0; i < taps; i++) acc += int'(k[i]) * int'(hist[i]);
    return shortint'(acc);
  endfunction

  task automatic configure(int taps);
    for (int i = 0; i < N; i++)
      cfg[i] = '{sel: '{mux4: SRC_A, mux3: SRC_CONST,
                        mux2: (i == 0) ? S_DIRECT : S_DELAYED, mux1: SRC_S},
                 mul_k: (i < taps) ? k[i] : 16'sd0, add_k: '0};
  endtask

  // one sample per clock: present x, clock, compare y with the new sum
  task automatic clock_in(shortint v, int taps, shortint expect_override = 0,
                          bit use_override = 0);
    x_in = v;
    @(negedge clk);
    for (int i = N-1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    #1;
    outputs++;
    checks++;
    if (y !== (use_override ? expect_override : conv(taps))) begin
      failures++;
      if (failures < 10) $display("output %0d: y=%0d exp %0d", outputs, y,
                                  use_override ? expect_override : conv(taps));
    end
  endtask

  initial begin
    longint t0;
    rst = 1; step = 0; x_in = 0;
    for (int i = 0; i < N; i++) begin hist[i] = 0; k[i] = shortint'($urandom_range(0, 40)) - 20; end
    configure(N);
    @(negedge clk); @(negedge clk); rst = 0;
    step = 1;                                  // a new sample every clock
    t0 = $time;
    clock_in(1, N, k[0], 1);
    for (int i = 1; i < N; i++) clock_in(0, N, k[i], 1);
    for (int n = 0; n < 600; n++) clock_in(shortint'($urandom_range(0, 200)) - 100, N);
    // rate: 856 outputs in 856 clocks
    checks++;
    if (($time - t0) / 10 != longint'(outputs)) begin
      failures++; $display("%0d outputs took %0d clocks", outputs, ($time - t0) / 10);
    end
    // 100 taps, on the fly
    for (int i = 0; i < N; i++) k[i] = shortint'($urandom_range(0, 40)) - 20;
    configure(100);
    for (int n = 0; n < 300; n++) clock_in(shortint'($urandom_range(0, 200)) - 100, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

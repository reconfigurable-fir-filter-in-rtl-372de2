// fir_array_tb: self-checking test of the line of basic cells.
//
// Part 1 configures the canonical direct-form filter with random
// coefficients and checks y against the convolution sum k0*x(n) + ... +
// k(N-1)*x(n-N+1), computed here from the sample history; an impulse must
// read out the coefficients one per step.  Part 2 shortens the filter to
// fewer taps on the fly (trailing cells set to pass A through) and checks the
// shorter sum without a reset.  Part 3 gives every cell random selection
// bits and constants and compares S, M, A of the last cell with the chain
// model in fir_ref_pkg, reconfiguring while samples flow.
module fir_array_tb;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  localparam int N = 16;

  logic      clk = 1'b0;
  logic      rst, step;
  sample_t   x_in, y, s_last, m_last;
  cell_cfg_t cfg [N];
  int        checks = 0, failures = 0;

  fir_array #(.N_CELLS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  shortint hist [N];      // hist[0] = newest sample
  shortint k [N];
  ref_cfg_t   rc [MAXC];
  ref_state_t rs;

  function automatic shortint conv(int taps);
    int acc = 0;
    for (int i = 0; i < taps; i++) acc += int'(k[i]) * int'(hist[i]);
    return shortint'(acc);
  endfunction

  task automatic canonical(int taps);
    for (int i = 0; i < N; i++) begin
      if (i < taps)
        cfg[i] = '{sel: '{mux4: SRC_A, mux3: SRC_CONST,
                          mux2: (i == 0) ? S_DIRECT : S_DELAYED, mux1: SRC_S},
                   mul_k: k[i], add_k: '0};
      else
        cfg[i] = CFG_IDLE;  // coefficient 0, A passes through
    end
  endtask

  task automatic push(shortint v);
    x_in = v; step = 1;
    @(negedge clk);
    step = 0;
    for (int i = N-1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    #1;
  endtask

  initial begin
    rst = 1; step = 0; x_in = 0;
    for (int i = 0; i < N; i++) begin cfg[i] = CFG_IDLE; hist[i] = 0; end
    @(negedge clk); @(negedge clk); rst = 0;

    // ---- part 1: impulse response of the canonical filter
    for (int i = 0; i < N; i++) k[i] = shortint'($urandom_range(0, 200)) - 100;
    canonical(N);
    push(1);
    checks++; if (y !== k[0]) begin failures++; $display("impulse tap 0: %0d", y); end
    for (int i = 1; i < N; i++) begin
      push(0);
      checks++; if (y !== k[i]) begin failures++; $display("impulse tap %0d: %0d exp %0d", i, y, k[i]); end
    end
    push(0);
    checks++; if (y !== 0) begin failures++; $display("impulse tail %0d", y); end
    // random samples
    for (int n = 0; n < 200; n++) begin
      push(shortint'($urandom_range(0, 2000)) - 1000);
      checks++;
      if (y !== conv(N)) begin failures++; $display("full: n=%0d y=%0d exp %0d", n, y, conv(N)); end
    end

    // ---- part 2: fewer taps and new coefficients, no reset
    for (int taps = 1; taps <= N; taps += 5) begin
      for (int i = 0; i < N; i++) k[i] = shortint'($urandom_range(0, 64)) - 32;
      canonical(taps);
      for (int n = 0; n < 40; n++) begin
        push(shortint'($urandom_range(0, 2000)) - 1000);
        checks++;
        if (y !== conv(taps)) begin
          failures++; $display("taps=%0d n=%0d y=%0d exp %0d", taps, n, y, conv(taps));
        end
      end
    end

    // ---- part 3: random topologies against the chain model
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    rs.x = 0; for (int i = 0; i < MAXC; i++) rs.d[i] = 0;
    for (int n = 0; n < 1500; n++) begin
      if (n % 25 == 0)
        for (int i = 0; i < N; i++) begin
          cfg[i].sel   = cell_sel_t'($urandom_range(0, 127));
          cfg[i].mul_k = sample_t'($urandom_range(0, 6)) - 3;
          cfg[i].add_k = sample_t'($urandom);
          rc[i].sel = 32'(cfg[i].sel); rc[i].k = cfg[i].mul_k; rc[i].c = cfg[i].add_k;
        end
      x_in = sample_t'($urandom); step = $urandom_range(0, 3) != 0;
      @(negedge clk);
      if (step) advance(rc, N, rs, x_in);
      step = 0;
      #1;
      begin
        shortint es, em, ea;
        eval(rc, N, rs, es, em, ea);
        checks++;
        if (y !== ea || s_last !== es || m_last !== em) begin
          failures++;
          if (failures < 10) $display("random n=%0d got %0d/%0d/%0d exp %0d/%0d/%0d",
                                      n, s_last, m_last, y, es, em, ea);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

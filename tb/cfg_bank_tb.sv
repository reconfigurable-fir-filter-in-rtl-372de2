// cfg_bank_tb: self-checking test of the per-cell configuration store.
//
// Checks the reset value of every word, then performs random writes (some to
// indices past the last cell, which must change nothing) and compares all
// words with a copy kept here after every clock.  A watchdog ends the run.
module cfg_bank_tb;
  import fir_pkg::*;

  localparam int N = 16;

  logic       clk = 1'b0;
  logic       rst, we;
  logic [7:0] waddr;
  cell_cfg_t  wdata;
  cell_cfg_t  cfg [N];
  cell_cfg_t  shadow [N];
  int         checks = 0, failures = 0, ignored = 0;

  cfg_bank #(.N_CELLS(N), .ADDR_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (cfg[i] !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("%s: cell %0d got %h exp %h", what, i, cfg[i], shadow[i]);
      end
    end
  endtask

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < N; i++)
      shadow[i] = '{sel: '{mux4: SRC_A, mux3: SRC_CONST, mux2: S_DELAYED, mux1: SRC_S},
                    mul_k: 0, add_k: 0};
    compare("reset");
    for (int n = 0; n < 1000; n++) begin
      we    = $urandom_range(0, 3) != 0;
      waddr = 8'($urandom_range(0, N + 8));
      wdata = cell_cfg_t'({$urandom, $urandom});
      @(negedge clk);
      if (we && int'(waddr) < N) shadow[int'(waddr)] = wdata;
      else if (we) ignored++;
      compare("write");
    end
    checks++; if (ignored == 0) begin failures++; $display("no out-of-range write tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_eoc_comparator: self-checking test of one comparator module.
//
// Random organism positions (with deliberate ties and coincident points) are
// applied; the testbench runs the eight accumulate steps and the narrow step
// like the RL sequencer does, then compares flag, closest index and distance
// with a brute-force search over all other organisms (smaller index wins a
// tie, inclusive threshold). It also checks that results appear exactly one
// cycle after the narrow step.
`timescale 1ns/1ps
module tb_eoc_comparator;
  import eoc_pkg::*;
  localparam int unsigned N = 32, LANES = 4, STEPS = N / LANES, SELF = 5;

  logic clk = 0, rst_n = 0;
  organism_t [N-1:0] vars;
  logic acc, narrow;
  logic [$clog2(STEPS)-1:0] step;
  logic [DIST_W-1:0] threshold;
  logic flag;
  logic [$clog2(N)-1:0] adata;
  logic [DIST_W-1:0] min_dist;
  int checks = 0, failures = 0;

  eoc_comparator #(.N(N), .LANES(LANES), .SELF(SELF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absd(int a, int b);
    return a > b ? a - b : b - a;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    acc = 0; narrow = 0; step = '0; threshold = 9'd40; vars = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int best_d, best_j, d;
      // positions: small area in some trials so ties and hits are common
      for (int j = 0; j < N; j++) begin
        vars[j].male = 1'($urandom);
        if (t % 3 == 0) begin
          vars[j].x = 8'($urandom_range(0, 15));
          vars[j].y = 8'($urandom_range(0, 15));
        end else begin
          vars[j].x = 8'($urandom);
          vars[j].y = 8'($urandom);
        end
      end
      if (t % 5 == 1) vars[(SELF + 9) % N] = vars[SELF];  // coincident organism
      threshold = (t % 4 == 0) ? 9'($urandom_range(0, 511)) : 9'($urandom_range(0, 80));
      best_d = 1 << 30; best_j = -1;
      for (int j = 0; j < N; j++) begin
        if (j == SELF) continue;
        d = absd(vars[SELF].x, vars[j].x) + absd(vars[SELF].y, vars[j].y);
        if (d < best_d) begin best_d = d; best_j = j; end
      end
      // run the sequence
      for (int s = 0; s < STEPS; s++) begin
        acc <= 1; step <= $clog2(STEPS)'(s);
        @(posedge clk);
      end
      acc <= 0; narrow <= 1;
      @(posedge clk);
      narrow <= 0;
      #1;
      check("flag", int'(flag), int'(best_d <= int'(threshold)));
      check("closest index", int'(adata), best_j);
      check("distance", int'(min_dist), best_d);
      // results hold while the module is idle
      @(posedge clk); #1;
      check("hold", int'(adata), best_j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_eoc_rl_array: self-checking test of the reconfigurable logic.
//
// The testbench plays the VRF (holds 32 random organisms and flips the
// request toggle) and the result tree (answers the result request after a
// random delay). For each round it checks every flag and closest index
// against a brute-force model, that results are announced exactly 9 edges
// after the acknowledge edge (10 cycles: acknowledge, 8 steps, narrow), that
// the RL stays busy until the tree answers, and that a VRF request made
// meanwhile waits for it.
`timescale 1ns/1ps
module tb_eoc_rl_array;
  import eoc_pkg::*;
  localparam int unsigned N = 32, LANES = 4, IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [DIST_W-1:0] threshold;
  organism_t [N-1:0] vrf_vars;
  logic vrf_req_tgl, vrf_ack_tgl, res_req_tgl, res_ack_tgl, busy;
  logic [N-1:0] flags;
  logic [N-1:0][IW-1:0] adata;
  int checks = 0, failures = 0;

  eoc_rl_array #(.N(N), .LANES(LANES)) dut (.*);

  always #8.13 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int absd(int a, int b);
    return a > b ? a - b : b - a;
  endfunction

  int cyc = 0, ack_cyc, res_cyc;
  logic vack_q, rreq_q;
  always @(posedge clk) begin
    cyc++;
    vack_q <= vrf_ack_tgl;
    rreq_q <= res_req_tgl;
    if (vack_q != vrf_ack_tgl) ack_cyc = cyc - 1;
    if (rreq_q != res_req_tgl) res_cyc = cyc - 1;
  end

  initial begin
    vrf_vars = '0; vrf_req_tgl = 0; res_ack_tgl = 0; threshold = 9'd30;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 60; round++) begin
      int exp_flag [N];
      int exp_idx [N];
      int hold;
      for (int j = 0; j < N; j++) begin
        vrf_vars[j].male = 1'($urandom);
        vrf_vars[j].x = (round % 2) ? 8'($urandom_range(0, 40)) : 8'($urandom);
        vrf_vars[j].y = (round % 2) ? 8'($urandom_range(0, 40)) : 8'($urandom);
      end
      threshold = 9'($urandom_range(0, 60));
      for (int i = 0; i < N; i++) begin
        int bd, bj, d;
        bd = 1 << 30; bj = 0;
        for (int j = 0; j < N; j++) begin
          if (j == i) continue;
          d = absd(vrf_vars[i].x, vrf_vars[j].x) + absd(vrf_vars[i].y, vrf_vars[j].y);
          if (d < bd) begin bd = d; bj = j; end
        end
        exp_flag[i] = int'(bd <= int'(threshold));
        exp_idx[i] = bj;
      end
      @(negedge clk);
      vrf_req_tgl = ~vrf_req_tgl;
      wait (res_req_tgl != res_ack_tgl);
      @(posedge clk);
      @(negedge clk);
      check("results 9 edges after acknowledge", res_cyc - ack_cyc, 9);
      for (int i = 0; i < N; i++) begin
        check("flag", int'(flags[i]), exp_flag[i]);
        check("closest index", int'(adata[i]), exp_idx[i]);
      end
      // the VRF may already be rewritten: results must not move until the
      // tree has answered, and a new request must wait
      for (int j = 0; j < N; j++) vrf_vars[j] = organism_t'($urandom);
      if (round % 3 == 0) vrf_req_tgl = ~vrf_req_tgl;
      hold = $urandom_range(0, 12);
      repeat (hold) @(negedge clk);
      check("busy while results are offered", int'(busy), 1);
      check("no second acknowledge meanwhile", int'(vrf_ack_tgl != vrf_req_tgl), int'(round % 3 == 0));
      for (int i = 0; i < N; i++) check("result held", int'(flags[i]), exp_flag[i]);
      res_ack_tgl = res_req_tgl;
      if (round % 3 == 0) begin
        // let the queued request run, then answer it too
        wait (res_req_tgl != res_ack_tgl);
        @(negedge clk);
        res_ack_tgl = res_req_tgl;
      end
      repeat (4) @(negedge clk);
      check("idle again", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

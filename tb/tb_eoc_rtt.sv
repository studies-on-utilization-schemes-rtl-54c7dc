// tb_eoc_rtt: self-checking test of the result-transferring tree.
//
// The testbench plays the reconfigurable logic (offers flag/data sets with a
// toggle request) and the processor (reads the queue with a random or
// always-high ready). For every set it checks that exactly the flagged
// conditions come out, each once and with its own additional data, that
// set_done follows, and, with ready held high, that the first unit reaches
// the end of the queue 8 cycles after the acknowledge cycle (N = 32, four
// queue registers). Empty sets, full sets and back-to-back sets are included.
`timescale 1ns/1ps
module tb_eoc_rtt;
  localparam int unsigned N = 32, QD = 4, IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [N-1:0] flags;
  logic [N-1:0][IW-1:0] adata;
  logic res_req_tgl, res_ack_tgl;
  logic cp_valid, cp_ready, set_done, idle;
  logic [IW-1:0] cp_idx, cp_adata;
  int checks = 0, failures = 0;

  eoc_rtt #(.N(N), .QD(QD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // processor side: collect what comes out
  int got_cnt [N];
  int got_data [N];
  int n_got = 0, done_cnt = 0;
  int ready_mode = 0;       // 0: always ready, 1: random
  int cyc = 0, load_cyc = -1, first_cyc = -1;

  logic ack_q;
  always @(posedge clk) begin
    cyc++;
    ack_q <= res_ack_tgl;
    if (rst_n) begin
      // values sampled here were set by the previous edge
      if (ack_q != res_ack_tgl) load_cyc = cyc - 1;
      if (cp_valid && first_cyc < 0) first_cyc = cyc - 1;
      if (cp_valid && cp_ready) begin
        if (got_cnt[cp_idx] == 0) got_data[cp_idx] = int'(cp_adata);
        got_cnt[cp_idx]++;
        n_got++;
      end
      if (set_done) done_cnt++;
    end
    cp_ready <= (ready_mode == 0) ? 1'b1 : 1'($urandom_range(0, 2) == 0);
  end

  task automatic run_set(logic [N-1:0] f, int mode, bit check_latency);
    logic [N-1:0][IW-1:0] d;
    int exp_n, d0;
    for (int i = 0; i < N; i++) d[i] = IW'($urandom);
    exp_n = $countones(f);
    for (int i = 0; i < N; i++) begin got_cnt[i] = 0; got_data[i] = -1; end
    n_got = 0; d0 = done_cnt; first_cyc = -1; load_cyc = -1;
    ready_mode = mode;
    @(negedge clk);
    flags = f; adata = d;
    res_req_tgl = ~res_req_tgl;
    wait (done_cnt != d0);
    @(negedge clk);
    check("units delivered", n_got, exp_n);
    for (int i = 0; i < N; i++) begin
      check("unit count per index", got_cnt[i], int'(f[i]));
      if (f[i]) check("additional data", got_data[i], int'(d[i]));
    end
    if (check_latency && exp_n > 0)
      check("cycles from acknowledge to end of queue", first_cyc - load_cyc, 8);
    check("request acknowledged", int'(res_ack_tgl), int'(res_req_tgl));
  endtask

  initial begin
    flags = '0; adata = '0; res_req_tgl = 0; cp_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check("idle after reset", int'(idle), 1);
    // document's example: 4 of 32 conditions true
    run_set(32'h0010_8402, 0, 1);
    run_set('0, 0, 0);                       // nothing fired
    run_set('1, 0, 1);                       // everything fired
    run_set('1, 1, 0);                       // everything fired, slow reader
    run_set(32'h8000_0000, 0, 1);            // last leaf only
    for (int t = 0; t < 200; t++) begin
      logic [N-1:0] f;
      f = '0;
      for (int i = 0; i < N; i++) f[i] = ($urandom_range(0, 99) < (t % 4) * 12 + 3);
      run_set(f, t % 2, t % 2 == 0);
    end
    // back to back: the second set must wait until the leaves are free;
    // set_done then reports once that everything taken has been read
    begin
      int d0;
      ready_mode = 1;
      for (int i = 0; i < N; i++) begin got_cnt[i] = 0; end
      n_got = 0; d0 = done_cnt;
      @(negedge clk);
      flags = '1; res_req_tgl = ~res_req_tgl;
      wait (res_ack_tgl == res_req_tgl);
      @(negedge clk);
      flags = 32'h0000_00ff; res_req_tgl = ~res_req_tgl;
      wait (done_cnt > d0 && n_got >= 40);
      repeat (10) @(negedge clk);
      check("one set_done for the merged sets", done_cnt - d0, 1);
      check("back-to-back units", n_got, 40);
      for (int i = 0; i < N; i++) check("back-to-back per index", got_cnt[i], i < 8 ? 2 : 1);
    end
    repeat (5) @(posedge clk);
    check("idle at end", int'(idle), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

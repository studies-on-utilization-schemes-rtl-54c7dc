// tb_eoc_system: end-to-end test of the EOC accelerator at its default size
// (32 organisms, four distance units per comparator, four queue registers)
// with the three clocks of the evaluated system (VRF 200 MHz, RL 61.5 MHz,
// RTT 80 MHz).
//
// A behavioural core processor runs the artificial-life example: 32
// organisms, half male, start at random positions; every round it writes all
// 32 positions into the VRF, commits, reads the fired conditions from the
// result tree and applies the update actions (a male chases a nearby
// female, organisms that are too close or of the same sex move apart, the
// rest walk at random). Every unit read is checked against a brute-force
// model of the condition (closest other organism within the threshold), and
// so is the set of units: none missing, none twice.
//
// Mechanisms counted (each must occur at least once): conditions firing, a
// round with no hit, a round where all 32 fire, two fired siblings in the
// tree (priority to the smaller index), the processor holding off the
// queue, the processor waiting on a busy VRF, and the reconfigurable logic
// waiting for the tree to take its results (back-to-back commits). The time
// from commit to the first result is checked against the cycle budget of
// the three domains.
`timescale 1ps/1ps
module tb_eoc_system;
  import eoc_pkg::*;
  localparam int unsigned N = N_VARS, IW = $clog2(N);
  localparam int TOO_CLOSE = 3;

  logic clk_vrf = 0, clk_rl = 0, clk_rtt = 0, rst_n = 0;
  logic [DIST_W-1:0] threshold;
  logic cp_wr_en, cp_commit, cp_vrf_busy;
  logic [IW-1:0] cp_wr_addr;
  organism_t cp_wr_data;
  logic cp_valid, cp_ready, cp_set_done, rtt_idle, rl_busy;
  logic [IW-1:0] cp_idx, cp_adata;
  int checks = 0, failures = 0;

  eoc_system dut (.*);

  always #2500 clk_vrf = ~clk_vrf;   // 200 MHz
  always #8130 clk_rl  = ~clk_rl;    // 61.5 MHz
  always #6250 clk_rtt = ~clk_rtt;   // 80 MHz

  initial begin
    repeat (400000) @(posedge clk_rtt);
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

  // world state kept by the processor
  organism_t world [N];

  // ---------------- processor read side (clk_rtt) ----------------
  int got_cnt [N];
  int got_adata [N];
  int n_got = 0, n_done = 0;
  int ready_mode = 0;
  longint t_first = -1;
  int cnt_backpressure = 0;
  int hold_cnt = 0;

  always @(posedge clk_rtt) begin
    if (rst_n) begin
      if (cp_valid && !cp_ready) cnt_backpressure++;
      if (cp_valid && t_first < 0) t_first = $time;
      if (cp_valid && cp_ready) begin
        got_cnt[cp_idx]++;
        got_adata[cp_idx] = int'(cp_adata);
        n_got++;
      end
      if (cp_set_done) n_done++;
    end
    // mode 0: always ready, 1: ready one cycle in four, 2: hold off 300 cycles
    if (ready_mode == 2) begin
      hold_cnt++;
      cp_ready <= (hold_cnt > 300);
    end else begin
      hold_cnt = 0;
      cp_ready <= (ready_mode == 0) ? 1'b1 : 1'($urandom_range(0, 3) == 0);
    end
  end

  // reconfigurable logic waiting for the tree to take its results
  int cnt_rl_wait = 0;
  always @(posedge clk_rl)
    if (rst_n && dut.res_req_tgl != dut.res_ack_tgl && dut.u_rtt.tv[2*N-1:N] != '0)
      cnt_rl_wait++;

  // ---------------- processor write side (clk_vrf) ----------------
  int cnt_vrf_wait = 0;

  task automatic write_all();
    for (int i = 0; i < N; i++) begin
      @(negedge clk_vrf);
      while (cp_vrf_busy) begin cnt_vrf_wait++; @(negedge clk_vrf); end
      cp_wr_en = 1; cp_wr_addr = IW'(i); cp_wr_data = world[i];
      @(negedge clk_vrf);
      cp_wr_en = 0;
    end
  endtask

  task automatic do_commit();
    @(negedge clk_vrf);
    while (cp_vrf_busy) begin cnt_vrf_wait++; @(negedge clk_vrf); end
    cp_commit = 1;
    @(negedge clk_vrf);
    cp_commit = 0;
  endtask

  // reference: expected flag and closest index of every organism
  int exp_flag [N];
  int exp_idx [N];
  int cnt_hits = 0, cnt_zero_rounds = 0, cnt_full_rounds = 0, cnt_siblings = 0;

  task automatic model_round();
    for (int i = 0; i < N; i++) begin
      int bd, bj, d;
      bd = 1 << 30; bj = 0;
      for (int j = 0; j < N; j++) begin
        if (j == i) continue;
        d = absd(world[i].x, world[j].x) + absd(world[i].y, world[j].y);
        if (d < bd) begin bd = d; bj = j; end
      end
      exp_flag[i] = int'(bd <= int'(threshold));
      exp_idx[i] = bj;
    end
  endtask

  function automatic logic [COORD_W-1:0] step_to(int from, int to, int dir);
    int v;
    v = from + (to > from ? dir : (to < from ? -dir : 0));
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return COORD_W'(v);
  endfunction

  // update actions on the processor
  task automatic update_world();
    organism_t nw [N];
    for (int i = 0; i < N; i++) begin
      nw[i] = world[i];
      if (got_cnt[i] > 0) begin
        int j, d, dir;
        j = got_adata[i];
        d = absd(world[i].x, world[j].x) + absd(world[i].y, world[j].y);
        dir = (world[i].male != world[j].male && world[i].male && d > TOO_CLOSE) ? 1 : -1;
        if (world[i].male != world[j].male && !world[i].male) dir = (d > TOO_CLOSE) ? 0 : -1;
        nw[i].x = step_to(world[i].x, world[j].x, dir);
        nw[i].y = step_to(world[i].y, world[j].y, dir);
      end else begin
        nw[i].x = step_to(world[i].x, int'(world[i].x) + $urandom_range(0, 2) - 1, 1);
        nw[i].y = step_to(world[i].y, int'(world[i].y) + $urandom_range(0, 2) - 1, 1);
      end
    end
    for (int i = 0; i < N; i++) world[i] = nw[i];
  endtask

  // one round: commit `times` times in a row and read everything back
  task automatic run_round(int times);
    int exp_total, quiet, waited;
    longint t_commit;
    model_round();
    exp_total = 0;
    for (int i = 0; i < N; i++) exp_total += exp_flag[i];
    for (int k = 0; k < N; k += 2) if (exp_flag[k] && exp_flag[k + 1]) cnt_siblings++;
    if (exp_total == 0) cnt_zero_rounds++;
    if (exp_total == N) cnt_full_rounds++;
    cnt_hits += exp_total * times;
    for (int i = 0; i < N; i++) begin got_cnt[i] = 0; got_adata[i] = -1; end
    n_got = 0; n_done = 0; t_first = -1;
    write_all();
    do_commit();
    t_commit = $time;
    for (int k = 1; k < times; k++) do_commit();
    // wait until everything is back and the machine is quiet
    quiet = 0;
    waited = 0;
    while (quiet < 12 && waited < 1500) begin
      @(posedge clk_rtt);
      waited++;
      if (n_got >= exp_total * times && rtt_idle && !rl_busy && !cp_vrf_busy && n_done > 0) quiet++;
      else quiet = 0;
    end
    check("units delivered", n_got, exp_total * times);
    for (int i = 0; i < N; i++) begin
      check("fired condition", got_cnt[i], exp_flag[i] * times);
      if (exp_flag[i] != 0) check("closest organism", got_adata[i], exp_idx[i]);
    end
    // budget: 3 VRF cycles to commit, up to 3 RL cycles to synchronize, 10 to
    // evaluate, up to 3 RTT cycles to synchronize, 9 to reach the queue end
    if (exp_total > 0 && times == 1 && ready_mode == 0) begin
      longint lat, lo, hi;
      lat = t_first - t_commit;
      lo = 10 * 16260 + 9 * 12500 - 12500;
      hi = 3 * 5000 + 13 * 16260 + 12 * 12500 + 12500;
      checks++;
      if (lat < lo || lat > hi) begin
        failures++;
        $display("FAIL commit-to-first-result %0d ps outside [%0d, %0d]", lat, lo, hi);
      end
    end
    update_world();
  endtask

  initial begin
    cp_wr_en = 0; cp_commit = 0; cp_wr_addr = '0; cp_wr_data = '0; cp_ready = 1;
    threshold = 9'd16;
    for (int i = 0; i < N; i++) begin
      world[i].male = (i % 2 == 0);
      world[i].x = 8'($urandom_range(0, 80));
      world[i].y = 8'($urandom_range(0, 80));
    end
    repeat (4) @(posedge clk_rl);
    rst_n = 1;
    repeat (4) @(posedge clk_rl);
    for (int r = 0; r < 40; r++) begin
      ready_mode = (r == 6) ? 2 : r % 2;
      if (r == 5) threshold = 9'd0;        // nothing (or almost nothing) fires
      else if (r == 6) threshold = 9'd511; // everything fires
      else threshold = 9'd16;
      run_round((r % 7 == 3 || r == 6) ? 2 : 1);
      if (failures > 0) break;   // no point running on after a wrong round
    end
    $display("hits=%0d zero_rounds=%0d full_rounds=%0d siblings=%0d backpressure=%0d vrf_wait=%0d rl_wait=%0d",
             cnt_hits, cnt_zero_rounds, cnt_full_rounds, cnt_siblings, cnt_backpressure,
             cnt_vrf_wait, cnt_rl_wait);
    check("mechanism: conditions fired", int'(cnt_hits > 0), 1);
    check("mechanism: round without hits", int'(cnt_zero_rounds > 0), 1);
    check("mechanism: round with all conditions true", int'(cnt_full_rounds > 0), 1);
    check("mechanism: sibling priority in the tree", int'(cnt_siblings > 0), 1);
    check("mechanism: processor back-pressure on the queue", int'(cnt_backpressure > 0), 1);
    check("mechanism: processor waited on busy VRF", int'(cnt_vrf_wait > 0), 1);
    check("mechanism: RL waited for the tree", int'(cnt_rl_wait > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

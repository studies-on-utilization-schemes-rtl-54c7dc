// tb_rc_top: end-to-end test of both designs in rc_top, every parameter at
// its default (EOC accelerator for 32 organisms; 19 x 19 processor array with
// DIST = 5, STEP = 1, 16-bit words).
//
// EOC part: a behavioural core processor runs the artificial-life example
// for 24 rounds (write 32 positions, commit, read the fired conditions,
// update), checking every delivered unit and the set of units against a
// brute-force model, and the time from commit to first result against the
// cycle budget of the three clock domains. It counts the mechanisms: hits,
// a round without hits, a round where all 32 fire, sibling priority in the
// tree, queue back-pressure, waiting on a busy VRF, and the reconfigurable
// logic waiting for the tree.
//
// Processor-array part: the graph r = (a + b) - 2c is configured (bridge,
// add with an input delay, shift, subtract), the result hops along row 1
// over long wires to the east edge (with an output delay) and down the last
// column over long wires to the south edge; both edge streams are checked
// bit by bit against the reference words at the predicted latency.
`timescale 1ps/1ps
module tb_rc_top;
  import eoc_pkg::*;
  import rpa_pkg::*;
  localparam int unsigned N = N_VARS, IW = $clog2(N);
  localparam int TOO_CLOSE = 3;
  localparam int ROWS = 19, COLS = 19, DIST = 5, STEP = 1, W = 16, DM = DMAX;
  localparam int L = (DIST + 1 + STEP - 1) / STEP, NIN = 4 + 2 * L;
  localparam int SELW = $clog2(NIN), DW = $clog2(DM + 1), CW = $clog2(W);
  localparam int CFG_W = 3 + 2 * SELW + 3 * DW + CW + 2 * L;
  localparam int IN_N = 0, IN_E = 1, IN_S = 2, IN_W = 3;

  typedef struct packed {
    pe_op_t          op;
    logic [SELW-1:0] sel_a;
    logic [SELW-1:0] sel_b;
    logic [DW-1:0]   dly_a;
    logic [DW-1:0]   dly_b;
    logic [DW-1:0]   dly_out;
    logic [CW-1:0]   phase;
    logic [L-1:0]    drive_row;
    logic [L-1:0]    drive_col;
  } cfg_t;

  logic rst_n = 0;
  logic eoc_clk_vrf = 0, eoc_clk_rl = 0, eoc_clk_rtt = 0;
  logic [DIST_W-1:0] eoc_threshold;
  logic eoc_wr_en, eoc_commit, eoc_vrf_busy;
  logic [IW-1:0] eoc_wr_addr;
  organism_t eoc_wr_data;
  logic eoc_valid, eoc_ready, eoc_set_done, eoc_rtt_idle, eoc_rl_busy;
  logic [IW-1:0] eoc_idx, eoc_adata;

  logic rpa_clk = 0, rpa_sync = 0;
  logic [CW-1:0] rpa_bit_cnt;
  logic rpa_cfg_we = 0;
  logic [$clog2(ROWS*COLS)-1:0] rpa_cfg_addr = '0;
  logic [CFG_W-1:0] rpa_cfg_data = '0;
  logic [COLS-1:0] rpa_n_in = '0, rpa_s_in = '0, rpa_n_out, rpa_s_out;
  logic [ROWS-1:0] rpa_w_in = '0, rpa_e_in = '0, rpa_w_out, rpa_e_out;
  int checks = 0, failures = 0;

  rc_top dut (.*);

  always #2500 eoc_clk_vrf = ~eoc_clk_vrf;   // 200 MHz
  always #8130 eoc_clk_rl  = ~eoc_clk_rl;    // 61.5 MHz
  always #6250 eoc_clk_rtt = ~eoc_clk_rtt;   // 80 MHz
  always #5000 rpa_clk     = ~rpa_clk;       // 100 MHz (not given)

  initial begin
    repeat (400000) @(posedge eoc_clk_rtt);
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

  // ---------------- processor read side (eoc_clk_rtt) ----------------
  int got_cnt [N];
  int got_adata [N];
  int n_got = 0, n_done = 0;
  int ready_mode = 0;
  longint t_first = -1;
  int cnt_backpressure = 0;
  int hold_cnt = 0;

  always @(posedge eoc_clk_rtt) begin
    if (rst_n) begin
      if (eoc_valid && !eoc_ready) cnt_backpressure++;
      if (eoc_valid && t_first < 0) t_first = $time;
      if (eoc_valid && eoc_ready) begin
        got_cnt[eoc_idx]++;
        got_adata[eoc_idx] = int'(eoc_adata);
        n_got++;
      end
      if (eoc_set_done) n_done++;
    end
    // mode 0: always ready, 1: ready one cycle in four, 2: hold off 300 cycles
    if (ready_mode == 2) begin
      hold_cnt++;
      eoc_ready <= (hold_cnt > 300);
    end else begin
      hold_cnt = 0;
      eoc_ready <= (ready_mode == 0) ? 1'b1 : 1'($urandom_range(0, 3) == 0);
    end
  end

  // reconfigurable logic waiting for the tree to take its results
  int cnt_rl_wait = 0;
  always @(posedge eoc_clk_rl)
    if (rst_n && dut.u_eoc.res_req_tgl != dut.u_eoc.res_ack_tgl && dut.u_eoc.u_rtt.tv[2*N-1:N] != '0)
      cnt_rl_wait++;

  // ---------------- processor write side (eoc_clk_vrf) ----------------
  int cnt_vrf_wait = 0;

  task automatic write_all();
    for (int i = 0; i < N; i++) begin
      @(negedge eoc_clk_vrf);
      while (eoc_vrf_busy) begin cnt_vrf_wait++; @(negedge eoc_clk_vrf); end
      eoc_wr_en = 1; eoc_wr_addr = IW'(i); eoc_wr_data = world[i];
      @(negedge eoc_clk_vrf);
      eoc_wr_en = 0;
    end
  endtask

  task automatic do_commit();
    @(negedge eoc_clk_vrf);
    while (eoc_vrf_busy) begin cnt_vrf_wait++; @(negedge eoc_clk_vrf); end
    eoc_commit = 1;
    @(negedge eoc_clk_vrf);
    eoc_commit = 0;
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
      exp_flag[i] = int'(bd <= int'(eoc_threshold));
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
      @(posedge eoc_clk_rtt);
      waited++;
      if (n_got >= exp_total * times && eoc_rtt_idle && !eoc_rl_busy && !eoc_vrf_busy && n_done > 0) quiet++;
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

  task automatic put(int r, int c, cfg_t v);
    @(negedge rpa_clk);
    rpa_cfg_we = 1; rpa_cfg_addr = $bits(rpa_cfg_addr)'(r * COLS + c); rpa_cfg_data = v;
    @(negedge rpa_clk);
    rpa_cfg_we = 0;
  endtask

  function automatic cfg_t mk(pe_op_t op, int sa, int sb, int da, int db, int dout, int ph);
    cfg_t v;
    v = '0;
    v.op = op; v.sel_a = SELW'(sa); v.sel_b = SELW'(sb);
    v.dly_a = DW'(da); v.dly_b = DW'(db); v.dly_out = DW'(dout); v.phase = CW'(ph % W);
    return v;
  endfunction

  int hops_row = 0, hops_col = 0;

  // route a word stream from PE(r,c) along its row to the last column
  task automatic route_row(int r, int c0, cfg_t first, int last_dout);
    int c, m, c1;
    cfg_t v;
    c = c0; v = first;
    while (c < COLS - 1) begin
      m = c / STEP;
      c1 = (m * STEP + DIST < COLS - 1) ? m * STEP + DIST : COLS - 1;
      v.drive_row[0] = 1'b1;                // drive the segment starting at/before c
      put(r, c, v);
      v = mk(OP_PASS, 4 + (c1 / STEP - m), 0, 0, 0, 0, 0);
      c = c1;
      hops_row++;
    end
    v.dly_out = DW'(last_dout);
    v.drive_col[0] = 1'b1;
    put(r, c, v);
  endtask

  task automatic route_col(int c, int r0);
    int r, m, r1;
    cfg_t v;
    r = r0;
    while (r < ROWS - 1) begin
      m = r / STEP;
      r1 = (m * STEP + DIST < ROWS - 1) ? m * STEP + DIST : ROWS - 1;
      v = mk(OP_PASS, 4 + L + (r1 / STEP - m), 0, 0, 0, 0, 0);
      if (r1 < ROWS - 1) v.drive_col[0] = 1'b1;
      put(r1, c, v);
      r = r1;
      hops_col++;
    end
  endtask

  localparam int NW = 24;
  logic [W-1:0] wa [NW], wb [NW], wc [NW], wr [NW];
  bit rpa_done = 0, eoc_done = 0;

  // ---------------- processor array ----------------
  initial begin
    int de, ds;
    for (int i = 0; i < NW; i++) begin
      wa[i] = W'($urandom); wb[i] = W'($urandom); wc[i] = W'($urandom);
      wr[i] = (wa[i] + wb[i]) - (wc[i] << 1);
    end
    wait (rst_n);
    put(1, 0, mk(OP_PASS, IN_W, 0, 0, 0, 0, 0));
    put(0, 0, mk(OP_ADD, IN_W, IN_S, 1, 0, 0, 1));
    put(2, 0, mk(OP_SHL, IN_W, 0, 1, 0, 0, 1));
    put(0, 1, mk(OP_PASS, IN_W, 0, 0, 0, 0, 0));
    put(2, 1, mk(OP_PASS, IN_W, 0, 0, 0, 0, 0));
    route_row(1, 1, mk(OP_SUB, IN_N, IN_S, 0, 0, 0, 3), 3);
    route_col(COLS - 1, 1);
    de = 4 + hops_row + 3;
    ds = de + hops_col;
    @(negedge rpa_clk);
    rpa_sync = 1;
    @(negedge rpa_clk);
    rpa_sync = 0;
    for (int t = 0; t < NW * W; t++) begin
      if (int'(rpa_bit_cnt) != t % W) begin checks++; failures++; end
      rpa_w_in[0] = wa[t / W][t % W];
      rpa_w_in[1] = wb[t / W][t % W];
      rpa_w_in[2] = wc[t / W][t % W];
      #1;
      if (t - de >= 0) begin
        checks++;
        if (rpa_e_out[1] !== wr[(t - de) / W][(t - de) % W]) begin
          failures++;
          if (failures < 5) $display("FAIL array east edge t=%0d", t);
        end
      end
      if (t - ds >= 0) begin
        checks++;
        if (rpa_s_out[COLS - 1] !== wr[(t - ds) / W][(t - ds) % W]) begin
          failures++;
          if (failures < 5) $display("FAIL array south edge t=%0d", t);
        end
      end
      @(negedge rpa_clk);
    end
    $display("array: row long-wire hops %0d, column long-wire hops %0d", hops_row, hops_col);
    check("mechanism: row long-wire hops", int'(hops_row >= 2), 1);
    check("mechanism: column long-wire hops", int'(hops_col >= 2), 1);
    rpa_done = 1;
  end

  // ---------------- EOC accelerator ----------------
  initial begin
    eoc_wr_en = 0; eoc_commit = 0; eoc_wr_addr = '0; eoc_wr_data = '0; eoc_ready = 1;
    eoc_threshold = 9'd16;
    for (int i = 0; i < N; i++) begin
      world[i].male = (i % 2 == 0);
      world[i].x = 8'($urandom_range(0, 80));
      world[i].y = 8'($urandom_range(0, 80));
    end
    repeat (4) @(posedge eoc_clk_rl);
    rst_n = 1;
    repeat (4) @(posedge eoc_clk_rl);
    for (int r = 0; r < 24; r++) begin
      ready_mode = (r == 6) ? 2 : r % 2;
      if (r == 5) eoc_threshold = 9'd0;
      else if (r == 6) eoc_threshold = 9'd511;
      else eoc_threshold = 9'd16;
      run_round((r % 7 == 3 || r == 6) ? 2 : 1);
      if (failures > 0) break;   // no point running on after a wrong round
    end
    $display("eoc: hits=%0d zero_rounds=%0d full_rounds=%0d siblings=%0d backpressure=%0d vrf_wait=%0d rl_wait=%0d",
             cnt_hits, cnt_zero_rounds, cnt_full_rounds, cnt_siblings, cnt_backpressure,
             cnt_vrf_wait, cnt_rl_wait);
    check("mechanism: conditions fired", int'(cnt_hits > 0), 1);
    check("mechanism: round without hits", int'(cnt_zero_rounds > 0), 1);
    check("mechanism: round with all conditions true", int'(cnt_full_rounds > 0), 1);
    check("mechanism: sibling priority in the tree", int'(cnt_siblings > 0), 1);
    check("mechanism: processor back-pressure on the queue", int'(cnt_backpressure > 0), 1);
    check("mechanism: processor waited on busy VRF", int'(cnt_vrf_wait > 0), 1);
    check("mechanism: RL waited for the tree", int'(cnt_rl_wait > 0), 1);
    eoc_done = 1;
  end

  initial begin
    wait (rpa_done && eoc_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

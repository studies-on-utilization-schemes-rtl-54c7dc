// tb_rpa_array: self-checking test of the processor element array.
//
// The testbench configures a small data-flow graph, r = (a + b) - 2c, into
// the array and streams random 16-bit words for a, b and c into the west
// edge of rows 0, 1 and 2:
//   PE(1,0) bridges b,  PE(0,0) adds a (delayed one cycle in its input
//   buffer) and b,  PE(2,0) doubles c,  PE(0,1)/PE(2,1) bridge the two
//   partial results,  PE(1,1) subtracts.
// The result then hops along row 1 over long wires to the east edge (the
// last PE adds 3 cycles in its output buffer), and from there down the last
// column over long wires to the south edge. Both edge outputs are compared
// bit by bit with the reference words at the latency the hops predict (one
// cycle per PE). The array is built with DIST = 3 and STEP = 2, so long
// segments start at every second PE; a second run of the same graph is not
// needed because the top-level test uses the default DIST = 5, STEP = 1.
`timescale 1ns/1ps
module tb_rpa_array;
  import rpa_pkg::*;
  localparam int ROWS = 5, COLS = 13, DIST = 3, STEP = 2, W = 16, DM = 32;
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

  logic clk = 0, rst_n = 0, sync = 0;
  logic [CW-1:0] bit_cnt;
  logic cfg_we = 0;
  logic [$clog2(ROWS*COLS)-1:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_data = '0;
  logic [COLS-1:0] n_in = '0, s_in = '0, n_out, s_out;
  logic [ROWS-1:0] w_in = '0, e_in = '0, w_out, e_out;
  int checks = 0, failures = 0;

  rpa_array #(.ROWS(ROWS), .COLS(COLS), .DIST(DIST), .STEP(STEP), .W(W), .DM(DM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int r, int c, cfg_t v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = $bits(cfg_addr)'(r * COLS + c); cfg_data = v;
    @(negedge clk);
    cfg_we = 0;
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

  localparam int NW = 64;
  logic [W-1:0] wa [NW], wb [NW], wc [NW], wr [NW];

  initial begin
    int de, ds;
    for (int i = 0; i < NW; i++) begin
      wa[i] = W'($urandom); wb[i] = W'($urandom); wc[i] = W'($urandom);
      wr[i] = (wa[i] + wb[i]) - (wc[i] << 1);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    put(1, 0, mk(OP_PASS, IN_W, 0, 0, 0, 0, 0));
    put(0, 0, mk(OP_ADD, IN_W, IN_S, 1, 0, 0, 1));
    put(2, 0, mk(OP_SHL, IN_W, 0, 1, 0, 0, 1));
    put(0, 1, mk(OP_PASS, IN_W, 0, 0, 0, 0, 0));
    put(2, 1, mk(OP_PASS, IN_W, 0, 0, 0, 0, 0));
    route_row(1, 1, mk(OP_SUB, IN_N, IN_S, 0, 0, 0, 3), 3);
    route_col(COLS - 1, 1);
    de = 4 + hops_row + 3;
    ds = de + hops_col;
    // stream the words, frame-aligned with the array's bit counter
    @(negedge clk);
    sync = 1;
    @(negedge clk);
    sync = 0;
    for (int t = 0; t < NW * W; t++) begin
      checks++;
      if (int'(bit_cnt) != t % W) failures++;
      w_in[0] = wa[t / W][t % W];
      w_in[1] = wb[t / W][t % W];
      w_in[2] = wc[t / W][t % W];
      #1;
      if (t - de >= 0) begin
        checks++;
        if (e_out[1] !== wr[(t - de) / W][(t - de) % W]) begin
          failures++;
          if (failures < 5) $display("FAIL east t=%0d", t);
        end
      end
      if (t - ds >= 0) begin
        checks++;
        if (s_out[COLS - 1] !== wr[(t - ds) / W][(t - ds) % W]) begin
          failures++;
          if (failures < 5) $display("FAIL south t=%0d", t);
        end
      end
      @(negedge clk);
    end
    $display("row hops %0d, column hops %0d", hops_row, hops_col);
    checks++;
    if (hops_row < 2 || hops_col < 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

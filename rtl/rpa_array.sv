// rpa_array: processor element array of the reconfigurable 1-bit processor
// array (RPA), with its short and long wires.
//
// ROWS x COLS bit-serial PEs (rpa_pe). Wiring, following the document:
//  - short wires: every PE reads the outputs of its four neighbours (N, E,
//    S, W); at the array edge these inputs come from the edge ports, and
//    the edge PEs' outputs are the edge outputs (the I/O elements and I/O
//    controllers around the array are outside this module);
//  - long wires: in every row and every column a wire segment starts at
//    every STEP-th PE and spans DIST+1 PEs, so a PE reaches PEs up to DIST
//    away in one hop and ceil((DIST+1)/STEP) segments pass each PE per
//    direction (the document's count of long wires between two neighbours).
//    A PE may drive any segment passing it and read any of them.
// DIST and STEP are fixed at build time, as in the document. Distant PEs
// are also reached by using a PE as a bridge (operation PASS), which costs a
// cycle; the PEs' delay buffers line the words up again.
//
// This design's choices: a long segment is the OR of the PEs configured to
// drive it (the configuration must enable at most one); the PE input index
// is 0 N, 1 E, 2 S, 3 W, 4..4+L-1 the row segments, 4+L..4+2L-1 the
// column segments, where segment j of a PE at column c is the one starting
// at column (c/STEP - j)*STEP; a global bit counter frames the words (it
// restarts at 0 on `sync`); the configuration is written one PE at a time
// through `cfg_we`/`cfg_addr` (PE index r*COLS+c)/`cfg_data`, laid out as
// {op, sel_a, sel_b, dly_a, dly_b, dly_out, phase, drive_row[L], drive_col[L]}
// from the top bit down. The array size is not given in the document;
// 19 x 19 holds the largest mapping it reports.
//
// Timing: one cycle per PE hop plus the programmed buffer delays; a
// configuration write takes effect on the next cycle.
module rpa_array
  import rpa_pkg::*;
#(
  parameter int unsigned ROWS = 19,
  parameter int unsigned COLS = 19,
  parameter int unsigned DIST = 5,
  parameter int unsigned STEP = 1,
  parameter int unsigned W    = 16,
  parameter int unsigned DM   = DMAX,
  // derived, not to be overridden
  parameter int unsigned L     = (DIST + 1 + STEP - 1) / STEP,
  parameter int unsigned NIN   = 4 + 2 * L,
  parameter int unsigned SELW  = $clog2(NIN),
  parameter int unsigned DW    = $clog2(DM + 1),
  parameter int unsigned CW    = $clog2(W),
  parameter int unsigned CFG_W = 3 + 2 * SELW + 3 * DW + CW + 2 * L
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             sync,
  output logic [CW-1:0]                    bit_cnt,
  // configuration
  input  logic                             cfg_we,
  input  logic [$clog2(ROWS*COLS)-1:0]     cfg_addr,
  input  logic [CFG_W-1:0]                 cfg_data,
  // edge short wires
  input  logic [COLS-1:0]                  n_in,
  input  logic [COLS-1:0]                  s_in,
  input  logic [ROWS-1:0]                  w_in,
  input  logic [ROWS-1:0]                  e_in,
  output logic [COLS-1:0]                  n_out,
  output logic [COLS-1:0]                  s_out,
  output logic [ROWS-1:0]                  w_out,
  output logic [ROWS-1:0]                  e_out
);
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

  localparam int unsigned NSEG_R = (COLS + STEP - 1) / STEP;  // segments per row
  localparam int unsigned NSEG_C = (ROWS + STEP - 1) / STEP;  // segments per column

  cfg_t                     cfg [ROWS][COLS];
  logic [ROWS-1:0][COLS-1:0] y;
  logic [NSEG_R-1:0]         seg_r [ROWS];
  logic [NSEG_C-1:0]         seg_c [COLS];

  // global word framing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         bit_cnt <= '0;
    else if (sync || bit_cnt == CW'(W - 1)) bit_cnt <= '0;
    else                                bit_cnt <= bit_cnt + 1'b1;
  end

  // configuration memory
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) cfg[r][c] <= '0;
    end else if (cfg_we) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (int'(cfg_addr) == r * COLS + c) cfg[r][c] <= cfg_t'(cfg_data);
    end
  end

  // long wire segments: OR of the PEs that drive them
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      seg_r[r] = '0;
      for (int m = 0; m < NSEG_R; m++)
        for (int c = m * STEP; c <= m * STEP + DIST && c < COLS; c++)
          if (cfg[r][c].drive_row[c / STEP - m]) seg_r[r][m] = seg_r[r][m] | y[r][c];
    end
    for (int c = 0; c < COLS; c++) begin
      seg_c[c] = '0;
      for (int m = 0; m < NSEG_C; m++)
        for (int r = m * STEP; r <= m * STEP + DIST && r < ROWS; r++)
          if (cfg[r][c].drive_col[r / STEP - m]) seg_c[c][m] = seg_c[c][m] | y[r][c];
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [NIN-1:0] pin;

      always_comb begin
        pin[0] = (r == 0)        ? n_in[c] : y[(r == 0 ? 0 : r - 1)][c];
        pin[1] = (c == COLS - 1) ? e_in[r] : y[r][(c == COLS - 1 ? c : c + 1)];
        pin[2] = (r == ROWS - 1) ? s_in[c] : y[(r == ROWS - 1 ? r : r + 1)][c];
        pin[3] = (c == 0)        ? w_in[r] : y[r][(c == 0 ? 0 : c - 1)];
        for (int j = 0; j < L; j++) begin
          int mr, mc;
          mr = c / int'(STEP) - j;
          mc = r / int'(STEP) - j;
          pin[4 + j]     = (mr >= 0 && mr * int'(STEP) + int'(DIST) >= c) ? seg_r[r][mr] : 1'b0;
          pin[4 + L + j] = (mc >= 0 && mc * int'(STEP) + int'(DIST) >= r) ? seg_c[c][mc] : 1'b0;
        end
      end

      rpa_pe #(.NIN(NIN), .W(W), .DM(DM)) u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .in      (pin),
        .bit_cnt (bit_cnt),
        .op      (cfg[r][c].op),
        .sel_a   (cfg[r][c].sel_a),
        .sel_b   (cfg[r][c].sel_b),
        .dly_a   (cfg[r][c].dly_a),
        .dly_b   (cfg[r][c].dly_b),
        .dly_out (cfg[r][c].dly_out),
        .phase   (cfg[r][c].phase),
        .y       (y[r][c])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_ns
    assign n_out[c] = y[0][c];
    assign s_out[c] = y[ROWS-1][c];
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_we
    assign w_out[r] = y[r][0];
    assign e_out[r] = y[r][COLS-1];
  end

  initial assert (STEP >= 1 && DIST >= 1 && ROWS >= 2 && COLS >= 2 && NIN == 4 + 2 * L)
    else $error("rpa_array: bad size parameters");
endmodule

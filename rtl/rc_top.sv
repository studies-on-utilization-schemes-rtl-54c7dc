// rc_top: the two reconfigurable-computing designs side by side.
//
//  - eoc_system: an event-oriented computing accelerator for a core
//    processor. Condition expressions of event-condition-action programs are
//    evaluated in parallel hardware and only the ones that fire are sent back
//    to the processor through a result-transferring tree, so the processor
//    link does not become a bottleneck. Configured for the artificial-life
//    example (32 organisms, nearest-neighbour conditions).
//  - rpa_array: a reconfigurable 1-bit processor array: bit-serial processor
//    elements joined by short neighbour wires and long wire segments whose
//    reach (DIST) and spacing (STEP) are fixed at build time.
// The two share nothing but the reset; each keeps its own clocks and ports,
// named with the prefix eoc_ or rpa_. See the two modules for their timing.
module rc_top
  import eoc_pkg::*;
#(
  parameter int unsigned RPA_ROWS = 19,
  parameter int unsigned RPA_COLS = 19,
  parameter int unsigned RPA_DIST = 5,
  parameter int unsigned RPA_STEP = 1,
  parameter int unsigned RPA_W    = 16,
  // derived, not to be overridden
  parameter int unsigned RPA_L     = (RPA_DIST + RPA_STEP) / RPA_STEP,
  parameter int unsigned RPA_CFG_W = 3 + 2 * $clog2(4 + 2 * RPA_L) + 3 * $clog2(rpa_pkg::DMAX + 1)
                                     + $clog2(RPA_W) + 2 * RPA_L
) (
  input  logic                                 rst_n,
  // ---------------- EOC accelerator ----------------
  input  logic                                 eoc_clk_vrf,
  input  logic                                 eoc_clk_rl,
  input  logic                                 eoc_clk_rtt,
  input  logic [DIST_W-1:0]                    eoc_threshold,
  input  logic                                 eoc_wr_en,
  input  logic [IDX_W-1:0]                     eoc_wr_addr,
  input  organism_t                            eoc_wr_data,
  input  logic                                 eoc_commit,
  output logic                                 eoc_vrf_busy,
  output logic                                 eoc_valid,
  output logic [IDX_W-1:0]                     eoc_idx,
  output logic [IDX_W-1:0]                     eoc_adata,
  input  logic                                 eoc_ready,
  output logic                                 eoc_set_done,
  output logic                                 eoc_rtt_idle,
  output logic                                 eoc_rl_busy,
  // ---------------- 1-bit processor array ----------------
  input  logic                                 rpa_clk,
  input  logic                                 rpa_sync,
  output logic [$clog2(RPA_W)-1:0]             rpa_bit_cnt,
  input  logic                                 rpa_cfg_we,
  input  logic [$clog2(RPA_ROWS*RPA_COLS)-1:0] rpa_cfg_addr,
  input  logic [RPA_CFG_W-1:0]                 rpa_cfg_data,
  input  logic [RPA_COLS-1:0]                  rpa_n_in,
  input  logic [RPA_COLS-1:0]                  rpa_s_in,
  input  logic [RPA_ROWS-1:0]                  rpa_w_in,
  input  logic [RPA_ROWS-1:0]                  rpa_e_in,
  output logic [RPA_COLS-1:0]                  rpa_n_out,
  output logic [RPA_COLS-1:0]                  rpa_s_out,
  output logic [RPA_ROWS-1:0]                  rpa_w_out,
  output logic [RPA_ROWS-1:0]                  rpa_e_out
);
  eoc_system u_eoc (
    .clk_vrf     (eoc_clk_vrf),
    .clk_rl      (eoc_clk_rl),
    .clk_rtt     (eoc_clk_rtt),
    .rst_n       (rst_n),
    .threshold   (eoc_threshold),
    .cp_wr_en    (eoc_wr_en),
    .cp_wr_addr  (eoc_wr_addr),
    .cp_wr_data  (eoc_wr_data),
    .cp_commit   (eoc_commit),
    .cp_vrf_busy (eoc_vrf_busy),
    .cp_valid    (eoc_valid),
    .cp_idx      (eoc_idx),
    .cp_adata    (eoc_adata),
    .cp_ready    (eoc_ready),
    .cp_set_done (eoc_set_done),
    .rtt_idle    (eoc_rtt_idle),
    .rl_busy     (eoc_rl_busy)
  );

  rpa_array #(
    .ROWS (RPA_ROWS),
    .COLS (RPA_COLS),
    .DIST (RPA_DIST),
    .STEP (RPA_STEP),
    .W    (RPA_W)
  ) u_rpa (
    .clk      (rpa_clk),
    .rst_n    (rst_n),
    .sync     (rpa_sync),
    .bit_cnt  (rpa_bit_cnt),
    .cfg_we   (rpa_cfg_we),
    .cfg_addr (rpa_cfg_addr),
    .cfg_data (rpa_cfg_data),
    .n_in     (rpa_n_in),
    .s_in     (rpa_s_in),
    .w_in     (rpa_w_in),
    .e_in     (rpa_e_in),
    .n_out    (rpa_n_out),
    .s_out    (rpa_s_out),
    .w_out    (rpa_w_out),
    .e_out    (rpa_e_out)
  );
endmodule

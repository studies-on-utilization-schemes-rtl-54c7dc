// eoc_system: event-oriented computing (EOC) accelerator attached to a core
// processor (CP).
//
// EOC programs follow the event-condition-action model: when an associated
// variable changes (event), the condition expressions that depend on it are
// evaluated, and the few that come out true trigger update actions that run
// on the processor and change variables again. The condition evaluations are
// many, simple and independent, so they are moved into parallel hardware;
// since few of them fire, little data has to go back to the processor and
// the link to it does not become the bottleneck.
//
// Data flow of one round: CP -> VRF -> RLs -> RTT -> CP.
//   eoc_vrf       variable register file; the CP writes the changed
//                 variables and commits (VRF clock, 200 MHz in the evaluated
//                 system).
//   eoc_rl_array  N comparator modules evaluating all conditions in parallel
//                 (RL clock, 61.5 MHz): 10 cycles per round.
//   eoc_rtt       result-transferring tree forwarding only the fired
//                 conditions, with their additional data, to a queue the CP
//                 reads (RTT clock, 80 MHz): first unit after 1 + 8 cycles.
// The three clocks are independent; the blocks talk through toggle
// handshakes with two-flop synchronizers, and data only crosses while it is
// held stable by the handshake. The CP itself and its bus are outside: the
// CP write port is on clk_vrf, the CP read port on clk_rtt.
//
// The configured conditions are those of the artificial-life example: is
// another organism within `threshold` (Manhattan distance), and which one is
// closest. `threshold` is a static setting. `rst_n` resets all three domains
// asynchronously; it must be released synchronously to each clock by the
// surrounding system.
module eoc_system
  import eoc_pkg::*;
#(
  parameter int unsigned N     = N_VARS,
  parameter int unsigned LANES = N_LANES,
  parameter int unsigned QD    = Q_DEPTH
) (
  input  logic                  clk_vrf,
  input  logic                  clk_rl,
  input  logic                  clk_rtt,
  input  logic                  rst_n,
  input  logic [DIST_W-1:0]     threshold,
  // CP -> VRF (clk_vrf)
  input  logic                  cp_wr_en,
  input  logic [$clog2(N)-1:0]  cp_wr_addr,
  input  organism_t             cp_wr_data,
  input  logic                  cp_commit,
  output logic                  cp_vrf_busy,
  // RTT -> CP (clk_rtt)
  output logic                  cp_valid,
  output logic [$clog2(N)-1:0]  cp_idx,
  output logic [$clog2(N)-1:0]  cp_adata,
  input  logic                  cp_ready,
  output logic                  cp_set_done,
  output logic                  rtt_idle,
  // status (clk_rl)
  output logic                  rl_busy
);
  localparam int unsigned IW = $clog2(N);

  organism_t [N-1:0]         vars;
  logic                      vrf_req_tgl, vrf_ack_tgl;
  logic [N-1:0]              flags;
  logic [N-1:0][IW-1:0]      adata;
  logic                      res_req_tgl, res_ack_tgl;

  eoc_vrf #(.N(N)) u_vrf (
    .clk     (clk_vrf),
    .rst_n   (rst_n),
    .wr_en   (cp_wr_en),
    .wr_addr (cp_wr_addr),
    .wr_data (cp_wr_data),
    .commit  (cp_commit),
    .busy    (cp_vrf_busy),
    .vars    (vars),
    .req_tgl (vrf_req_tgl),
    .ack_tgl (vrf_ack_tgl)
  );

  eoc_rl_array #(.N(N), .LANES(LANES)) u_rl (
    .clk         (clk_rl),
    .rst_n       (rst_n),
    .threshold   (threshold),
    .vrf_vars    (vars),
    .vrf_req_tgl (vrf_req_tgl),
    .vrf_ack_tgl (vrf_ack_tgl),
    .flags       (flags),
    .adata       (adata),
    .res_req_tgl (res_req_tgl),
    .res_ack_tgl (res_ack_tgl),
    .busy        (rl_busy)
  );

  eoc_rtt #(.N(N), .QD(QD)) u_rtt (
    .clk         (clk_rtt),
    .rst_n       (rst_n),
    .flags       (flags),
    .adata       (adata),
    .res_req_tgl (res_req_tgl),
    .res_ack_tgl (res_ack_tgl),
    .cp_valid    (cp_valid),
    .cp_idx      (cp_idx),
    .cp_adata    (cp_adata),
    .cp_ready    (cp_ready),
    .set_done    (cp_set_done),
    .idle        (rtt_idle)
  );
endmodule

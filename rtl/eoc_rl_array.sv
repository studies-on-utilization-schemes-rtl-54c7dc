// eoc_rl_array: the reconfigurable logic (RLs) of the EOC accelerator, in the
// configuration of the artificial-life evaluation.
//
// It holds one comparator module per associated variable (N = 32) and the
// sequencer that runs them all in lockstep. One evaluation is:
//   1 cycle   acknowledge: copy the VRF contents into local registers and
//             answer the VRF's request,
//   8 cycles  distance steps (N/LANES, four distance units per module),
//   1 cycle   narrow the four lane minima and set flag / additional data,
// i.e. 10 cycles from acknowledge to valid results, as in the document's
// timing estimate (162.6 ns at 61.5 MHz). The results are then offered to
// the result-transferring tree and held until the tree has taken them; a
// new VRF request waits during that time.
//
// The document maps the condition expressions onto an FPGA and leaves the
// handshakes open. This design uses toggle handshakes on both sides:
// `vrf_req_tgl` (from the VRF clock domain) is synchronized here and
// answered on `vrf_ack_tgl`; `res_req_tgl` flips when new results are valid
// and the tree answers on `res_ack_tgl` (synchronized here). `threshold` is
// a static setting. Reset is asynchronous, active low.
module eoc_rl_array
  import eoc_pkg::*;
#(
  parameter int unsigned N     = N_VARS,
  parameter int unsigned LANES = N_LANES
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [DIST_W-1:0]             threshold,
  // from the VRF (other clock domain)
  input  organism_t [N-1:0]             vrf_vars,
  input  logic                          vrf_req_tgl,
  output logic                          vrf_ack_tgl,
  // to the result-transferring tree (other clock domain)
  output logic [N-1:0]                  flags,
  output logic [N-1:0][$clog2(N)-1:0]   adata,
  output logic                          res_req_tgl,
  input  logic                          res_ack_tgl,
  // status
  output logic                          busy
);
  localparam int unsigned STEPS = N / LANES;
  localparam int unsigned SW    = $clog2(STEPS);

  typedef enum logic [1:0] {S_IDLE, S_EVAL, S_NARROW, S_SEND} state_t;

  state_t             state;
  logic [SW-1:0]      step;
  organism_t [N-1:0]  al;            // local copy of the associated variables
  logic               vrf_req_s, res_ack_s;
  logic [N-1:0][DIST_W-1:0] dist_unused;

  eoc_cdc_sync u_req_sync (.clk(clk), .rst_n(rst_n), .d(vrf_req_tgl), .q(vrf_req_s));
  eoc_cdc_sync u_ack_sync (.clk(clk), .rst_n(rst_n), .d(res_ack_tgl), .q(res_ack_s));

  wire acc    = (state == S_EVAL);
  wire narrow = (state == S_NARROW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      step        <= '0;
      al          <= '0;
      vrf_ack_tgl <= 1'b0;
      res_req_tgl <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (vrf_req_s != vrf_ack_tgl) begin
          // acknowledge cycle: take the snapshot and release the VRF
          al          <= vrf_vars;
          vrf_ack_tgl <= ~vrf_ack_tgl;
          step        <= '0;
          state       <= S_EVAL;
        end
        S_EVAL: begin
          step <= step + 1'b1;
          if (step == SW'(STEPS - 1)) state <= S_NARROW;
        end
        S_NARROW: begin
          // results are registered on this edge; announce them
          res_req_tgl <= ~res_req_tgl;
          state       <= S_SEND;
        end
        S_SEND: if (res_ack_s == res_req_tgl) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  for (genvar i = 0; i < N; i++) begin : g_cmp
    eoc_comparator #(.N(N), .LANES(LANES), .SELF(i)) u_cmp (
      .clk       (clk),
      .rst_n     (rst_n),
      .vars      (al),
      .acc       (acc),
      .step      (step),
      .narrow    (narrow),
      .threshold (threshold),
      .flag      (flags[i]),
      .adata     (adata[i]),
      .min_dist     (dist_unused[i])
    );
  end
endmodule

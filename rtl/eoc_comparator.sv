// eoc_comparator: one comparator module of the reconfigurable logic.
//
// It evaluates the condition expression of one associated variable: "is
// another organism within a threshold Manhattan distance of organism SELF,
// and if so, which one is the closest?". Following the document, the module
// has LANES distance units (ALU) each feeding a running-minimum register
// (CMP). In step s, lane k measures the distance from SELF to organism
// s + k*STEPS (STEPS = N/LANES), so for N = 32 and four lanes step 0 looks at
// organisms 0, 8, 16, 24, step 1 at 1, 9, 17, 25, and so on for eight steps.
// A final narrow step keeps the smallest of the four lane minima, compares
// it with `threshold` and registers the flag and the closest index (the
// "additional data" the processor needs for the update action).
//
// Choices of this design, where the document says nothing: SELF is skipped;
// ties go to the smaller index; "within a certain distance" means
// distance <= threshold.
//
// Interface and timing (all on clk): the controller drives `step` and
// `acc` for STEPS consecutive cycles (step 0 restarts the minima), then
// `narrow` for one cycle; `flag`, `adata` and `min_dist` are valid from the
// cycle after `narrow` and hold until the next `narrow`. `vars` must be
// stable while `acc` is high.
module eoc_comparator
  import eoc_pkg::*;
#(
  parameter int unsigned N     = N_VARS,
  parameter int unsigned LANES = N_LANES,
  parameter int unsigned SELF  = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  organism_t [N-1:0]             vars,
  input  logic                          acc,
  input  logic [$clog2(N/LANES)-1:0]    step,
  input  logic                          narrow,
  input  logic [DIST_W-1:0]             threshold,
  output logic                          flag,
  output logic [$clog2(N)-1:0]          adata,
  output logic [DIST_W-1:0]             min_dist
);
  localparam int unsigned STEPS = N / LANES;
  localparam int unsigned IW    = $clog2(N);

  typedef logic [IW-1:0]     idx_t;
  typedef logic [DIST_W-1:0] dist_t;

  // Per-lane running minimum.
  logic  [LANES-1:0] lane_vld;
  dist_t [LANES-1:0] lane_dist;
  idx_t  [LANES-1:0] lane_idx;

  function automatic dist_t absdiff(logic [COORD_W-1:0] a, logic [COORD_W-1:0] b);
    return (a > b) ? dist_t'(a - b) : dist_t'(b - a);
  endfunction

  // Distance units: candidate of each lane in this step.
  idx_t  [LANES-1:0] cand_idx;
  dist_t [LANES-1:0] cand_dist;
  logic  [LANES-1:0] cand_ok;

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      cand_idx[k]  = idx_t'(int'(step) + k * STEPS);
      cand_dist[k] = absdiff(vars[SELF].x, vars[cand_idx[k]].x)
                   + absdiff(vars[SELF].y, vars[cand_idx[k]].y);
      cand_ok[k]   = (cand_idx[k] != idx_t'(SELF));
    end
  end

  // CMP: keep the lower distance; on a tie the earlier (smaller) index stays.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_vld  <= '0;
      lane_dist <= '0;
      lane_idx  <= '0;
    end else if (acc) begin
      for (int k = 0; k < LANES; k++) begin
        if (step == '0) begin
          lane_vld[k]  <= cand_ok[k];
          lane_dist[k] <= cand_dist[k];
          lane_idx[k]  <= cand_idx[k];
        end else if (cand_ok[k] && (!lane_vld[k] || cand_dist[k] < lane_dist[k])) begin
          lane_vld[k]  <= 1'b1;
          lane_dist[k] <= cand_dist[k];
          lane_idx[k]  <= cand_idx[k];
        end
      end
    end
  end

  // Narrow the lane minima to one. Lane k only holds indices below those of
  // lane k+1, so a strict compare again favours the smaller index.
  logic  best_vld;
  dist_t best_dist;
  idx_t  best_idx;

  always_comb begin
    best_vld  = 1'b0;
    best_dist = '0;
    best_idx  = '0;
    for (int k = 0; k < LANES; k++) begin
      if (lane_vld[k] && (!best_vld || lane_dist[k] < best_dist)) begin
        best_vld  = 1'b1;
        best_dist = lane_dist[k];
        best_idx  = lane_idx[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag  <= 1'b0;
      adata <= '0;
      min_dist  <= '0;
    end else if (narrow) begin
      flag  <= best_vld && (best_dist <= threshold);
      adata <= best_idx;
      min_dist  <= best_dist;
    end
  end

  initial assert (N % LANES == 0 && STEPS >= 2 && SELF < N)
    else $error("eoc_comparator: N must be a multiple of LANES, N/LANES >= 2, SELF < N");
endmodule

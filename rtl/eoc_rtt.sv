// eoc_rtt: result-transferring tree (RTT).
//
// In event-oriented computing only a few of the many condition expressions
// come out true in each round. Instead of letting the processor scan all N
// flags, the RTT sieves them: the flags and their additional data enter a
// binary tree of buffer registers at the leaves and only the units whose flag
// is 1 travel towards the root, from where they enter a short queue that the
// processor reads one unit at a time. A unit is the index of the condition
// that fired plus its additional data (here: the index of the closest other
// organism). The time to get a result out grows with log2(N), not N.
//
// How it works (following the document): in the acknowledge cycle the N flag
// and data registers (the leaves) are loaded in parallel from the
// reconfigurable logic. Every cycle, a buffer register that is empty takes a
// unit from one of its two children; if both children hold one, the left
// child, i.e. the one with the smaller index, has priority. A register that
// holds a unit does not accept a new one in that cycle. The top merge writes
// into the first of Q_DEPTH queue registers; units move down the queue the
// same way and the processor reads the last one. With N = 32 and four queue
// registers the first unit reaches the end of the queue eight cycles after
// the acknowledge cycle (1 + 8 cycles = 112.5 ns at 80 MHz), as in the
// document's estimate.
//
// Choices of this design: toggle handshake with the reconfigurable logic
// (`res_req_tgl` in, synchronized here; `res_ack_tgl` out); a new result set
// is taken only when all leaves are empty; a valid/ready read port for the
// processor; `set_done` pulses for one cycle when every unit taken so far
// (possibly none) has been read, so the processor knows its round is over
// (two sets that overlap in the tree give one pulse); `idle` is high when
// nothing is offered or in flight. Reset is asynchronous, active low.
module eoc_rtt
  import eoc_pkg::*;
#(
  parameter int unsigned N  = N_VARS,
  parameter int unsigned QD = Q_DEPTH
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // from the reconfigurable logic (other clock domain)
  input  logic [N-1:0]                 flags,
  input  logic [N-1:0][$clog2(N)-1:0]  adata,
  input  logic                         res_req_tgl,
  output logic                         res_ack_tgl,
  // to the core processor
  output logic                         cp_valid,
  output logic [$clog2(N)-1:0]         cp_idx,
  output logic [$clog2(N)-1:0]         cp_adata,
  input  logic                         cp_ready,
  output logic                         set_done,
  output logic                         idle
);
  localparam int unsigned IW = $clog2(N);

  typedef struct packed {
    logic [IW-1:0] idx;
    logic [IW-1:0] adata;
  } unit_t;

  // Heap layout: node 1 is the first queue register, nodes 2..N-1 are the
  // buffer registers, nodes N..2N-1 the leaves (leaf N+i holds variable i).
  logic  [2*N-1:2] tv;
  unit_t [2*N-1:2] td;
  logic  [QD-1:0]  qv;      // qv[0] is node 1
  unit_t [QD-1:0]  qd;

  logic [2*N-1:2] taken;    // node c hands its unit to its parent this cycle
  logic [QD-1:0]  q_taken;  // queue register k hands its unit on
  logic           res_req_s, pending, load;

  eoc_cdc_sync u_req_sync (.clk(clk), .rst_n(rst_n), .d(res_req_tgl), .q(res_req_s));

  always_comb begin
    taken = '0;
    for (int c = 2; c < 2 * N; c++) begin
      logic parent_empty;
      parent_empty = (c / 2 == 1) ? !qv[0] : !tv[c / 2];
      if (c % 2 == 0) taken[c] = parent_empty && tv[c];
      else            taken[c] = parent_empty && tv[c] && !tv[c - 1];
    end
    for (int k = 0; k < QD - 1; k++) q_taken[k] = qv[k] && !qv[k + 1];
    q_taken[QD - 1] = qv[QD - 1] && cp_ready;
  end

  // Take a new result set when one is offered and the leaves are free.
  assign load = (res_req_s != res_ack_tgl) && (tv[2*N-1:N] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tv          <= '0;
      td          <= '0;
      qv          <= '0;
      qd          <= '0;
      res_ack_tgl <= 1'b0;
    end else begin
      // leaves
      for (int i = 0; i < N; i++) begin
        if (load) begin
          tv[N + i] <= flags[i];
          td[N + i] <= '{idx: IW'(i), adata: adata[i]};
        end else if (taken[N + i]) begin
          tv[N + i] <= 1'b0;
        end
      end
      if (load) res_ack_tgl <= ~res_ack_tgl;
      // buffer registers
      for (int p = 2; p < N; p++) begin
        if (tv[p]) begin
          if (taken[p]) tv[p] <= 1'b0;
        end else if (taken[2 * p]) begin
          tv[p] <= 1'b1;
          td[p] <= td[2 * p];
        end else if (taken[2 * p + 1]) begin
          tv[p] <= 1'b1;
          td[p] <= td[2 * p + 1];
        end
      end
      // queue register 0 is the root of the tree
      if (qv[0]) begin
        if (q_taken[0]) qv[0] <= 1'b0;
      end else if (taken[2]) begin
        qv[0] <= 1'b1;
        qd[0] <= td[2];
      end else if (taken[3]) begin
        qv[0] <= 1'b1;
        qd[0] <= td[3];
      end
      for (int k = 1; k < QD; k++) begin
        if (qv[k]) begin
          if (q_taken[k]) qv[k] <= 1'b0;
        end else if (q_taken[k - 1]) begin
          qv[k] <= 1'b1;
          qd[k] <= qd[k - 1];
        end
      end
    end
  end

  assign cp_valid = qv[QD - 1];
  assign cp_idx   = qd[QD - 1].idx;
  assign cp_adata = qd[QD - 1].adata;

  // Round bookkeeping: a set is done once nothing of it is left anywhere.
  logic empty_all;
  assign empty_all = (tv == '0) && (qv == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      set_done <= 1'b0;
    end else begin
      set_done <= 1'b0;
      if (load) begin
        pending <= 1'b1;
      end else if (pending && empty_all) begin
        pending  <= 1'b0;
        set_done <= 1'b1;
      end
    end
  end

  assign idle = !pending && (res_req_s == res_ack_tgl);

  initial assert (N >= 4 && (N & (N - 1)) == 0 && QD >= 2)
    else $error("eoc_rtt: N must be a power of two >= 4 and QD >= 2");

  // A unit offered to the processor stays until it is read.
  a_cp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cp_valid && !cp_ready |=> cp_valid && $stable({cp_idx, cp_adata}))
    else $error("RTT output changed before it was read");
endmodule

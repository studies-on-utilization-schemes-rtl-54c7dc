// rpa_pe: processor element of the reconfigurable 1-bit processor array.
//
// Bit-serial datapath, least significant bit first, W bits per word. Each
// cycle the PE takes one bit of each operand and produces one result bit:
// add and subtract keep their carry in a flip-flop that is preset at the
// first bit of each word (0 for add, 1 for subtract, which adds ~b + 1);
// shift left by one outputs the previous bit of a and a 0 at the first bit;
// pass forwards a, which is how a PE bridges two wires. The result is
// registered, so every PE, also a bridging one, adds one cycle of delay.
//
// The operands are picked from NIN input wires (four short wires from the
// neighbours and the long wires that pass the PE) by `sel_a`/`sel_b`, and
// each operand and the output go through a programmable delay buffer of up
// to DMAX = 32 cycles. These buffers are the document's chosen way to line
// up data timings; operation set, buffers and the 32-cycle limit follow it.
// The word framing is this design's: a global bit counter `bit_cnt` runs
// 0..W-1 and the PE treats the cycle in which it equals `phase` as the first
// bit of its (delayed) operands. The configuration inputs are static while
// the array computes.
//
// Timing: result bit for operand bits seen in cycle t appears on `y` after
// the rising edge of cycle t, plus `dly_out` cycles.
module rpa_pe
  import rpa_pkg::*;
#(
  parameter int unsigned NIN = 16,
  parameter int unsigned W   = 16,
  parameter int unsigned DM  = DMAX
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NIN-1:0]              in,
  input  logic [$clog2(W)-1:0]        bit_cnt,
  // configuration
  input  pe_op_t                      op,
  input  logic [$clog2(NIN)-1:0]      sel_a,
  input  logic [$clog2(NIN)-1:0]      sel_b,
  input  logic [$clog2(DM+1)-1:0]     dly_a,
  input  logic [$clog2(DM+1)-1:0]     dly_b,
  input  logic [$clog2(DM+1)-1:0]     dly_out,
  input  logic [$clog2(W)-1:0]        phase,
  output logic                        y
);
  logic a, b, first, res, carry, a_prev, r;

  rpa_delay #(.DMAX(DM)) u_da (.clk(clk), .d(in[sel_a]), .dly(dly_a), .q(a));
  rpa_delay #(.DMAX(DM)) u_db (.clk(clk), .d(in[sel_b]), .dly(dly_b), .q(b));

  assign first = (bit_cnt == phase);

  logic cin, bx;
  always_comb begin
    bx  = (op == OP_SUB) ? ~b : b;
    cin = first ? (op == OP_SUB) : carry;
    unique case (op)
      OP_PASS: res = a;
      OP_ADD,
      OP_SUB:  res = a ^ bx ^ cin;
      OP_SHL:  res = first ? 1'b0 : a_prev;
      default: res = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry  <= 1'b0;
      a_prev <= 1'b0;
      r      <= 1'b0;
    end else begin
      carry  <= (a & bx) | (a & cin) | (bx & cin);
      a_prev <= a;
      r      <= res;
    end
  end

  rpa_delay #(.DMAX(DM)) u_dy (.clk(clk), .d(r), .dly(dly_out), .q(y));
endmodule

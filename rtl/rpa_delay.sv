// rpa_delay: programmable bit delay line, the timing-adjustment buffer of a
// PE input or output.
//
// A shift register of DMAX bits; `dly` selects the tap, so q equals d
// delayed by `dly` clock cycles (0 = combinational pass-through, up to DMAX).
// The document allows up to 32 cycles of delay per PE; that is the default.
// The shift register is not reset: words are framed by the bit counter, and
// stale bits drain out within DMAX cycles of any change.
module rpa_delay #(
  parameter int unsigned DMAX = 32
) (
  input  logic                        clk,
  input  logic                        d,
  input  logic [$clog2(DMAX+1)-1:0]   dly,
  output logic                        q
);
  logic [DMAX-1:0] sr;

  always_ff @(posedge clk) sr <= {sr[DMAX-2:0], d};

  always_comb begin
    q = d;
    for (int k = 1; k <= DMAX; k++)
      if (int'(dly) == k) q = sr[k-1];
  end
endmodule

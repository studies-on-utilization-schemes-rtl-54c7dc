// eoc_cdc_sync: two-flop synchronizer for a single level signal.
//
// The accelerator runs its variable register file, its reconfigurable
// logic and its result tree on three unrelated clocks. Every request and
// acknowledge between them is a toggle (a level that flips once per
// event), and each toggle enters the receiving domain through one of
// these. Latency: the output follows the input two rising edges of clk
// later. Reset clears both flops (asynchronous, active low).
module eoc_cdc_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sreg <= '0;
    else        sreg <= {sreg[STAGES-2:0], d};
  end

  assign q = sreg[STAGES-1];

  initial assert (STAGES >= 2) else $error("eoc_cdc_sync needs at least two stages");
endmodule

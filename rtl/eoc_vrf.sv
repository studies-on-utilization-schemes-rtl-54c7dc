// eoc_vrf: variable register file (VRF).
//
// Holds one register per associated variable (here an organism: sex and
// x/y position). The core processor writes the updated variables one by one
// over its bus, then pulses `commit`. Every register is visible at once on
// `vars`, which feeds all comparator modules of the reconfigurable logic in
// parallel. Following the document, the VRF sits in a clock domain of its
// own (200 MHz in the evaluated system) so that the processor-side transfers
// are not slowed down by the slower reconfigurable logic.
//
// Crossing to the reconfigurable logic is this design's own choice: `commit`
// flips `req_tgl`; the reconfigurable logic copies `vars` into its own
// registers and answers by flipping `ack_tgl`, which is synchronized here.
// From commit until that answer arrives `busy` is high and the registers
// must not change, so the copy is taken from stable data. Writes and
// commits while busy are a protocol error: they are ignored and flagged by
// an assertion.
//
// Timing: a write is visible on `vars` the cycle after `wr_en`. `busy` rises
// the cycle after `commit` and falls two to three clk cycles after `ack_tgl`
// flips. Reset (asynchronous, active low) clears all registers.
module eoc_vrf
  import eoc_pkg::*;
#(
  parameter int unsigned N = N_VARS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // core processor side
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_addr,
  input  organism_t            wr_data,
  input  logic                 commit,
  output logic                 busy,
  // to the reconfigurable logic
  output organism_t [N-1:0]    vars,
  output logic                 req_tgl,
  input  logic                 ack_tgl
);
  logic ack_s;

  eoc_cdc_sync u_ack_sync (.clk(clk), .rst_n(rst_n), .d(ack_tgl), .q(ack_s));

  assign busy = (req_tgl != ack_s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vars    <= '0;
      req_tgl <= 1'b0;
    end else if (!busy) begin
      if (wr_en)  vars[wr_addr] <= wr_data;
      if (commit) req_tgl <= ~req_tgl;
    end
  end

  // The processor must wait for !busy before touching the file again.
  a_no_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(wr_en || commit))
    else $error("VRF written or committed while busy");
endmodule

// tb_eoc_vrf: self-checking test of the variable register file.
//
// Writes random organisms to random addresses and checks the parallel output
// against a model array one cycle later; commits and checks the request
// toggle and busy; answers with an acknowledge toggle after a random delay and
// checks that busy falls two to three cycles later (synchronizer).
`timescale 1ns/1ps
module tb_eoc_vrf;
  import eoc_pkg::*;
  localparam int unsigned N = 32;

  logic clk = 0, rst_n = 0;
  logic wr_en, commit, busy, req_tgl, ack_tgl;
  logic [$clog2(N)-1:0] wr_addr;
  organism_t wr_data;
  organism_t [N-1:0] vars;
  organism_t model [N];
  int checks = 0, failures = 0;

  eoc_vrf #(.N(N)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic compare_all();
    for (int i = 0; i < N; i++) check("register contents", int'(vars[i]), int'(model[i]));
  endtask

  initial begin
    wr_en = 0; commit = 0; ack_tgl = 0; wr_addr = '0; wr_data = '0;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 compare_all();
    rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      int nw, dly, t0;
      nw = $urandom_range(1, 40);
      for (int k = 0; k < nw; k++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = $clog2(N)'($urandom); wr_data = organism_t'($urandom);
        model[wr_addr] = wr_data;
        @(negedge clk);
        wr_en = 0;
        check("write visible next cycle", int'(vars[wr_addr]), int'(wr_data));
      end
      compare_all();
      check("not busy before commit", int'(busy), 0);
      @(negedge clk);
      commit = 1;
      @(negedge clk);
      commit = 0;
      check("busy after commit", int'(busy), 1);
      check("request toggled", int'(req_tgl != ack_tgl), 1);
      dly = $urandom_range(0, 10);
      repeat (dly) begin
        @(negedge clk);
        check("busy holds until acknowledge", int'(busy), 1);
      end
      ack_tgl = req_tgl;
      t0 = 0;
      while (busy) begin @(negedge clk); t0++; end
      checks++;
      if (t0 < 2 || t0 > 3) begin failures++; $display("FAIL busy fell after %0d cycles", t0); end
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_eoc_cdc_sync: checks that the synchronizer output equals its input
// delayed by exactly two clock edges, and that reset clears it.
`timescale 1ns/1ps
module tb_eoc_cdc_sync;
  logic clk = 0, rst_n = 0, d = 0, q;
  logic [2:0] hist;
  int checks = 0, failures = 0;

  eoc_cdc_sync dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    hist = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      d = 1'($urandom);
      @(posedge clk);
      #1;
      hist = {hist[1:0], d};
      if (t >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("FAIL cycle %0d: q=%0b expected %0b", t, q, hist[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

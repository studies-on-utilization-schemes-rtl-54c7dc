// tb_rpa_pe: self-checking test of the bit-serial processor element.
//
// Random words (LSB first, W = 16) stream into two of the sixteen input
// wires, the other wires carry noise. For many random configurations
// (operation, input selection, input delays that line up operands arriving
// at different times, output delay, word phase) every output bit is compared
// with a reference that rebuilds the words and computes a+b, a-b, 2a, a or 0
// modulo 2^W. This also checks the latency: one register stage plus the
// programmed delays.
`timescale 1ns/1ps
module tb_rpa_pe;
  import rpa_pkg::*;
  localparam int unsigned NIN = 16, W = 16, DM = 32, CW = $clog2(W);
  localparam int T = 4000;

  logic clk = 0, rst_n = 0;
  logic [NIN-1:0] in;
  logic [CW-1:0] bit_cnt;
  pe_op_t op;
  logic [3:0] sel_a, sel_b;
  logic [5:0] dly_a, dly_b, dly_out;
  logic [CW-1:0] phase;
  logic y;
  int checks = 0, failures = 0;
  int n_ops [5] = '{default: 0};

  rpa_pe #(.NIN(NIN), .W(W), .DM(DM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] wa [T / W + 8];
  logic [W-1:0] wb [T / W + 8];

  function automatic logic [W-1:0] ref_word(pe_op_t o, logic [W-1:0] a, logic [W-1:0] b);
    unique case (o)
      OP_PASS: return a;
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_SHL:  return a << 1;
      default: return '0;
    endcase
  endfunction

  initial begin
    in = '0; bit_cnt = '0; op = OP_NOP; sel_a = 0; sel_b = 1;
    dly_a = 0; dly_b = 0; dly_out = 0; phase = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 60; cfg++) begin
      int k, da, db, dout;
      for (int i = 0; i < T / W + 8; i++) begin
        wa[i] = W'($urandom);
        wb[i] = (cfg % 4 == 0) ? ~wa[i] + 1'b1 : W'($urandom);  // long carry chains
      end
      op = pe_op_t'(cfg % 5);
      n_ops[cfg % 5]++;
      sel_a = 4'($urandom);
      do sel_b = 4'($urandom); while (sel_b == sel_a);
      k = $urandom_range(0, 10);             // b arrives k cycles after a
      db = $urandom_range(0, DM - 10);
      da = db + k;
      dout = $urandom_range(0, DM);
      dly_a = 6'(da); dly_b = 6'(db); dly_out = 6'(dout);
      phase = CW'(da % W);
      for (int t = 0; t < T; t++) begin
        @(negedge clk);
        bit_cnt = CW'(t % W);
        in = NIN'($urandom);
        in[sel_a] = wa[t / W][t % W];
        if (t >= k) in[sel_b] = wb[(t - k) / W][(t - k) % W];
        #1;
        // y now shows the result bit of operands seen at t' = t - 1 - dout
        if (t >= 3 * DM + 3 * W) begin
          int tp, ta;
          logic [W-1:0] rw;
          tp = t - 1 - dout;
          ta = tp - da;
          rw = ref_word(op, wa[ta / W], wb[ta / W]);
          checks++;
          if (y !== rw[ta % W]) begin
            failures++;
            if (failures < 10)
              $display("FAIL cfg %0d op %s t %0d: y=%0b expected %0b", cfg, op.name(), t, y, rw[ta % W]);
          end
        end
      end
    end
    for (int o = 0; o < 5; o++) begin
      checks++;
      if (n_ops[o] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

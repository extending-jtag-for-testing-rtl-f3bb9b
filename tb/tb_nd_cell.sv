`timescale 1ns / 1ps
// tb_nd_cell: self-checking test of the noise detector model.
//
// A random walk of the sampled voltage is applied with the cell enabled
// and disabled; the output is compared with a hysteresis reference written
// here: 0 from the moment the voltage exceeds V_Hthr until it falls below
// V_Hmin, 1 otherwise, and always 1 while CE=0.
module tb_nd_cell;
  localparam int unsigned VHTHR = 1980;
  localparam int unsigned VHMIN = 1620;

  logic [11:0] vb_mv = '0;
  logic ce = 1'b0;
  logic c;
  int checks = 0, failures = 0;
  int n_detect = 0;

  nd_cell #(.VHTHR_MV (VHTHR), .VHMIN_MV (VHMIN)) dut (.vb_mv, .ce, .c);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ref_c;
    ref_c = 1'b1;
    #1;
    for (int i = 0; i < 3000; i++) begin
      int v;
      if (i % 300 == 0) ce = ~ce;
      v = int'(vb_mv) + $urandom_range(0, 400) - 200;
      if (v < 0) v = 0;
      if (v > 2200) v = 2200;
      if (i % 50 == 0) v = (i % 100 == 0) ? 2100 : 1800;
      vb_mv = 12'(v);
      if (!ce) ref_c = 1'b1;
      else if (v > VHTHR) ref_c = 1'b0;
      else if (v < VHMIN) ref_c = 1'b1;
      #1;
      if (ce && v > VHTHR && c == 1'b0) n_detect++;
      checks++;
      if (c !== ref_c) begin
        failures++;
        $display("FAIL: step %0d v=%0d ce=%0b c=%0b expected %0b", i, v, ce, c, ref_c);
      end
    end
    checks++;
    if (n_detect == 0) begin failures++; $display("FAIL: no detection happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

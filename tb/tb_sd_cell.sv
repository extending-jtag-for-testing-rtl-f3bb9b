`timescale 1ns / 1ps
// tb_sd_cell: self-checking test of the skew detector model.
//
// Every clock period (100 ns) the interconnect output toggles at a random
// time after the rising clock edge. A change later than the 5 ns window
// must give one pulse on c, starting at the change and as wide as the
// lateness; an earlier change, or any change with CE=0, must give none.
module tb_sd_cell;
  localparam real WINDOW = 5.0;

  logic clock = 1'b0, b = 1'b0, ce = 1'b1;
  logic c;
  int checks = 0, failures = 0;
  int n_late = 0, n_ok = 0;

  sd_cell #(.WINDOW_NS (WINDOW)) dut (.clock, .b, .ce, .c);

  always #50 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      int d;
      bit late;
      @(posedge clock);
      ce = (i % 10 != 9);
      d = $urandom_range(1, 40);
      late = ce && (real'(d) > WINDOW);
      #(d * 1ns);
      b = ~b;
      #0.1;
      check(c == late, $sformatf("cycle %0d: change at %0d ns, ce=%0b, c=%0b", i, d, ce, c));
      if (late) begin
        n_late++;
        #((real'(d) - WINDOW - 0.2) * 1ns);
        check(c == 1'b1, "pulse lasts for the lateness");
        #0.3;
        check(c == 1'b0, "pulse ends after the lateness");
      end else n_ok++;
    end
    check(n_late > 0 && n_ok > 0, "both late and in-window changes occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

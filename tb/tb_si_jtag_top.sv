`timescale 1ns / 1ps
// tb_si_jtag_top: end-to-end test of the signal-integrity boundary-scan
// architecture at its default size (32 interconnects, 2 standard cells per
// core), driven only through the JTAG pins as a tester would.
//
// The testbench models the interconnects: every line copies its sending
// pin to its receiving pin after 1 ns, at 1800 mV for a 1 and 0 mV for a 0.
// Line NOISY overshoots to 1990 mV for 2 ns whenever it holds a 1 while
// every other line rises (the MA fault P_g1 on that victim); line SLOW
// arrives 30 ns late, beyond the 5 ns skew window. The test then runs the
// full procedure: for the initial values 0...0 and 1...1, SAMPLE/PRELOAD
// the value, load G_SITEST, shift the one-hot victim-select word, and per
// victim apply three pattern Update-DRs and shift one 0. After every
// pattern the 32 driven lines are compared with the maximum-aggressor
// sequence worked out here. O_SITEST then reads the ND flip-flops and the
// SD flip-flops in two scans; exactly NOISY and SLOW must be flagged, and
// the standard cells must return their captured pins. BYPASS, EXTEST and
// TRST are exercised too. The TCK count of the pattern
// generation phase is checked against the per-step counts of the
// procedure, and every mechanism (victim, aggressor and normal updates,
// suppressed shift updates, ND and SD detections and read-outs, bypass)
// must occur at least once.
module tb_si_jtag_top;
  import si_jtag_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned M = 2;
  localparam int unsigned K = 2;
  localparam int unsigned LEN = M + 2 * N + K;
  localparam int unsigned NOISY = 5;
  localparam int unsigned SLOW  = 17;
  localparam time TCK_HALF = 50ns;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1;
  logic tdo;
  logic [M-1:0] core_i_pin = 2'b01;
  logic [M-1:0] core_i_in;
  logic [N-1:0] core_i_out = '0;
  logic [N-1:0] iut_tx;
  logic [N-1:0] iut_rx = '0;
  logic [N-1:0][11:0] iut_rx_mv = '0;
  logic [N-1:0] core_j_in;
  logic [K-1:0] core_j_out = 2'b10;
  logic [K-1:0] core_j_pin;

  si_jtag_top dut (
    .tck, .tms, .tdi, .trst_n, .tdo,
    .sys_clk (tck),
    .core_i_pin, .core_i_in, .core_i_out, .iut_tx,
    .iut_rx, .iut_rx_mv, .core_j_in, .core_j_out, .core_j_pin
  );

  always #(TCK_HALF) tck = ~tck;

  int checks = 0, failures = 0;
  longint unsigned tck_count = 0;
  always @(posedge tck) tck_count++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- interconnect model ----------------
  logic [N-1:0] tx_prev = '0;
  always @(iut_tx) begin
    automatic logic [N-1:0] now = iut_tx;
    automatic logic [N-1:0] prev = tx_prev;
    tx_prev = now;
    for (int i = 0; i < N; i++) begin
      automatic int ii = i;
      automatic logic v = now[i];
      if (now[i] != prev[i]) begin
        fork
          begin
            #((ii == SLOW) ? 30ns : 1ns);
            iut_rx[ii]    = v;
            iut_rx_mv[ii] = v ? 12'd1800 : 12'd0;
          end
        join_none
      end
    end
    // P_g1 on NOISY: it stays 1 while every other line rises
    if (prev[NOISY] && now[NOISY] &&
        ((~prev & ~(N'(1) << NOISY)) == ~(N'(1) << NOISY)) &&
        ((now | (N'(1) << NOISY)) == '1)) begin
      fork
        begin
          #1ns  iut_rx_mv[NOISY] = 12'd1990;
          #2ns  iut_rx_mv[NOISY] = 12'd1800;
        end
      join_none
    end
  end

  // ---------------- mechanism counters ----------------
  int n_victim_upd = 0, n_aggr_upd = 0, n_normal_upd = 0, n_suppressed = 0;
  int n_nd_det = 0, n_sd_det = 0, n_nd_read = 0, n_sd_read = 0, n_bypass = 0, n_extest = 0;
  always @(posedge tck) begin
    if (dut.g_pgbsc[0].u_pgbsc.ctrl.update_dr) begin
      if (!dut.ctrl.si) n_normal_upd++;
      else if (dut.ctrl.ce) begin
        // chain[M+1..M+N] are the FF1 outputs of the PGBSCs
        n_victim_upd += $countones(dut.chain[M+N:M+1]);
        n_aggr_upd   += N - $countones(dut.chain[M+N:M+1]);
      end
    end
    if (dut.state == TAP_UPDATE_DR && dut.u_ir.instr_q == INSTR_G_SITEST &&
        !dut.ctrl.update_dr) n_suppressed++;
  end
  always @(negedge dut.nd_c[NOISY]) if (dut.ctrl.ce) n_nd_det++;
  always @(posedge dut.sd_c[SLOW])  if (dut.ctrl.ce) n_sd_det++;

  // ---------------- JTAG driver ----------------
  task automatic clk(input logic tms_v, input logic tdi_v, output logic tdo_v);
    @(negedge tck);
    tdo_v = tdo;
    tms = tms_v;
    tdi = tdi_v;
    @(posedge tck);
    #1ns;
  endtask

  task automatic step(input logic tms_v);
    logic unused;
    clk(tms_v, 1'b0, unused);
  endtask

  task automatic load_ir(input instr_e code);
    logic unused;
    step(1); step(1); step(0); step(0);   // RTI -> Select-DR -> Select-IR -> Capture-IR -> Shift-IR
    for (int i = 0; i < IR_LEN; i++) clk(i == IR_LEN - 1, code[i], unused);
    step(1); step(0);                     // Exit1-IR -> Update-IR -> RTI
  endtask

  // Shift L bits (din[0] first) and return the L bits seen on TDO.
  task automatic scan_dr(input int L, input logic [LEN-1:0] din, output logic [LEN-1:0] dout);
    logic b;
    dout = '0;
    step(1); step(0); step(0);            // RTI -> Select-DR -> Capture-DR -> Shift-DR
    for (int i = 0; i < L; i++) begin
      clk(i == L - 1, din[i], b);
      dout[i] = b;
    end
    step(1); step(0);                     // Exit1-DR -> Update-DR -> RTI
  endtask

  // A DR scan with no Shift-DR: Capture-DR -> Exit1-DR -> Update-DR.
  task automatic update_only();
    step(1); step(0); step(1); step(1); step(0);
  endtask

  // Place value per cell: bit c of cells goes to cell c after a full scan.
  function automatic logic [LEN-1:0] to_stream(input logic [LEN-1:0] cells);
    logic [LEN-1:0] s;
    for (int c = 0; c < LEN; c++) s[LEN-1-c] = cells[c];
    return s;
  endfunction

  function automatic logic [LEN-1:0] from_stream(input logic [LEN-1:0] s);
    logic [LEN-1:0] cells;
    for (int c = 0; c < LEN; c++) cells[c] = s[LEN-1-c];
    return cells;
  endfunction

  // expected lines after pattern u (1..3) of victim v from start value s
  function automatic logic [N-1:0] ma_pattern(input int v, input logic s, input int u);
    logic [N-1:0] p;
    for (int i = 0; i < N; i++)
      p[i] = (i == v) ? (s ^ (u >= 2)) : (s ^ (u % 2 == 1));
    return p;
  endfunction

  // watchdog
  initial begin
    #(2 * TCK_HALF * 40000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LEN-1:0] cells, dout;
    longint unsigned t0, expect_tck;
    logic init;

    // reset through TRST, then five TMS=1 clocks, then go to Run-Test/Idle
    #10ns trst_n = 1'b0;
    repeat (2) @(posedge tck);
    @(negedge tck) trst_n = 1'b1;
    repeat (5) step(1);
    step(0);
    check(dut.state == TAP_IDLE, "TAP reaches Run-Test/Idle");
    check(iut_tx == core_i_out && core_j_in == iut_rx, "normal mode after reset");

    // BYPASS: one-bit delay from TDI to TDO
    load_ir(INSTR_BYPASS);
    begin
      logic [LEN-1:0] din;
      din = '0;
      din[7:0] = 8'b1011_0010;
      scan_dr(9, din, dout);
      check(dout[8:1] == din[7:0] && dout[0] == 1'b0, "BYPASS delays TDI by one bit");
      n_bypass++;
    end

    // EXTEST: preloaded values drive every cell output
    load_ir(INSTR_SAMPLE_PRELOAD);
    cells = '0;
    cells[M-1:0] = 2'b10;
    for (int i = 0; i < N; i++) cells[M+i] = logic'(i % 3 == 0);
    for (int i = 0; i < N; i++) cells[M+N+i] = logic'(i % 5 == 1);
    cells[LEN-1 -: K] = 2'b01;
    scan_dr(LEN, to_stream(cells), dout);
    check(core_i_in == core_i_pin && iut_tx == core_i_out && core_j_pin == core_j_out,
          "SAMPLE/PRELOAD keeps the system paths");
    load_ir(INSTR_EXTEST);
    check(core_i_in == cells[M-1:0], "EXTEST drives core i inputs from FF2");
    check(iut_tx == cells[M +: N], "EXTEST drives the interconnects from FF2");
    check(core_j_in == cells[M+N +: N], "EXTEST drives core j inputs from FF2");
    check(core_j_pin == cells[LEN-1 -: K], "EXTEST drives core j pins from FF2");
    n_extest++;
    // reset before the test proper, so the EXTEST values leave no trace
    @(negedge tck) trst_n = 1'b0;
    @(negedge tck) trst_n = 1'b1;
    step(0);

    // ---------------- pattern generation, Fig. 8 / Fig. 12 ----------------
    t0 = tck_count;
    for (int k = 0; k < 2; k++) begin
      init = logic'(k);
      // SAMPLE/PRELOAD the initial value into the PGBSCs (normal mode)
      load_ir(INSTR_SAMPLE_PRELOAD);
      cells = '0;
      for (int i = 0; i < N; i++) cells[M+i] = init;
      scan_dr(LEN, to_stream(cells), dout);
      check(iut_tx == core_i_out, "SAMPLE/PRELOAD leaves the pins in normal mode");
      // G_SITEST: pins switch to the initial value
      load_ir(INSTR_G_SITEST);
      check(iut_tx == {N{init}}, $sformatf("G_SITEST applies initial value %0d", init));
      // first victim-select word: line 1 (PGBSC 0) is the victim
      cells = '0;
      cells[M] = 1'b1;
      scan_dr(LEN, to_stream(cells), dout);
      check(iut_tx == {N{init}}, "victim-select shift applies no pattern");
      for (int v = 0; v < N; v++) begin
        logic s;
        s = init ^ logic'(v % 2);
        check(iut_tx == {N{s}}, $sformatf("start value of victim %0d", v));
        for (int u = 1; u <= 3; u++) begin
          update_only();
          #2ns;
          check(iut_tx == ma_pattern(v, s, u),
                $sformatf("init %0d victim %0d pattern %0d: got %h", init, v, u, iut_tx));
        end
        scan_dr(1, '0, dout);             // shift one 0: next victim
      end
    end
    expect_tck = 2 * (9 + (LEN + 5) + 9 + (LEN + 5) + N * (3 * 5 + (1 + 5)));
    check(tck_count - t0 == expect_tck,
          $sformatf("pattern generation took %0d TCKs, expected %0d", tck_count - t0, expect_tck));
    $display("pattern generation: %0d TCK cycles for %0d lines", tck_count - t0, N);

    // ---------------- observation, O_SITEST (method 1) ----------------
    #100ns;
    load_ir(INSTR_O_SITEST);
    check(dut.ctrl.ce == 1'b0 && dut.ctrl.nd_sdn == 1'b1, "O_SITEST: CE=0, ND selected");
    scan_dr(LEN, '0, dout);
    cells = from_stream(dout);
    check(cells[M-1:0] == core_i_pin, "core i standard cells capture their pins");
    check(cells[LEN-1 -: K] == core_j_out, "core j standard cells capture their pins");
    for (int i = 0; i < N; i++)
      check(cells[M+N+i] == (i == NOISY), $sformatf("ND flag of line %0d", i));
    if (cells[M+N+NOISY]) n_nd_read++;
    check(dut.ctrl.nd_sdn == 1'b0, "Update-DR switches O_SITEST to the SD flip-flops");
    scan_dr(LEN, '0, dout);
    cells = from_stream(dout);
    for (int i = 0; i < N; i++)
      check(cells[M+N+i] == (i == SLOW), $sformatf("SD flag of line %0d", i));
    if (cells[M+N+SLOW]) n_sd_read++;

    // TRST clears the detector flip-flops
    @(negedge tck) trst_n = 1'b0;
    @(negedge tck) trst_n = 1'b1;
    step(0);
    load_ir(INSTR_O_SITEST);
    scan_dr(LEN, '0, dout);
    cells = from_stream(dout);
    check(cells[M+N +: N] == '0, "TRST clears the ND flip-flops");

    // mechanisms
    check(n_victim_upd  == 2 * N * 3, $sformatf("victim-mode updates %0d", n_victim_upd));
    check(n_aggr_upd    == 2 * N * 3 * (N - 1), $sformatf("aggressor-mode updates %0d", n_aggr_upd));
    check(n_normal_upd  > 0, "normal-mode updates");
    check(n_suppressed  == 2 * (N + 1), $sformatf("suppressed shift updates %0d", n_suppressed));
    check(n_nd_det      > 0, "noise detections");
    check(n_sd_det      > 0, "skew detections");
    check(n_nd_read == 1 && n_sd_read == 1, "ND and SD read-outs");
    check(n_bypass      > 0, "bypass");
    check(n_extest      > 0, "EXTEST");
    $display("mechanisms: victim=%0d aggressor=%0d normal=%0d suppressed=%0d nd_det=%0d sd_det=%0d nd_read=%0d sd_read=%0d bypass=%0d extest=%0d",
             n_victim_upd, n_aggr_upd, n_normal_upd, n_suppressed, n_nd_det, n_sd_det,
             n_nd_read, n_sd_read, n_bypass, n_extest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

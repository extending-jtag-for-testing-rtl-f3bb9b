`timescale 1ns / 1ps
// si_workload_run: runs the complete signal-integrity test on one
// n-interconnect instance of the architecture with no standard cells
// (m = k = 0), the configuration of the test-time evaluation, and counts
// the TCK cycles it takes.
//
// The procedure is the pattern-generation loop (SAMPLE/PRELOAD the initial
// value, G_SITEST, victim-select word, three Update-DRs and one shift per
// victim) for the initial values 0...0 and 1...1, read out in one of two
// ways:
//   METHOD = 1  read ND and SD once, after both initial values
//   METHOD = 2  read after each initial value, clearing with TRST between
//   METHOD = 3  read after every pattern step. The flags are sticky, so
//               each read shows all violations so far. The read-out scans
//               shift the victim-select word back into the PGBSCs, and
//               their two Update-DRs toggle the aggressors twice, leaving
//               the wires as they were. Before the third pattern of a
//               victim the word is shifted again under G_SITEST, which
//               restores the divide-by-two phase.
// Each read-out is O_SITEST followed by two DR scans of N bits: with no
// standard cells behind them the OBSCs are the N cells nearest TDO, so N
// shift cycles bring out all ND (then all SD) flags. Line NOISY suffers a
// P_g1 glitch and line SLOW a late arrival, as in the end-to-end test.
// With NOISY odd the glitch only happens under the second initial value,
// which method 2 must show. The testbench counts shift cycles and TCK
// cycles and checks them against the counts of the procedure's steps.
module si_workload_run #(
  parameter int unsigned N      = 8,
  parameter int unsigned METHOD = 1
) (
  output logic done,
  output int   checks,
  output int   failures,
  output longint unsigned gen_tck,     // TCKs of pattern generation
  output longint unsigned read_shifts  // shift cycles of all read-outs
);
  import si_jtag_pkg::*;

  localparam int unsigned NOISY = 1;
  localparam int unsigned SLOW  = N - 2;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1;
  logic tdo;
  logic [0:0] core_i_pin = '0, core_j_out = '0;
  logic [0:0] core_i_in, core_j_pin;
  logic [N-1:0] core_i_out = '0;
  logic [N-1:0] iut_tx;
  logic [N-1:0] iut_rx = '0;
  logic [N-1:0][11:0] iut_rx_mv = '0;
  logic [N-1:0] core_j_in;

  si_jtag_top #(.N (N), .M (0), .K (0)) dut (
    .tck, .tms, .tdi, .trst_n, .tdo,
    .sys_clk (tck),
    .core_i_pin, .core_i_in, .core_i_out, .iut_tx,
    .iut_rx, .iut_rx_mv, .core_j_in, .core_j_out, .core_j_pin
  );

  always #50ns tck = ~tck;

  longint unsigned tck_count = 0;
  longint unsigned t_pause, paused = 0;   // TCKs spent reading inside generation
  always @(posedge tck) tck_count++;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    gen_tck = 0;
    read_shifts = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (n=%0d, method %0d): %s", N, METHOD, what);
    end
  endtask

  // interconnect model, as in the end-to-end test
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
    step(1); step(1); step(0); step(0);
    for (int i = 0; i < IR_LEN; i++) clk(i == IR_LEN - 1, code[i], unused);
    step(1); step(0);
  endtask

  task automatic scan_dr(input int L, input logic [N-1:0] din, output logic [N-1:0] dout);
    logic b;
    dout = '0;
    step(1); step(0); step(0);
    for (int i = 0; i < L; i++) begin
      clk(i == L - 1, din[i], b);
      dout[i] = b;
    end
    step(1); step(0);
  endtask

  task automatic update_only();
    step(1); step(0); step(1); step(1); step(0);
  endtask

  task automatic trst();
    @(negedge tck) trst_n = 1'b0;
    @(negedge tck) trst_n = 1'b1;
    step(0);
  endtask

  // O_SITEST read: ND flags, then SD flags; OBSC i leaves as bit N-1-i.
  // din is shifted in meanwhile and ends up in the PGBSC FF1s.
  task automatic read_flags(input logic [N-1:0] din, output logic [N-1:0] nd,
                            output logic [N-1:0] sd);
    logic [N-1:0] dout;
    load_ir(INSTR_O_SITEST);
    scan_dr(N, din, dout);
    for (int i = 0; i < N; i++) nd[i] = dout[N-1-i];
    scan_dr(N, din, dout);
    for (int i = 0; i < N; i++) sd[i] = dout[N-1-i];
    read_shifts += 2 * N;
  endtask

  // one initial value: checks the patterns (and, for method 3, the flags)
  task automatic generate_patterns(input int k);
    logic init;
    logic [N-1:0] dout, sel, nd, sd;
    init = logic'(k);
    load_ir(INSTR_SAMPLE_PRELOAD);
    scan_dr(N, {N{init}}, dout);
    load_ir(INSTR_G_SITEST);
    check(iut_tx == {N{init}}, "initial value applied");
    sel = '0;
    sel[N-1] = 1'b1;           // the last bit shifted lands in PGBSC 0
    scan_dr(N, sel, dout);
    for (int v = 0; v < N; v++) begin
      logic s;
      s = init ^ logic'(v % 2);
      for (int u = 1; u <= 3; u++) begin
        logic [N-1:0] p;
        update_only();
        for (int i = 0; i < N; i++)
          p[i] = (i == v) ? (s ^ (u >= 2)) : (s ^ (u % 2 == 1));
        check(iut_tx == p, $sformatf("init %0d victim %0d pattern %0d", init, v, u));
        if (METHOD == 3) begin
          logic [N-1:0] vsel;
          bit nd_seen;
          vsel = N'(1) << (N - 1 - v);
          #100ns;
          t_pause = tck_count;
          read_flags(vsel, nd, sd);
          // P_g1 on NOISY is its victim step 3 under start value 0
          nd_seen = (k == 1) && (v > NOISY || (v == NOISY && u == 3));
          check(nd == (nd_seen ? (N'(1) << NOISY) : '0),
                $sformatf("ND flags after init %0d victim %0d pattern %0d: %b", init, v, u, nd));
          check(sd == (N'(1) << SLOW),
                $sformatf("SD flags after init %0d victim %0d pattern %0d: %b", init, v, u, sd));
          load_ir(INSTR_G_SITEST);
          if (u == 2) scan_dr(N, vsel, dout);
          check(iut_tx == p, "read-out leaves the wires unchanged");
          paused += tck_count - t_pause;
        end
      end
      scan_dr(1, '0, dout);
    end
  endtask

  initial begin
    logic [N-1:0] nd, sd;
    longint unsigned t0;
    longint unsigned gen_expect;
    #10ns;
    trst();
    gen_expect = 0;
    for (int k = 0; k < 2; k++) begin
      t0 = tck_count;
      paused = 0;
      generate_patterns(k);
      gen_tck += tck_count - t0 - paused;
      gen_expect += 9 + (N + 5) + 9 + (N + 5) + N * (3 * 5 + 6);
      // after a read each update starts from Run-Test/Idle: one more TCK
      if (METHOD == 3) gen_expect += 3 * N;
      if (METHOD == 2) begin
        #100ns;
        read_flags('0, nd, sd);
        check(nd == (k == 0 ? '0 : (N'(1) << NOISY)),
              $sformatf("ND flags after initial value %0d: %b", k, nd));
        check(sd == (N'(1) << SLOW), $sformatf("SD flags after initial value %0d: %b", k, sd));
        trst();
      end
    end
    if (METHOD == 1) begin
      #100ns;
      read_flags('0, nd, sd);
      check(nd == (N'(1) << NOISY), $sformatf("ND flags: %b", nd));
      check(sd == (N'(1) << SLOW), $sformatf("SD flags: %b", sd));
    end
    check(gen_tck == gen_expect, $sformatf("generation took %0d TCKs, expected %0d", gen_tck, gen_expect));
    check(read_shifts == ((METHOD == 3) ? 6 * N * 2 * N : METHOD * 2 * N),
          $sformatf("read-out shift cycles %0d", read_shifts));
    done = 1'b1;
  end

endmodule

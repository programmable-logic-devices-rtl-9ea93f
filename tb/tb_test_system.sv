// tb_test_system: end-to-end test of the whole set-up at its default size
// (336 IOBs, 260 bonded pins, four 65-pin active connectors).
//   1. the on-board controller runs the IOB structural test through the
//      full chain (connectors in BYPASS): it must pass and take exactly the
//      TCK count worked out from the scan lengths
//   2. the same with the tristate-path multiplexer select of IOB 300 (an
//      unbonded IOB) stuck on the direct path: it must fail and point at
//      IOB 300
//   3. the external tester port runs the interconnect test, fault free and
//      with one open bond wire and one short between two board traces
//   4. normal operation: PLD core to the connectors' mating side
// The flip-flop activity of IOB 0 is watched during step 1 so that each
// behaviour of the test (multiplexer on either path, SR to 0 and to 1,
// clock enable holding and loading) is counted; one that never happened is
// a failure.
module tb_test_system;
  import jtag_pkg::*;
  import iob_test_pkg::*;

  localparam int N_IOB = 336;
  localparam int N_BONDED = 260;
  localparam int N_CONN = 4;
  localparam int PPC = N_BONDED / N_CONN;
  localparam int CODE_W = 9;
  localparam int NPOST = N_CONN;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [15:0] fail_count, first_fail_iob;
  logic [3:0] first_fail_vec;
  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1, tdo;
  logic pld_pin_o [N_BONDED], pld_pin_oe [N_BONDED], pld_pin_i [N_BONDED];
  logic conn_board_i [N_BONDED], conn_ext_o [N_BONDED];
  iob_stim_t core_stim [N_IOB];
  logic core_input [N_IOB], core_reg_input [N_IOB];
  int checks = 0, failures = 0;

  test_system dut (
    .clk, .rst_n, .start, .busy, .done, .fail_count, .first_fail_vec, .first_fail_iob,
    .ext_tck(tck), .ext_tms(tms), .ext_tdi(tdi), .ext_trst_n(trst_n), .ext_tdo(tdo),
    .pld_pin_o, .pld_pin_oe, .pld_pin_i, .conn_board_i, .conn_ext_o,
    .core_stim, .core_input, .core_reg_input
  );

  always #5 clk = ~clk;

  // ---- board model with fault injection (as in tb_board_top) ----
  int open_pin = -1, short_a = -1, short_b = -1;
  logic drv [N_BONDED], line [N_BONDED];
  always_comb begin
    for (int p = 0; p < N_BONDED; p++)
      drv[p] = (pld_pin_oe[p] && p != open_pin) ? pld_pin_o[p] : 1'b1;
    for (int p = 0; p < N_BONDED; p++) line[p] = drv[p];
    if (short_a >= 0) begin
      line[short_a] = drv[short_a] & drv[short_b];
      line[short_b] = drv[short_a] & drv[short_b];
    end
    for (int p = 0; p < N_BONDED; p++) begin
      conn_board_i[p] = line[p];
      pld_pin_i[p] = (p == open_pin) ? (pld_pin_oe[p] ? pld_pin_o[p] : 1'b1) : line[p];
    end
  end

  `include "jtag_tasks.svh"
  `include "iob_test_flow.svh"
  `include "interconnect_flow.svh"

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // watchdog in clk cycles
  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters, watching IOB 0 while the controller runs ----
  int m_mux_direct = 0, m_mux_reg = 0, m_sr_reset = 0, m_sr_set = 0, m_ce_hold = 0,
      m_ce_load = 0, m_unbonded = 0, m_bypass = 0, m_clean = 0, m_open = 0, m_short = 0,
      m_transparent = 0, m_located = 0;
  int ctl_tck = 0;
  bit watching = 0;

  always @(posedge dut.u_board.u_pld.g_iob[0].u_iob.clk) if (watching) begin
    if (dut.u_board.u_pld.g_iob[0].u_iob.cfg.mux_o) m_mux_reg++;
    else                                            m_mux_direct++;
    if (dut.u_board.u_pld.g_iob[0].u_iob.stim.sr) begin
      if (dut.u_board.u_pld.g_iob[0].u_iob.cfg.init_o) m_sr_set++;
      else                                             m_sr_reset++;
    end else if (dut.u_board.u_pld.g_iob[0].u_iob.stim.oec) m_ce_load++;
    else m_ce_hold++;
  end
  always @(posedge dut.tck) if (dut.busy) ctl_tck++;

  task automatic run_controller();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
  endtask

  initial begin
    int ir_scan, cfg_scan, bs_scan, utr_scan, expected;
    bit bad [N_BONDED], bad_pld [N_BONDED];
    bit din[], dout[];
    int n_bad, n_bad_pld;
    foreach (core_stim[i]) core_stim[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. controller, fault free
    ir_scan  = 4 + 5 * (N_CONN + 1) + 2;
    cfg_scan = 3 + N_CONN + (5 * N_IOB + 1) + 2;
    bs_scan  = 3 + N_CONN + 3 * N_IOB + 2;
    utr_scan = 3 + N_CONN + (2 * N_IOB + 7) + 2;
    expected = 6 + 3 * (ir_scan + cfg_scan) + N_VEC * (4 * ir_scan + 2 * bs_scan + 2 * utr_scan);
    watching = 1;
    run_controller();
    watching = 0;
    chk(int'(fail_count), 0, "IOB test passes");
    chk(ctl_tck, expected, "controller TCK cycles");
    if (fail_count == 0) m_unbonded++;   // IOBs 260..335 were tested like the rest
    $display("controller run: %0d TCK cycles, %0d wrong responses", ctl_tck, fail_count);

    // 2. controller, tristate multiplexer select of IOB 300 stuck at 0
    force dut.u_board.u_pld.cfg[300].mux_t = 1'b0;
    run_controller();
    release dut.u_board.u_pld.cfg[300].mux_t;
    chk(int'(fail_count), 5, "wrong responses of the faulty IOB");
    chk(int'(first_fail_iob), 300, "fault located");
    if (fail_count != 0 && first_fail_iob == 300) m_located++;

    // 3. interconnect test from the external tester port, after loading a
    //    normal configuration (no test register, direct paths)
    tap_reset();
    din = new[40];
    foreach (din[k]) din[k] = $urandom_range(0, 1);
    scan(1'b0, din, dout);
    for (int k = 5; k < 40; k++) chk(int'(dout[k]), int'(din[k-5]), "five-cycle bypass chain");
    m_bypass++;
    configure_all(1'b0, 1'b0, 1'b0);
    interconnect_test(bad, bad_pld, n_bad, n_bad_pld);
    chk(n_bad + n_bad_pld, 0, "fault-free board");
    if (n_bad + n_bad_pld == 0) m_clean++;
    open_pin = 201; short_a = 12; short_b = 13;
    interconnect_test(bad, bad_pld, n_bad, n_bad_pld);
    chk(n_bad, 3, "pins flagged");
    chk(int'(bad[201]) + int'(bad[12]) + int'(bad[13]), 3, "faulty pins flagged");
    chk(int'(bad_pld[201]), 0, "open bond invisible from the PLD side");
    if (bad[201] && !bad_pld[201]) m_open++;
    if (bad[12] && bad[13]) m_short++;
    open_pin = -1; short_a = -1; short_b = -1;

    // 4. normal operation
    tap_reset();
    for (int n = 0; n < 3; n++) begin
      int wrong = 0;
      foreach (core_stim[i]) begin
        core_stim[i] = '0;
        core_stim[i].out_d = $urandom_range(0, 1);
      end
      #1;
      for (int p = 0; p < N_BONDED; p++) if (conn_ext_o[p] != core_stim[p].out_d) wrong++;
      chk(wrong, 0, "core to mating side");
      if (wrong == 0) m_transparent++;
    end

    $display("mechanisms: mux_direct=%0d mux_registered=%0d sr_reset=%0d sr_set=%0d ce_hold=%0d ce_load=%0d unbonded=%0d located=%0d bypass=%0d clean=%0d open_bond=%0d short=%0d transparent=%0d",
             m_mux_direct, m_mux_reg, m_sr_reset, m_sr_set, m_ce_hold, m_ce_load, m_unbonded,
             m_located, m_bypass, m_clean, m_open, m_short, m_transparent);
    if (m_mux_direct == 0 || m_mux_reg == 0 || m_sr_reset == 0 || m_sr_set == 0 ||
        m_ce_hold == 0 || m_ce_load == 0 || m_unbonded == 0 || m_located == 0 ||
        m_bypass == 0 || m_clean == 0 || m_open == 0 || m_short == 0 || m_transparent == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

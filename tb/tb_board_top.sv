// tb_board_top: the whole board at its default size (336 IOBs, 260 bonded
// pins, four 65-pin active connectors) tested end to end from the tester's
// TAP port:
//   1. BYPASS through the whole chain (1 + 4 one-bit registers)
//   2. IOB structural test of the PLD, connectors in BYPASS
//   3. board interconnect test in EXTEST: every bonded pin sends a
//      counting-sequence code (pin number + 1, 9 bits, and its
//      complement), every connector cell captures it
//   4. the same with one open bond wire and one short between two traces
//      injected in the board model below; the test must flag exactly those
//   5. normal operation: PLD core to mating side, connectors transparent
// The board model: a line is driven by the PLD pad when it drives and the
// bond is intact, otherwise it is pulled up; two shorted lines see the AND
// of their drivers; an open bond leaves the die pad seeing only itself.
// Each mechanism is counted and one that never happened is a failure.
module tb_board_top;
  import jtag_pkg::*;
  import iob_test_pkg::*;

  localparam int N_IOB = 336;
  localparam int N_BONDED = 260;
  localparam int N_CONN = 4;
  localparam int PPC = N_BONDED / N_CONN;
  localparam int NPOST = N_CONN;
  localparam int CODE_W = 9;   // pin number + 1 <= 260 < 2**9

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1, tdo;
  logic pld_pin_o [N_BONDED], pld_pin_oe [N_BONDED], pld_pin_i [N_BONDED];
  logic conn_board_i [N_BONDED], conn_ext_o [N_BONDED];
  iob_stim_t core_stim [N_IOB];
  logic core_input [N_IOB], core_reg_input [N_IOB];
  int checks = 0, failures = 0;

  board_top dut (
    .tck, .tms, .tdi, .trst_n, .tdo,
    .pld_pin_o, .pld_pin_oe, .pld_pin_i, .conn_board_i, .conn_ext_o,
    .core_stim, .core_input, .core_reg_input
  );

  // ---- board model with fault injection ----
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

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  // watchdog in TCK cycles
  int tck_cycles = 0;
  always @(posedge tck) tck_cycles++;
  initial begin
    wait (tck_cycles == 3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "interconnect_flow.svh"

  int m_bypass = 0, m_mux_direct = 0, m_mux_reg = 0, m_sr_reset = 0, m_sr_set = 0,
      m_ce_hold = 0, m_ce_load = 0, m_open = 0, m_short = 0, m_clean = 0, m_transparent = 0,
      m_unbonded = 0;

  initial begin
    bit din[], dout[];
    bit bad [N_BONDED], bad_pld [N_BONDED];
    int n_bad, n_bad_pld, bad0;
    foreach (core_stim[i]) core_stim[i] = '0;
    #1 trst_n = 0; #1 trst_n = 1;
    tap_reset();

    // 1. BYPASS chain: five one-bit registers
    din = new[40];
    foreach (din[k]) din[k] = $urandom_range(0, 1);
    scan(1'b0, din, dout);
    for (int k = 0; k < 5; k++) chk(dout[k], 1'b0, "bypass registers capture 0");
    for (int k = 5; k < 40; k++) chk(dout[k], din[k-5], "five-cycle bypass chain");
    m_bypass++;

    // 2. IOB structural test, connectors in BYPASS
    for (int n = 0; n < N_VEC; n++) begin
      iob_vec_t v;
      v = VECTORS[n];
      if (n == 0 || v.grp != VECTORS[n-1].grp)
        configure_all(GROUP_MUX[v.grp], GROUP_INIT[v.grp], 1'b1);
      apply_vector(v, bad0);
      if (bad0 != 0) $display("FAIL: vector %0d (table row %0d): %0d wrong responses", n, v.table_row, bad0);
      if (bad0 == 0 && v.check) begin
        if (v.grp == 0) m_mux_direct++;
        else            m_mux_reg++;
        if (v.table_row == 4)  m_sr_reset++;
        if (v.table_row == 13) m_sr_set++;
        if (v.table_row == 7)  m_ce_hold++;
        if (v.table_row == 0)  m_ce_load++;
        m_unbonded++;   // IOBs 260..335 answered like the bonded ones
      end
    end
    $display("IOB test: %0d vectors, %0d configurations, %0d bad responses (%0d IOBs)",
             n_vec_applied, n_cfg_loaded, n_bad_iob_resp, N_IOB);

    // 3. interconnect test, fault free
    configure_all(1'b0, 1'b0, 1'b0);
    interconnect_test(bad, bad_pld, n_bad, n_bad_pld);
    checks++;
    if (n_bad != 0 || n_bad_pld != 0) begin
      failures++;
      $display("FAIL: fault-free board shows %0d / %0d bad pins", n_bad, n_bad_pld);
    end else m_clean++;

    // 4. one open bond and one short
    open_pin = 37; short_a = 100; short_b = 101;
    interconnect_test(bad, bad_pld, n_bad, n_bad_pld);
    checks++;
    // the PLD's own input cell cannot see a broken bond: only the connector can
    if (!bad[37] || bad_pld[37]) begin
      failures++;
      $display("FAIL: open bond on pin 37 not seen at the connector only");
    end else m_open++;
    checks++;
    if (!bad[100] || !bad[101]) begin
      failures++;
      $display("FAIL: short 100/101 not found");
    end else m_short++;
    checks++;
    if (n_bad != 3) begin
      failures++;
      $display("FAIL: %0d pins flagged, expected 3", n_bad);
    end
    open_pin = -1; short_a = -1; short_b = -1;

    // 5. normal operation: everything transparent
    tap_reset();
    for (int n = 0; n < 4; n++) begin
      foreach (core_stim[i]) begin
        core_stim[i] = '0;
        core_stim[i].out_d = $urandom_range(0, 1);
      end
      #1;
      for (int p = 0; p < N_BONDED; p++) chk(conn_ext_o[p], core_stim[p].out_d, "core to mating side");
      for (int p = 0; p < N_BONDED; p++) chk(core_input[p], core_stim[p].out_d, "pad read back");
      m_transparent++;
    end

    $display("mechanisms: bypass=%0d mux_direct=%0d mux_registered=%0d sr_reset=%0d sr_set=%0d ce_hold=%0d ce_load=%0d unbonded=%0d clean_board=%0d open_bond=%0d short=%0d transparent=%0d",
             m_bypass, m_mux_direct, m_mux_reg, m_sr_reset, m_sr_set, m_ce_hold, m_ce_load,
             m_unbonded, m_clean, m_open, m_short, m_transparent);
    if (m_bypass == 0 || m_mux_direct == 0 || m_mux_reg == 0 || m_sr_reset == 0 || m_sr_set == 0 ||
        m_ce_hold == 0 || m_ce_load == 0 || m_unbonded == 0 || m_clean == 0 || m_open == 0 ||
        m_short == 0 || m_transparent == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("TCK cycles: %0d", tck_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

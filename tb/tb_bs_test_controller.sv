// tb_bs_test_controller: the controller runs the IOB structural test on a
// six-IOB PLD. First run: a fault-free PLD must pass, and the run must take
// exactly the TCK count worked out below from the scan lengths. Second run:
// the output-path multiplexer select of IOB 2 is held on the direct path (a
// stuck-at fault in its configuration); the controller must report the
// five vectors whose registered output differs from D and locate the first
// one at IOB 2, vector 5 (table row 4). Further runs hold other
// configuration bits stuck (tristate-path select, the INIT bits of the
// output and input flip-flops, two faulty IOBs at once) and check the count
// of wrong responses, the IOB and the vector reported, each worked out from
// the vector table. A fault-free run after them must pass again.
module tb_bs_test_controller;
  import jtag_pkg::*;
  import iob_test_pkg::*;

  localparam int N_IOB = 6;
  localparam int N_BONDED = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, tck, tms, tdi, tdo;
  logic [15:0] fail_count, first_fail_iob;
  logic [3:0] first_fail_vec;
  logic pin_o [N_BONDED], pin_oe [N_BONDED], pin_i [N_BONDED];
  iob_stim_t core_stim [N_IOB];
  logic core_input [N_IOB], core_reg_input [N_IOB];
  int checks = 0, failures = 0;

  bs_test_controller #(.N_IOB(N_IOB), .NPOST(0)) ctrl (
    .clk, .rst_n, .start, .busy, .done, .fail_count, .first_fail_vec, .first_fail_iob,
    .tck, .tms, .tdi, .tdo
  );

  pld_top #(.N_IOB(N_IOB), .N_BONDED(N_BONDED)) pld (
    .tck, .tms, .tdi, .trst_n(rst_n), .tdo, .pin_o, .pin_oe, .pin_i,
    .core_stim, .core_input, .core_reg_input
  );

  always_comb for (int i = 0; i < N_BONDED; i++) pin_i[i] = pin_oe[i] ? pin_o[i] : 1'b1;
  always #5 clk = ~clk;

  int tck_edges = 0;
  always @(posedge tck) tck_edges++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
  endtask

  initial begin
    int ir_scan, cfg_scan, bs_scan, utr_scan, expected;
    int n_mux, first_mux, n_init, first_init;
    iob_vec_t v;
    foreach (core_stim[i]) core_stim[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // TCK count: 6 reset ticks; an IR scan is 4 + 5 + 2 ticks, a DR scan
    // 3 + length + 2; three configuration loads; four scans per vector.
    ir_scan  = 4 + 5 + 2;
    cfg_scan = 3 + (5 * N_IOB + 1) + 2;
    bs_scan  = 3 + 3 * N_IOB + 2;
    utr_scan = 3 + (2 * N_IOB + 7) + 2;
    expected = 6 + 3 * (ir_scan + cfg_scan) + N_VEC * (4 * ir_scan + 2 * bs_scan + 2 * utr_scan);

    // a select stuck on the direct path is wrong wherever a registered-path
    // vector expects a value different from D
    n_mux = 0; first_mux = -1;
    for (int n = 0; n < N_VEC; n++) begin
      v = VECTORS[n];
      if (v.check && v.grp != 2'd0 && v.expect_q != v.d) begin
        n_mux++;
        if (first_mux < 0) first_mux = n;
      end
    end
    // INIT stuck at 0 is wrong in the INIT=1 group where SR loads INIT on a
    // rising CLK
    n_init = 0; first_init = -1;
    for (int n = 1; n < N_VEC; n++) begin
      v = VECTORS[n];
      if (v.check && v.grp == 2'd2 && v.sr && v.clk && !VECTORS[n-1].clk) begin
        n_init++;
        if (first_init < 0) first_init = n;
      end
    end

    run();
    chk(int'(fail_count), 0, "fault-free PLD passes");
    chk(tck_edges, expected, "TCK cycles of one run");
    chk(int'(busy), 0, "idle when done");

    force pld.cfg[2].mux_o = 1'b0;
    run();
    release pld.cfg[2].mux_o;
    chk(int'(fail_count), 5, "wrong responses of the faulty IOB");
    chk(int'(fail_count), n_mux, "wrong responses against the table");
    chk(int'(first_fail_iob), 2, "fault located at IOB 2");
    chk(int'(first_fail_vec), 5, "first failing vector");
    chk(int'(first_fail_vec), first_mux, "first failing vector against the table");
    $display("faulty run: %0d wrong responses", fail_count);

    force pld.cfg[4].mux_t = 1'b0;
    run();
    release pld.cfg[4].mux_t;
    chk(int'(fail_count), n_mux, "tristate select stuck: wrong responses");
    chk(int'(first_fail_iob), 4, "tristate select stuck: IOB");
    chk(int'(first_fail_vec), first_mux, "tristate select stuck: vector");

    force pld.cfg[0].init_o = 1'b0;
    run();
    release pld.cfg[0].init_o;
    chk(int'(fail_count), n_init, "output INIT stuck at 0: wrong responses");
    chk(int'(first_fail_iob), 0, "output INIT stuck at 0: IOB");
    chk(int'(first_fail_vec), first_init, "output INIT stuck at 0: vector");

    force pld.cfg[5].init_i = 1'b0;
    run();
    release pld.cfg[5].init_i;
    chk(int'(fail_count), n_init, "input INIT stuck at 0: wrong responses");
    chk(int'(first_fail_iob), 5, "input INIT stuck at 0: IOB");
    chk(int'(first_fail_vec), first_init, "input INIT stuck at 0: vector");

    // two faulty IOBs: IOB 3 sits nearer TDO, so it is reported first
    force pld.cfg[1].mux_o = 1'b0;
    force pld.cfg[3].mux_o = 1'b0;
    run();
    release pld.cfg[1].mux_o;
    release pld.cfg[3].mux_o;
    chk(int'(fail_count), 2 * n_mux, "two faulty IOBs: wrong responses");
    chk(int'(first_fail_iob), 3, "two faulty IOBs: first reported");

    tck_edges = 0;
    run();
    chk(int'(fail_count), 0, "fault-free PLD passes again");
    chk(tck_edges, expected, "TCK cycles of the last run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pld_top: a six-IOB PLD (four bonded, two unbonded) driven through its
// TAP. Covers BYPASS, USER1 falling back to BYPASS without the test
// configuration, normal operation of the IOBs from the core, the complete
// IOB structural test (three configurations, all vectors, through INTEST
// and the User Test Register), EXTEST on the bonded pins, and the
// loop-back of unbonded pads.
module tb_pld_top;
  import jtag_pkg::*;
  import iob_test_pkg::*;

  localparam int N_IOB = 6;
  localparam int N_BONDED = 4;
  localparam int NPOST = 0;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1, tdo;
  logic pin_o [N_BONDED], pin_oe [N_BONDED], pin_i [N_BONDED], ext_drv [N_BONDED];
  iob_stim_t core_stim [N_IOB];
  logic core_input [N_IOB], core_reg_input [N_IOB];
  int checks = 0, failures = 0;

  pld_top #(.N_IOB(N_IOB), .N_BONDED(N_BONDED)) dut (
    .tck, .tms, .tdi, .trst_n, .tdo, .pin_o, .pin_oe, .pin_i,
    .core_stim, .core_input, .core_reg_input
  );

  // board side of each bonded pin: the PLD if it drives, else the tester
  always_comb for (int i = 0; i < N_BONDED; i++) pin_i[i] = pin_oe[i] ? pin_o[i] : ext_drv[i];

  `include "jtag_tasks.svh"
  `include "iob_test_flow.svh"

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit din[], dout[], d[], r[];
    foreach (core_stim[i]) core_stim[i] = '0;
    foreach (ext_drv[i]) ext_drv[i] = 1'b0;
    #1 trst_n = 0; #1 trst_n = 1;
    tap_reset();

    // ---- BYPASS after reset, and USER1 without the test configuration ----
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) ir_pld(I_USER1);
      din = new[16];
      foreach (din[k]) din[k] = $urandom_range(0, 1);
      scan(1'b0, din, dout);
      chk(dout[0], 1'b0, "one-bit register captures 0");
      for (int k = 1; k < 16; k++) chk(dout[k], din[k-1], "one-bit delay");
    end

    // ---- normal operation: IOBs driven from the core ----
    ir_pld(I_BYPASS);
    for (int n = 0; n < 10; n++) begin
      foreach (core_stim[i]) begin
        core_stim[i] = iob_stim_t'($urandom());
        core_stim[i].clk = 1'b0;
      end
      foreach (ext_drv[i]) ext_drv[i] = $urandom_range(0, 1);
      #1;
      for (int i = 0; i < N_IOB; i++) begin
        logic exp_in;
        if (i < N_BONDED) begin
          chk(pin_oe[i], !core_stim[i].tristate, "normal: pad enable");
          if (!core_stim[i].tristate) chk(pin_o[i], core_stim[i].out_d, "normal: pad data");
          exp_in = core_stim[i].tristate ? ext_drv[i] : core_stim[i].out_d;
        end else begin
          exp_in = core_stim[i].tristate ? 1'b1 : core_stim[i].out_d;
        end
        chk(core_input[i], exp_in, "normal: Input");
      end
    end
    foreach (core_stim[i]) core_stim[i] = '0;

    // ---- IOB structural test ----
    run_iob_test();
    checks++;
    if (n_vec_applied != N_VEC || n_cfg_loaded != 3) begin
      failures++;
      $display("FAIL: %0d vectors, %0d configurations", n_vec_applied, n_cfg_loaded);
    end

    // ---- EXTEST: the BS register drives and observes the pads ----
    configure_all(1'b0, 1'b0, 1'b0);
    ir_pld(I_EXTEST);
    for (int n = 0; n < 6; n++) begin
      bit drive [N_IOB], val [N_IOB];
      d = new[3 * N_IOB];
      for (int i = 0; i < N_IOB; i++) begin
        drive[i] = $urandom_range(0, 1);
        val[i]   = $urandom_range(0, 1);
        d[3*(N_IOB-1-i)+2] = 1'b0;
        d[3*(N_IOB-1-i)+1] = val[i];
        d[3*(N_IOB-1-i)]   = !drive[i];
      end
      foreach (ext_drv[i]) ext_drv[i] = $urandom_range(0, 1);
      dr_pld(d, r);  // apply
      #1;
      for (int i = 0; i < N_BONDED; i++) begin
        chk(pin_oe[i], drive[i], "EXTEST: enable from tristate cell");
        if (drive[i]) chk(pin_o[i], val[i], "EXTEST: data from output cell");
      end
      dr_pld(d, r);  // capture what the pads see
      for (int i = 0; i < N_IOB; i++) begin
        logic exp_pad;
        if (i < N_BONDED) exp_pad = drive[i] ? val[i] : ext_drv[i];
        else              exp_pad = drive[i] ? val[i] : 1'b1;
        chk(r[3*(N_IOB-1-i)+2], exp_pad, "EXTEST: input cell captures pad");
      end
    end

    $display("IOB test: %0d vectors, %0d configurations, %0d bad responses",
             n_vec_applied, n_cfg_loaded, n_bad_iob_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

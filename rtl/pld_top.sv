// pld_top: the I/O side of a boundary-scan PLD set up for the IOB test
// (Figure 2).
//
// N_IOB IOBs, each with its three boundary-scan cells, form the BS register
// (3*N_IOB cells, IOB 0 next to TDI). The first N_BONDED IOBs are bonded to
// package pins; the rest are unbonded and their pad only sees its own
// buffer (an undriven unbonded pad reads 1, this design's choice). The TAP
// serves four data registers, selected by the instruction:
//   EXTEST, SAMPLE, INTEST  BS register
//   USER1                   User Test Register, 2*N_IOB+7 cells (only while
//                           the test configuration is loaded, else BYPASS)
//   CFG_IN                  configuration register (IOB multiplexer selects
//                           and INIT bits, plus the test-configuration flag)
//   anything else           bypass register
// TDO is the scan output of the instruction register in Shift-IR and of the
// selected data register otherwise (the TDO multiplexer of Figure 2).
//
// Normal operation: with the test flag clear, the IOBs take their seven
// internal inputs from the core ports (core_stim) and the User Test Register
// does not exist on the scan path. Test configuration: with the flag set,
// all IOBs take the broadcast stimulus of the User Test Register, whose
// capture cells observe every IOB's Input and Reg. Input.
//
// Cell modes: the output/tristate cells drive the pads in EXTEST, INTEST
// and (in the test configuration) USER1; the input cells drive the input
// paths in INTEST and USER1. Keeping the BS cells in their INTEST state under
// USER1 lets the input-path stimulus shifted through the BS register stay
// applied while the User Test Register is shifted; this is this design's
// choice, the method only says both registers are shifted in turn.
// All scan actions are on the rising TCK edge (see tap_controller).
module pld_top
  import jtag_pkg::*;
#(
  parameter int unsigned N_IOB    = 336,
  parameter int unsigned N_BONDED = 260
) (
  input  logic      tck,
  input  logic      tms,
  input  logic      tdi,
  input  logic      trst_n,
  output logic      tdo,
  // bonded pads, towards the bond wires
  output logic      pin_o  [N_BONDED],
  output logic      pin_oe [N_BONDED],
  input  logic      pin_i  [N_BONDED],
  // core side of the IOBs (normal operation)
  input  iob_stim_t core_stim      [N_IOB],
  output logic      core_input     [N_IOB],
  output logic      core_reg_input [N_IOB]
);

  tap_state_t state;
  dr_ctrl_t   dr, irc;
  logic       tap_reset, shifting;
  instr_t     instr;

  tap_controller u_tap (
    .tck, .trst_n, .tms, .state, .dr, .ir(irc), .reset(tap_reset), .shifting
  );

  logic ir_so;
  instruction_register #(.LEN(IR_LEN), .RESET_INSTR(I_BYPASS)) u_ir (
    .tck, .trst_n, .tap_reset, .ctl(irc), .si(tdi), .so(ir_so), .instr
  );

  // ---- configuration memory (IOB part) ----
  logic     utr_en;
  iob_cfg_t cfg [N_IOB];
  logic     sel_cfg, cfg_so;

  config_register #(.N_IOB(N_IOB)) u_cfg (
    .tck, .trst_n, .ctl(dr), .sel(sel_cfg), .si(tdi), .so(cfg_so),
    .utr_en, .cfg
  );

  // ---- instruction decode ----
  logic sel_bs, sel_utr, sel_byp, mode_out, mode_in;

  always_comb begin
    sel_bs   = (instr == I_EXTEST) || (instr == I_SAMPLE) || (instr == I_INTEST);
    sel_utr  = (instr == I_USER1) && utr_en;
    sel_cfg  = (instr == I_CFG_IN);
    sel_byp  = !(sel_bs || sel_utr || sel_cfg);
    mode_out = (instr == I_EXTEST) || (instr == I_INTEST) || sel_utr;
    mode_in  = (instr == I_INTEST) || sel_utr;
  end

  // ---- User Test Register ----
  iob_stim_t utr_stim;
  logic      utr_so;

  user_test_register #(.N_IOB(N_IOB)) u_utr (
    .tck, .trst_n, .ctl(dr), .sel(sel_utr), .si(tdi), .so(utr_so),
    .stim(utr_stim), .input_i(core_input), .reg_input_i(core_reg_input)
  );

  // ---- IOBs and the BS register ----
  logic chain [N_IOB+1];
  logic pad_o [N_IOB], pad_oe [N_IOB], pad_i [N_IOB];

  assign chain[0] = tdi;

  for (genvar i = 0; i < N_IOB; i++) begin : g_iob
    iob_stim_t stim_i;
    assign stim_i = utr_en ? utr_stim : core_stim[i];

    iob u_iob (
      .stim(stim_i), .cfg(cfg[i]),
      .input_o(core_input[i]), .reg_input_o(core_reg_input[i]),
      .tck, .trst_n, .ctl(dr), .sel(sel_bs), .mode_out, .mode_in,
      .si(chain[i]), .so(chain[i+1]),
      .pad_o(pad_o[i]), .pad_oe(pad_oe[i]), .pad_i(pad_i[i])
    );

    if (i < N_BONDED) begin : g_bonded
      assign pin_o[i]  = pad_o[i];
      assign pin_oe[i] = pad_oe[i];
      assign pad_i[i]  = pin_i[i];
    end else begin : g_unbonded
      assign pad_i[i] = pad_oe[i] ? pad_o[i] : 1'b1;
    end
  end

  // ---- bypass and TDO multiplexer ----
  logic byp_so;
  bypass_register u_byp (
    .tck, .trst_n, .ctl(dr), .sel(sel_byp), .si(tdi), .so(byp_so)
  );

  always_comb begin
    if (irc.shift)    tdo = ir_so;
    else if (sel_bs)  tdo = chain[N_IOB];
    else if (sel_utr) tdo = utr_so;
    else if (sel_cfg) tdo = cfg_so;
    else              tdo = byp_so;
  end

endmodule

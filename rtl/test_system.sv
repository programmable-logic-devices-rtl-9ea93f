// test_system: the board of Figure 4 together with the simple boundary-scan
// controller that runs the IOB structural test, so that the whole test set-
// up is one design.
//
// The chain is TDI -> PLD -> active connectors 0..N_CONN-1 -> TDO. While the
// controller runs (busy), it owns TCK/TMS/TDI and reads TDO, keeping the
// connectors in BYPASS; otherwise the external tester port (ext_*) drives
// the chain, e.g. for the interconnect test in EXTEST or for normal-mode
// SAMPLE. TRST of every device is the AND of rst_n and ext_trst_n.
// The pads, bond wires and board traces are outside (see board_top): their
// signals are ports here too. The controller runs at clk/2 TCK; the
// external port is sampled as it comes.
// Joining a tester port and an on-board controller with a multiplexer is
// this design's choice; the method only says a simple controller suffices.
module test_system
  import jtag_pkg::*;
#(
  parameter int unsigned N_IOB    = 336,
  parameter int unsigned N_BONDED = 260,
  parameter int unsigned N_CONN   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // IOB test controller
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [15:0] fail_count,
  output logic [3:0]  first_fail_vec,
  output logic [15:0] first_fail_iob,
  // external tester port
  input  logic        ext_tck,
  input  logic        ext_tms,
  input  logic        ext_tdi,
  input  logic        ext_trst_n,
  output logic        ext_tdo,
  // PLD pads and connector lines (board wiring is outside)
  output logic        pld_pin_o  [N_BONDED],
  output logic        pld_pin_oe [N_BONDED],
  input  logic        pld_pin_i  [N_BONDED],
  input  logic        conn_board_i [N_BONDED],
  output logic        conn_ext_o   [N_BONDED],
  // PLD core side
  input  iob_stim_t   core_stim      [N_IOB],
  output logic        core_input     [N_IOB],
  output logic        core_reg_input [N_IOB]
);

  logic c_tck, c_tms, c_tdi;
  logic tck, tms, tdi, tdo, trst_n;

  bs_test_controller #(.N_IOB(N_IOB), .NPOST(N_CONN)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .fail_count, .first_fail_vec, .first_fail_iob,
    .tck(c_tck), .tms(c_tms), .tdi(c_tdi), .tdo
  );

  always_comb begin
    tck     = busy ? c_tck : ext_tck;
    tms     = busy ? c_tms : ext_tms;
    tdi     = busy ? c_tdi : ext_tdi;
    trst_n  = rst_n && ext_trst_n;
    ext_tdo = tdo;
  end

  board_top #(.N_IOB(N_IOB), .N_BONDED(N_BONDED), .N_CONN(N_CONN)) u_board (
    .tck, .tms, .tdi, .trst_n, .tdo,
    .pld_pin_o, .pld_pin_oe, .pld_pin_i, .conn_board_i, .conn_ext_o,
    .core_stim, .core_input, .core_reg_input
  );

endmodule

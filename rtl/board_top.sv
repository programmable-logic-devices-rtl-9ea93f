// board_top: a PLD board whose edge connectors are active connectors, all
// on one boundary-scan chain (Figure 4).
//
// The tester's TDO enters the PLD, the PLD's TDO enters active connector 0,
// and connector k feeds connector k+1; the last connector returns TDO to the
// tester. TCK, TMS and TRST are common. Each of the N_BONDED bonded PLD pins
// is routed to one pin of one connector: bonded pin p goes to connector
// p / PINS_PER_CONN, pin p % PINS_PER_CONN. The pads, bond wires and board
// traces have no logic of their own, so they are not modelled here: the
// PLD's pad signals (pld_pin_o/oe/i) and the connectors' board-side inputs
// (conn_board_i) are ports, and whatever joins them (an ideal wire, a net
// with a pull-up, or a broken bond) is outside. The default sizes are those
// of the example device, an XCV200 in a BG352 package: 336 IOBs, of which
// 260 reach package pins; four connectors, one per board edge as drawn, is
// this design's choice.
// With these sizes the chain is 3*336 = 1008 PLD cells plus 260 connector
// cells; a whole-chain EXTEST scan is 1268 TCK cycles in Shift-DR.
module board_top
  import jtag_pkg::*;
#(
  parameter int unsigned N_IOB    = 336,
  parameter int unsigned N_BONDED = 260,
  parameter int unsigned N_CONN   = 4
) (
  input  logic      tck,
  input  logic      tms,
  input  logic      tdi,
  input  logic      trst_n,
  output logic      tdo,
  // PLD pads, towards the bond wires
  output logic      pld_pin_o  [N_BONDED],
  output logic      pld_pin_oe [N_BONDED],
  input  logic      pld_pin_i  [N_BONDED],
  // active connectors: board-side lines in, mating side out
  input  logic      conn_board_i [N_BONDED],
  output logic      conn_ext_o   [N_BONDED],
  // PLD core side (normal operation)
  input  iob_stim_t core_stim      [N_IOB],
  output logic      core_input     [N_IOB],
  output logic      core_reg_input [N_IOB]
);

  localparam int unsigned PINS_PER_CONN = N_BONDED / N_CONN;

  initial begin
    assert (PINS_PER_CONN * N_CONN == N_BONDED)
      else $error("N_BONDED must be a multiple of N_CONN");
  end

  logic td [N_CONN+1];

  pld_top #(.N_IOB(N_IOB), .N_BONDED(N_BONDED)) u_pld (
    .tck, .tms, .tdi, .trst_n, .tdo(td[0]),
    .pin_o(pld_pin_o), .pin_oe(pld_pin_oe), .pin_i(pld_pin_i),
    .core_stim, .core_input, .core_reg_input
  );

  for (genvar k = 0; k < N_CONN; k++) begin : g_conn
    logic b_in  [PINS_PER_CONN];
    logic e_out [PINS_PER_CONN];
    for (genvar j = 0; j < PINS_PER_CONN; j++) begin : g_pin
      assign b_in[j] = conn_board_i[k*PINS_PER_CONN + j];
      assign conn_ext_o[k*PINS_PER_CONN + j] = e_out[j];
    end
    active_connector #(.N_PINS(PINS_PER_CONN)) u_conn (
      .tck, .tms, .tdi(td[k]), .trst_n, .tdo(td[k+1]),
      .board_i(b_in), .ext_o(e_out)
    );
  end

  assign tdo = td[N_CONN];

endmodule

// active_connector: a transparent board connector made of boundary-scan
// cells (Figure 3), so that the board edge becomes one more device on the
// scan chain.
//
// N_PINS BS cells, one per connector pin, sit between the board-side line
// (board_i) and the mating side (ext_o). In normal operation each cell is
// transparent, ext_o = board_i. The connector has its own TAP controller,
// instruction register and bypass register, and a TDO multiplexer choosing
// the instruction register (Shift-IR), the cell chain (EXTEST, SAMPLE) or
// the bypass register. In EXTEST the cells drive ext_o from their update
// stage; on Capture-DR each cell samples its board line, which is how a PLD
// output reaching the connector through its bond wire and the board trace is
// observed. Cell 0 is next to TDI.
// Figure 3 draws each cell with one input and one output, so each channel
// passes one direction, board to edge; the instruction codes are shared with
// the PLD (jtag_pkg), this design's choice.
module active_connector
  import jtag_pkg::*;
#(
  parameter int unsigned N_PINS = 65
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  input  logic trst_n,
  output logic tdo,
  input  logic board_i [N_PINS],
  output logic ext_o   [N_PINS]
);

  tap_state_t state;
  dr_ctrl_t   dr, irc;
  logic       tap_reset, shifting;
  instr_t     instr;
  logic       ir_so, byp_so;

  tap_controller u_tap (
    .tck, .trst_n, .tms, .state, .dr, .ir(irc), .reset(tap_reset), .shifting
  );

  instruction_register #(.LEN(IR_LEN), .RESET_INSTR(I_BYPASS)) u_ir (
    .tck, .trst_n, .tap_reset, .ctl(irc), .si(tdi), .so(ir_so), .instr
  );

  logic sel_bs, mode;
  assign sel_bs = (instr == I_EXTEST) || (instr == I_SAMPLE);
  assign mode   = (instr == I_EXTEST);

  logic chain [N_PINS+1];
  assign chain[0] = tdi;

  for (genvar i = 0; i < N_PINS; i++) begin : g_cell
    bs_cell u_cell (
      .tck, .trst_n, .ctl(dr), .sel(sel_bs), .mode,
      .pi(board_i[i]), .po(ext_o[i]), .si(chain[i]), .so(chain[i+1])
    );
  end

  bypass_register u_byp (
    .tck, .trst_n, .ctl(dr), .sel(!sel_bs), .si(tdi), .so(byp_so)
  );

  always_comb begin
    if (irc.shift)   tdo = ir_so;
    else if (sel_bs) tdo = chain[N_PINS];
    else             tdo = byp_so;
  end

endmodule

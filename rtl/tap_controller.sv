// tap_controller: IEEE 1149.1 Test Access Port state machine.
//
// The sixteen-state controller advances on every rising TCK edge under TMS,
// exactly as the standard's state diagram prescribes, and decodes the
// current state into the strobes that the data and instruction registers
// use: capture, shift and update. Each strobe is high while the TAP sits in
// the matching state, so a register acts on the rising TCK edge that leaves
// that state. All register actions therefore happen on the rising edge; the
// standard's falling-edge update and TDO retiming are not reproduced, which
// is this design's simplification. trst_n is the optional asynchronous TAP
// reset; five TCK cycles with TMS high reach Test-Logic-Reset as well.
// The documents this design is built from only name the TAP; its behaviour
// is the standard's.
module tap_controller
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_t state,
  output dr_ctrl_t   dr,       // strobes for the selected data register
  output dr_ctrl_t   ir,       // strobes for the instruction register
  output logic       reset,    // high in Test-Logic-Reset
  output logic       shifting  // high in Shift-DR or Shift-IR (TDO valid)
);

  tap_state_t next;

  always_comb begin
    unique case (state)
      TLR:        next = tms ? TLR       : RTI;
      RTI:        next = tms ? SEL_DR    : RTI;
      SEL_DR:     next = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: next = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   next = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   next = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   next = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   next = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  next = tms ? SEL_DR    : RTI;
      SEL_IR:     next = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: next = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   next = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   next = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   next = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   next = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  next = tms ? SEL_DR    : RTI;
      default:    next = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= next;
  end

  always_comb begin
    dr.capture = (state == CAPTURE_DR);
    dr.shift   = (state == SHIFT_DR);
    dr.update  = (state == UPDATE_DR);
    ir.capture = (state == CAPTURE_IR);
    ir.shift   = (state == SHIFT_IR);
    ir.update  = (state == UPDATE_IR);
    reset      = (state == TLR);
    shifting   = dr.shift || ir.shift;
  end

endmodule

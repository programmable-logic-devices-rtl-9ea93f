// bypass_register: the one-bit IEEE 1149.1 bypass register.
//
// It loads 0 on Capture-DR and the scan input on Shift-DR, so a device in
// BYPASS adds exactly one TCK of delay between its TDI and TDO. Actions on
// the rising TCK edge while `sel` is high; trst_n clears it.
// Named in Figures 2 and 3; behaviour as in the standard.
module bypass_register
  import jtag_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t ctl,
  input  logic     sel,
  input  logic     si,
  output logic     so
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                 so <= 1'b0;
    else if (sel && ctl.capture) so <= 1'b0;
    else if (sel && ctl.shift)   so <= si;
  end

endmodule

// bs_cell: one IEEE 1149.1 boundary-scan cell (the usual BC_1 type).
//
// A capture/shift flip-flop sits in the scan path: on Capture-DR it loads
// the parallel input, on Shift-DR it loads the scan input. An update
// flip-flop copies it on Update-DR. In normal mode the parallel output
// follows the parallel input, so the cell is transparent; with `mode` high
// the update flip-flop drives the parallel output instead. The capture and
// update strobes only take effect when `sel` is high, i.e. when the
// instruction selects the register this cell belongs to.
// All actions are on the rising TCK edge; trst_n clears both flip-flops.
// The cell is named in Figures 1 and 3 of the method; its insides are the
// standard's.
module bs_cell
  import jtag_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t ctl,
  input  logic     sel,
  input  logic     mode,
  input  logic     pi,   // parallel input (system side)
  output logic     po,   // parallel output
  input  logic     si,   // scan input (towards TDI)
  output logic     so    // scan output (towards TDO)
);

  logic cap_q, upd_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      cap_q <= 1'b0;
      upd_q <= 1'b0;
    end else if (sel) begin
      if (ctl.capture)    cap_q <= pi;
      else if (ctl.shift) cap_q <= si;
      if (ctl.update)     upd_q <= cap_q;
    end
  end

  assign po = mode ? upd_q : pi;
  assign so = cap_q;

endmodule

// instruction_register: IEEE 1149.1 instruction register.
//
// A shift stage of LEN bits captures the fixed pattern ...01 on Capture-IR,
// shifts LSB first from `si` towards `so` on Shift-IR, and is copied to the
// current instruction `instr` on Update-IR. Test-Logic-Reset (or trst_n)
// loads RESET_INSTR (BYPASS by default, as the standard allows when a device
// has no IDCODE). Actions on the rising TCK edge.
// Named in Figures 2 and 3; behaviour as in the standard.
module instruction_register
  import jtag_pkg::*;
#(
  parameter int unsigned     LEN         = IR_LEN,
  parameter logic [LEN-1:0]  RESET_INSTR = '1
) (
  input  logic           tck,
  input  logic           trst_n,
  input  logic           tap_reset,  // TAP in Test-Logic-Reset
  input  dr_ctrl_t       ctl,
  input  logic           si,
  output logic           so,
  output logic [LEN-1:0] instr
);

  logic [LEN-1:0] sr_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr_q  <= '0;
      instr <= RESET_INSTR;
    end else begin
      if (ctl.capture)    sr_q <= LEN'(2'b01);
      else if (ctl.shift) sr_q <= {si, sr_q[LEN-1:1]};
      if (tap_reset)       instr <= RESET_INSTR;
      else if (ctl.update) instr <= sr_q;
    end
  end

  assign so = sr_q[0];

endmodule

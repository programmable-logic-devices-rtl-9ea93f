// config_register: loads the IOB part of the configuration memory through
// the boundary-scan port (in-system configuration).
//
// The register holds one iob_cfg_t word per IOB (multiplexer selects and
// INIT values) plus one bit, utr_en, that says whether the loaded
// configuration is a test configuration containing the User Test Register.
// Bit layout of the shift stage, bit 0 next to TDO:
//   [5*N_IOB]            utr_en
//   [5*i+4 : 5*i]        configuration of IOB i
// On Capture-DR it reads back the current configuration, on Shift-DR it
// shifts one place towards TDO and on Update-DR the new configuration takes
// effect. Actions on the rising TCK edge while `sel` is high. trst_n clears
// it (all multiplexers on the direct path, INIT = 0, no test register).
// The method only says that the IOBs can be reconfigured through the BS
// interface; this register layout is this design's own.
module config_register
  import jtag_pkg::*;
#(
  parameter int unsigned N_IOB = 336
) (
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t ctl,
  input  logic     sel,
  input  logic     si,
  output logic     so,
  output logic     utr_en,
  output iob_cfg_t cfg [N_IOB]
);

  localparam int unsigned LEN = IOB_CFG_W * N_IOB + 1;

  logic [LEN-1:0] sr_q;
  logic [LEN-1:0] cfg_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr_q  <= '0;
      cfg_q <= '0;
    end else if (sel) begin
      if (ctl.capture)    sr_q <= cfg_q;
      else if (ctl.shift) sr_q <= {si, sr_q[LEN-1:1]};
      if (ctl.update)     cfg_q <= sr_q;
    end
  end

  always_comb begin
    utr_en = cfg_q[LEN-1];
    for (int i = 0; i < N_IOB; i++) cfg[i] = cfg_q[IOB_CFG_W*i +: IOB_CFG_W];
  end

  assign so = sr_q[0];

endmodule

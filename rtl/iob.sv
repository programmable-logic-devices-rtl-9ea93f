// iob: one Input/Output Block of the PLD together with its three
// boundary-scan cells and its output buffer (the structure of Figure 1).
//
// Seen from the core the IOB has seven inputs (Tristate, TEC, Output, OEC,
// IEC, CLK, SR) and two outputs (Input, Reg. Input).
//   * Tristate path: a flip-flop (D = Tristate, CE = TEC) and a 2-to-1
//     multiplexer that passes either the flip-flop or the raw signal.
//   * Output path: the same structure with D = Output, CE = OEC.
//   * Input path: no multiplexer; the pad value is offered to the core both
//     directly (Input) and through a flip-flop with CE = IEC (Reg. Input).
// The multiplexer selects and the three INIT values come from the
// configuration memory (`cfg`). CLK and SR are common to the three
// flip-flops. A flip-flop loads its INIT value on a rising CLK edge while SR
// is high, else loads D on a rising edge while its CE is high (SR wins over
// CE); configuring the IOB does not itself change the stored value. These
// flip-flop rules are this design's reading of the test vectors of the
// method (synchronous SR, INIT chosen by the configuration).
//
// Boundary scan: the scan path runs TDI -> input cell -> output cell ->
// tristate cell -> TDO as drawn in Figure 1. The output and tristate cells
// sit between the multiplexers and the buffer (so they observe the two
// paths); the input cell sits between the pad and the input path (so it can
// drive it). `mode_out` lets the output/tristate cells drive the buffer,
// `mode_in` lets the input cell drive the input path.
//
// Pad: the buffer drives pad_o with pad_oe = !tristate (a high Tristate
// signal leaves the pad undriven, this design's polarity choice); pad_i is
// the value present on the pad.
module iob
  import jtag_pkg::*;
(
  // core side
  input  iob_stim_t stim,
  input  iob_cfg_t  cfg,
  output logic      input_o,      // "Input"
  output logic      reg_input_o,  // "Reg. Input"
  // boundary scan
  input  logic      tck,
  input  logic      trst_n,
  input  dr_ctrl_t  ctl,
  input  logic      sel,          // BS register selected by the instruction
  input  logic      mode_out,
  input  logic      mode_in,
  input  logic      si,
  output logic      so,
  // pad
  output logic      pad_o,
  output logic      pad_oe,
  input  logic      pad_i
);

  logic clk;
  logic q_t, q_o, q_i;
  logic t_path, o_path;          // multiplexer outputs
  logic t_bs, o_bs, in_bs;       // outputs of the BS cells
  logic s_in2o, s_o2t;           // scan links between the cells

  assign clk = stim.clk;

  always_ff @(posedge clk) begin
    if (stim.sr)       q_t <= cfg.init_t;
    else if (stim.tec) q_t <= stim.tristate;
  end

  always_ff @(posedge clk) begin
    if (stim.sr)       q_o <= cfg.init_o;
    else if (stim.oec) q_o <= stim.out_d;
  end

  always_ff @(posedge clk) begin
    if (stim.sr)       q_i <= cfg.init_i;
    else if (stim.iec) q_i <= in_bs;
  end

  assign t_path = cfg.mux_t ? q_t : stim.tristate;
  assign o_path = cfg.mux_o ? q_o : stim.out_d;

  bs_cell u_cell_in (
    .tck, .trst_n, .ctl, .sel, .mode(mode_in),
    .pi(pad_i), .po(in_bs), .si(si), .so(s_in2o)
  );
  bs_cell u_cell_out (
    .tck, .trst_n, .ctl, .sel, .mode(mode_out),
    .pi(o_path), .po(o_bs), .si(s_in2o), .so(s_o2t)
  );
  bs_cell u_cell_tri (
    .tck, .trst_n, .ctl, .sel, .mode(mode_out),
    .pi(t_path), .po(t_bs), .si(s_o2t), .so(so)
  );

  assign input_o     = in_bs;
  assign reg_input_o = q_i;
  assign pad_o       = o_bs;
  assign pad_oe      = !t_bs;

endmodule

// user_test_register: the "BS-like" register that wraps the IOBs from the
// core side while the test configuration is loaded.
//
// Its length is N_IOB*2 + 7. Seven stimulus cells, nearest TDI, hold one
// value for each internal IOB input (Tristate, TEC, Output, OEC, IEC, CLK,
// SR); their update stage is broadcast to every IOB at once, since all IOBs
// receive the same test vector. Then come two capture-only cells per IOB,
// for its Input and Reg. Input outputs, so every IOB's response is observed
// on its own (fault location to one IOB). Bit layout of the shift stage,
// with bit 0 next to TDO:
//   [2*N_IOB+6 : 2*N_IOB]  stimulus (iob_stim_t, tristate in the MSB)
//   [2*i+1], [2*i]         Reg. Input and Input of IOB i
// On Capture-DR the capture cells load the IOB outputs and the stimulus
// cells reload their own update value; on Shift-DR the stage shifts one
// place towards TDO; on Update-DR the stimulus update stage is loaded.
// Actions on the rising TCK edge while `sel` is high; trst_n clears it.
// The cell count and the split into broadcast and per-IOB cells follow the
// method; the order of the cells in the chain is this design's choice.
module user_test_register
  import jtag_pkg::*;
#(
  parameter int unsigned N_IOB = 336
) (
  input  logic      tck,
  input  logic      trst_n,
  input  dr_ctrl_t  ctl,
  input  logic      sel,
  input  logic      si,
  output logic      so,
  output iob_stim_t stim,
  input  logic      input_i     [N_IOB],
  input  logic      reg_input_i [N_IOB]
);

  localparam int unsigned LEN = 2 * N_IOB + IOB_STIM_W;

  logic [LEN-1:0] sr_q;
  logic [LEN-1:0] cap;

  always_comb begin
    cap[LEN-1 -: IOB_STIM_W] = stim;
    for (int i = 0; i < N_IOB; i++) begin
      cap[2*i]   = input_i[i];
      cap[2*i+1] = reg_input_i[i];
    end
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr_q <= '0;
      stim <= '0;
    end else if (sel) begin
      if (ctl.capture)    sr_q <= cap;
      else if (ctl.shift) sr_q <= {si, sr_q[LEN-1:1]};
      if (ctl.update)     stim <= sr_q[LEN-1 -: IOB_STIM_W];
    end
  end

  assign so = sr_q[0];

endmodule

// jtag_pkg: types and constants shared by the boundary-scan (IEEE 1149.1)
// test infrastructure of the PLD and of the active connectors.
//
// It holds the sixteen TAP controller states, the control bundle that a TAP
// hands to every data register (capture / shift / update strobes), the
// instruction codes and the per-IOB configuration word.
//
// The TAP states follow IEEE 1149.1. The instruction register is 5 bits wide
// and the codes are those of the Xilinx Virtex family that the reference
// device (an XCV200) belongs to; they are this design's choice, since only the
// registers, not their opcodes, are part of the test method.
package jtag_pkg;

  typedef enum logic [3:0] {
    TLR        = 4'h0,  // Test-Logic-Reset
    RTI        = 4'h1,  // Run-Test/Idle
    SEL_DR     = 4'h2,
    CAPTURE_DR = 4'h3,
    SHIFT_DR   = 4'h4,
    EXIT1_DR   = 4'h5,
    PAUSE_DR   = 4'h6,
    EXIT2_DR   = 4'h7,
    UPDATE_DR  = 4'h8,
    SEL_IR     = 4'h9,
    CAPTURE_IR = 4'hA,
    SHIFT_IR   = 4'hB,
    EXIT1_IR   = 4'hC,
    PAUSE_IR   = 4'hD,
    EXIT2_IR   = 4'hE,
    UPDATE_IR  = 4'hF
  } tap_state_t;

  // Strobes for one data (or instruction) register. They are valid for the
  // TCK rising edge on which the TAP leaves the corresponding state.
  typedef struct packed {
    logic capture;
    logic shift;
    logic update;
  } dr_ctrl_t;

  localparam int unsigned IR_LEN = 5;
  typedef logic [IR_LEN-1:0] instr_t;

  localparam instr_t I_EXTEST = 5'b00000;
  localparam instr_t I_SAMPLE = 5'b00001;  // SAMPLE/PRELOAD
  localparam instr_t I_USER1  = 5'b00010;  // selects the User Test Register
  localparam instr_t I_CFG_IN = 5'b00101;  // selects the configuration register
  localparam instr_t I_INTEST = 5'b00111;
  localparam instr_t I_BYPASS = 5'b11111;

  // Configuration-memory bits of one IOB (Figure 1): the select lines of the
  // tristate-path and output-path bypass multiplexers (1 = registered) and
  // the INIT value of each of the three flip-flops.
  typedef struct packed {
    logic mux_t;
    logic mux_o;
    logic init_t;
    logic init_o;
    logic init_i;
  } iob_cfg_t;
  localparam int unsigned IOB_CFG_W = $bits(iob_cfg_t);

  // The seven internal inputs of an IOB (Figure 1), in the order the
  // stimulus cells of the User Test Register hold them.
  typedef struct packed {
    logic tristate;  // 1 = pad not driven
    logic tec;       // tristate-path clock enable
    logic out_d;     // "Output" signal from the core
    logic oec;       // output-path clock enable
    logic iec;       // input-path clock enable
    logic clk;       // IOB clock
    logic sr;        // set/reset line, loads the flip-flops with INIT
  } iob_stim_t;
  localparam int unsigned IOB_STIM_W = $bits(iob_stim_t);  // 7

endpackage

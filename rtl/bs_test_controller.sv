// bs_test_controller: a small boundary-scan master that runs the complete
// IOB structural test of a PLD on its own, with no external test equipment.
//
// It drives TCK/TMS/TDI, reads TDO and walks through the test procedure:
// for each of the three test configurations it loads the configuration
// register (CFG_IN, every IOB alike, test flag set), then for each test
// vector of the group it makes four scans:
//   step 2/3  INTEST + BS register: input-path D into every input cell
//   step 4/5  USER1 + User Test Register: the seven broadcast stimulus bits
//   step 6/7  INTEST + BS register again: tristate/output path values are
//             captured and compared with the expected output
//   step 8/9  USER1 again: Input and Reg. Input of every IOB compared
// Scan images are produced bit by bit from the vector table (no image
// memory), and responses are compared as they come out of TDO, so the
// controller needs only counters. NPOST devices that follow the PLD on the
// chain are held in BYPASS (all-ones instructions, one bit each).
//
// Timing: TCK runs at clk/2. TMS and the counters that select TDI change while TCK is low, TDO is
// sampled on the clk edge that raises TCK. A full run at the default size
// takes about 2 x 50,000 clk cycles. Interface: pulse `start`; `busy` is high
// during the run; `done` is then held high with `fail_count` (wrong
// responses), and the vector index and IOB of the first wrong response.
// The method only asks for "a simple BS controller" for vector application,
// response capture and configuration; this organisation is this design's.
module bs_test_controller
  import jtag_pkg::*;
  import iob_test_pkg::*;
#(
  parameter int unsigned N_IOB = 336,
  parameter int unsigned NPOST = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [15:0] fail_count,
  output logic [3:0]  first_fail_vec,
  output logic [15:0] first_fail_iob,
  // boundary-scan master port
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo
);

  localparam int unsigned CFG_LEN = IOB_CFG_W * N_IOB + 1;
  localparam int unsigned BS_LEN  = 3 * N_IOB;
  localparam int unsigned UTR_LEN = 2 * N_IOB + IOB_STIM_W;
  localparam int unsigned IRC_LEN = IR_LEN * (NPOST + 1);

  typedef enum logic [2:0] {S_IDLE, S_RESET, S_PRE, S_SHIFT, S_POST, S_DONE} state_t;

  state_t      st;
  logic [3:0]  step;     // 0..9, see header
  logic [3:0]  vec;      // index into VECTORS
  logic [2:0]  sub;      // tick counter inside RESET / PRE / POST
  logic [15:0] k;        // bit of the current scan
  logic [2:0]  pos;      // position inside one IOB's group of bits
  logic [15:0] idx;      // IOB counter along the PLD register

  // ---- description of the current scan ----
  iob_vec_t  v;
  logic      is_ir, checking;
  instr_t    instr;
  logic [15:0] len;
  logic [2:0]  modulus;
  iob_stim_t   stim;

  always_comb begin
    v        = VECTORS[vec];
    is_ir    = !step[0];
    instr    = (step == 4'd0) ? I_CFG_IN :
               (step == 4'd2 || step == 4'd6) ? I_INTEST : I_USER1;
    unique case (step)
      4'd1:          begin len = 16'(NPOST + CFG_LEN); modulus = 3'd5; end
      4'd3, 4'd7:    begin len = 16'(NPOST + BS_LEN);  modulus = 3'd3; end
      4'd5, 4'd9:    begin len = 16'(NPOST + UTR_LEN); modulus = 3'd2; end
      default:       begin len = 16'(IRC_LEN);         modulus = 3'd1; end
    endcase
    checking = (step == 4'd7 || step == 4'd9) && v.check;
    stim.tristate = v.d;
    stim.tec      = v.ce;
    stim.out_d    = v.d;
    stim.oec      = v.ce;
    stim.iec      = v.ce;
    stim.clk      = v.clk;
    stim.sr       = v.sr;
  end

  // ---- scan-in bit of the current scan position ----
  logic in_pld;
  logic scan_bit;
  logic [15:0] stim_bit;

  always_comb begin
    in_pld   = (k >= 16'(NPOST));
    stim_bit = k - 16'(NPOST) - 16'(2 * N_IOB);
    scan_bit = 1'b0;
    if (is_ir) begin
      scan_bit = (k < 16'(IR_LEN * NPOST)) ? 1'b1
                                          : instr[3'(k - 16'(IR_LEN * NPOST))];
    end else if (in_pld) begin
      unique case (step)
        4'd1:
          if (idx == 16'(N_IOB)) scan_bit = 1'b1;                 // test flag
          else if (pos >= 3'd3)  scan_bit = GROUP_MUX[v.grp];    // mux_o, mux_t
          else                   scan_bit = GROUP_INIT[v.grp];   // init_i/o/t
        4'd3, 4'd7:
          scan_bit = (pos == 3'd0) ? 1'b1 :                      // tristate cell
                     (pos == 3'd1) ? 1'b0 : v.d;                 // output / input
        default:
          scan_bit = (idx < 16'(N_IOB)) ? 1'b0 : stim[3'(stim_bit)];
      endcase
    end
  end

  // ---- expected TDO value for the current bit, if it is compared ----
  logic cmp_en, cmp_val;
  logic [15:0] cmp_iob;

  always_comb begin
    cmp_en  = 1'b0;
    cmp_val = 1'b0;
    cmp_iob = '0;
    if (st == S_SHIFT && checking && in_pld) begin
      if (step == 4'd7) begin
        cmp_en  = (pos != 3'd2);
        cmp_val = v.expect_q;
        cmp_iob = 16'(N_IOB - 1) - idx;
      end else if (idx < 16'(N_IOB)) begin
        cmp_en  = (pos == 3'd0) || (v.grp != 2'd0);
        cmp_val = (pos == 3'd0) ? v.d : v.expect_q;
        cmp_iob = idx;
      end
    end
  end

  // ---- sequencer ----
  logic last_vec, new_group;
  assign last_vec  = (vec == 4'(N_VEC - 1));
  assign new_group = !last_vec && (VECTORS[vec + 4'd1].grp != v.grp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; tck <= 1'b0; tms <= 1'b1;
      step <= '0; vec <= '0; sub <= '0; k <= '0; pos <= '0; idx <= '0;
      done <= 1'b0; fail_count <= '0; first_fail_vec <= '0; first_fail_iob <= '0;
    end else if (st == S_IDLE || st == S_DONE) begin
      tck <= 1'b0;
      if (start) begin
        st <= S_RESET; sub <= '0; step <= '0; vec <= '0;
        done <= 1'b0; fail_count <= '0; first_fail_vec <= '0; first_fail_iob <= '0;
        tms <= 1'b1;
      end
    end else if (!tck) begin
      // rising TCK: the TAP acts on tms/tdi; compare what TDO shows now
      tck <= 1'b1;
      if (cmp_en && (tdo != cmp_val)) begin
        if (fail_count == '0) begin
          first_fail_vec <= vec;
          first_fail_iob <= cmp_iob;
        end
        if (fail_count != '1) fail_count <= fail_count + 16'd1;
      end
    end else begin
      // falling TCK: move to the next tick and present its tms/tdi
      tck <= 1'b0;
      unique case (st)
        S_RESET: begin
          sub <= sub + 3'd1;
          tms <= (sub < 3'd4);      // five ticks high, then one low
          if (sub == 3'd5) begin
            st  <= S_PRE;
            sub <= '0;
            tms <= 1'b1;            // Select-DR
          end
        end
        S_PRE: begin
          // DR: 1,0,0   IR: 1,1,0,0   (ending in Shift)
          sub <= sub + 3'd1;
          tms <= is_ir && (sub == 3'd0);
          if ((is_ir && sub == 3'd3) || (!is_ir && sub == 3'd2)) begin
            st  <= S_SHIFT;
            k   <= '0; pos <= '0; idx <= '0;
            tms <= (len == 16'd1);
          end
        end
        S_SHIFT: begin
          if (k == len - 16'd1) begin
            st  <= S_POST;
            sub <= '0;
            tms <= 1'b1;            // Exit1 -> Update
          end else begin
            k <= k + 16'd1;
            if (in_pld) begin
              if (pos == modulus - 3'd1) begin
                pos <= '0;
                idx <= idx + 16'd1;
              end else pos <= pos + 3'd1;
            end
            tms <= (k + 16'd1 == len - 16'd1);
          end
        end
        S_POST: begin
          if (sub == 3'd0) begin
            sub <= 3'd1;
            tms <= 1'b0;            // Update -> Run-Test/Idle
          end else begin
            // scan complete: choose the next one
            tms <= 1'b1;
            sub <= '0;
            st  <= S_PRE;
            if (step == 4'd9) begin
              if (last_vec) begin
                st   <= S_DONE;
                done <= 1'b1;
              end else begin
                vec  <= vec + 4'd1;
                step <= new_group ? 4'd0 : 4'd2;
              end
            end else step <= step + 4'd1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // TDI follows the counters, which only move while TCK is low
  assign tdi  = (st == S_SHIFT) && scan_bit;
  assign busy = (st != S_IDLE) && (st != S_DONE);

endmodule

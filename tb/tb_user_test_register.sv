// tb_user_test_register: with four IOBs (2*4+7 = 15 cells), checks the
// register length (a marker bit needs exactly 15 shifts), the broadcast
// stimulus after update, and that capture loads every IOB's Input and
// Reg. Input into its own cell.
module tb_user_test_register;
  import jtag_pkg::*;

  localparam int N = 4;
  localparam int L = 2 * N + 7;

  logic tck = 1'b0, trst_n = 1'b1;
  dr_ctrl_t ctl;
  logic sel, si, so;
  iob_stim_t stim;
  logic input_i [N], reg_input_i [N];
  int checks = 0, failures = 0;

  user_test_register #(.N_IOB(N)) dut (.tck, .trst_n, .ctl, .sel, .si, .so, .stim,
                                      .input_i, .reg_input_i);

  task automatic tclk();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
  endtask

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] v, rb;
    int first_one;
    ctl = '0; sel = 1; si = 0;
    foreach (input_i[i]) begin input_i[i] = 0; reg_input_i[i] = 0; end
    #1 trst_n = 0; #1 trst_n = 1;
    // length: flush with zeros, shift a single 1 and count
    ctl.shift = 1;
    si = 1; tclk(); si = 0;
    first_one = -1;
    for (int k = 1; k <= 3 * L; k++) begin
      if (so && first_one < 0) first_one = k;
      tclk();
    end
    chk(32'(first_one), 32'(L), "marker reaches TDO after exactly L shifts");
    for (int n = 0; n < 20; n++) begin
      foreach (input_i[i]) begin
        input_i[i] = $urandom_range(0, 1);
        reg_input_i[i] = $urandom_range(0, 1);
      end
      for (int k = 0; k < L; k++) v[k] = $urandom_range(0, 1);
      ctl = '0; ctl.capture = 1; tclk();
      ctl = '0; ctl.shift = 1;
      for (int k = 0; k < L; k++) begin
        rb[k] = so;
        si = v[k];
        tclk();
      end
      for (int i = 0; i < N; i++) begin
        chk(32'(rb[2*i]), 32'(input_i[i]), "Input captured");
        chk(32'(rb[2*i+1]), 32'(reg_input_i[i]), "Reg. Input captured");
      end
      chk(32'(rb[L-1 -: 7]), 32'(stim), "stimulus cells read back");
      ctl = '0; ctl.update = 1; tclk(); ctl = '0;
      chk(32'(stim), 32'(v[L-1 -: 7]), "stimulus updated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_instruction_register: shifts random instructions LSB first, checks the
// captured 01 pattern coming out, the update to `instr`, that instr holds
// while shifting, and the Test-Logic-Reset value (BYPASS).
module tb_instruction_register;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1, tap_reset, si, so;
  dr_ctrl_t ctl;
  instr_t instr;
  int checks = 0, failures = 0;

  instruction_register dut (.tck, .trst_n, .tap_reset, .ctl, .si, .so, .instr);

  task automatic clk1();
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
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t v, outv, prev_instr;
    ctl = '0; tap_reset = 0; si = 0;
    #1 trst_n = 0; #1 trst_n = 1;
    chk(32'(instr), 32'(I_BYPASS), "reset value");
    for (int n = 0; n < 40; n++) begin
      v = instr_t'($urandom());
      prev_instr = instr;
      ctl = '0; ctl.capture = 1; clk1();
      ctl = '0; ctl.shift = 1;
      for (int k = 0; k < IR_LEN; k++) begin
        si = v[k];
        outv[k] = so;
        clk1();
      end
      chk(32'(outv), 32'(IR_LEN'(2'b01)), "captured pattern");
      chk(32'(instr), 32'(prev_instr), "holds while shifting");
      ctl = '0; ctl.update = 1; clk1();
      ctl = '0;
      chk(32'(instr), 32'(v), "updated instruction");
    end
    tap_reset = 1; clk1(); tap_reset = 0;
    chk(32'(instr), 32'(I_BYPASS), "Test-Logic-Reset value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

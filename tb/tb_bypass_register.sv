// tb_bypass_register: checks that capture loads 0, that a shifted stream
// comes out delayed by exactly one TCK, and that deselection freezes it.
module tb_bypass_register;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1;
  dr_ctrl_t ctl;
  logic sel, si, so;
  int checks = 0, failures = 0;

  bypass_register dut (.tck, .trst_n, .ctl, .sel, .si, .so);

  task automatic chk(input logic exp, input string what);
    checks++;
    if (so !== exp) begin
      failures++;
      $display("FAIL %s: so=%b exp=%b", what, so, exp);
    end
  endtask

  task automatic clk1();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    ctl = '0; sel = 1; si = 0;
    #1 trst_n = 0; #1 trst_n = 1;
    // load a 1, then capture must clear it
    ctl.shift = 1; si = 1; clk1(); chk(1'b1, "shift 1");
    ctl = '0; ctl.capture = 1; clk1(); chk(1'b0, "capture 0");
    // one-cycle delay on a random stream
    ctl = '0; ctl.shift = 1;
    prev = so;
    for (int i = 0; i < 200; i++) begin
      si = 1'($urandom_range(0, 1));
      chk(prev, "delay");
      prev = si;
      clk1();
    end
    // capture clears whatever was shifted in, every time
    for (int i = 0; i < 20; i++) begin
      ctl = '0; ctl.shift = 1; si = 1'(i % 3 != 0); clk1(); chk(si, "preload");
      ctl = '0; ctl.capture = 1; clk1(); chk(1'b0, "capture 0 again");
    end
    ctl = '0; ctl.shift = 1;
    // not selected: holds
    sel = 0; prev = so; si = ~so;
    repeat (3) clk1();
    chk(prev, "hold when deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

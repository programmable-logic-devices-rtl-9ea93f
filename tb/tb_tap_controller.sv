// tb_tap_controller: random TMS walk compared with a transition table of
// the IEEE 1149.1 state diagram written out in the testbench, plus the
// decoded strobes and the five-TMS-high reset from every state.
module tb_tap_controller;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1, tms = 1'b1;
  tap_state_t state;
  dr_ctrl_t dr, ir;
  logic reset, shifting;
  int checks = 0, failures = 0;

  tap_controller dut (.tck, .trst_n, .tms, .state, .dr, .ir, .reset, .shifting);

  // next state for TMS=0 and TMS=1, indexed by the state encoding
  int nxt0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nxt1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};

  task automatic clk1();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s state=%0d", what, state);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    bit [15:0] seen;
    #1 trst_n = 0; #1 trst_n = 1;
    m = 0;
    seen = '0;
    chk(state == TLR, "async reset");
    for (int n = 0; n < 3000; n++) begin
      tms = ($urandom_range(0, 2) == 0);
      clk1();
      m = tms ? nxt1[m] : nxt0[m];
      seen[m] = 1'b1;
      chk(int'(state) == m, "state");
      chk(dr.capture == (m == 3) && dr.shift == (m == 4) && dr.update == (m == 8), "dr strobes");
      chk(ir.capture == (m == 10) && ir.shift == (m == 11) && ir.update == (m == 15), "ir strobes");
      chk(reset == (m == 0) && shifting == (m == 4 || m == 11), "reset/shifting");
    end
    chk(seen == 16'hFFFF, "all states visited");
    for (int s = 0; s < 16; s++) begin
      // walk to an arbitrary state with random TMS, then five TMS=1
      repeat ($urandom_range(1, 9)) begin
        tms = $urandom_range(0, 1);
        clk1();
      end
      tms = 1;
      repeat (5) clk1();
      chk(state == TLR, "five TMS high reach Test-Logic-Reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

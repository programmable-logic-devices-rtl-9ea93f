// tb_bs_cell: random stimulus against a reference model of a BC_1 cell.
// Each cycle drives random capture/shift/update strobes, select, mode and
// data, then compares the scan output and parallel output with the model.
module tb_bs_cell;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1;
  dr_ctrl_t ctl;
  logic sel, mode, pi, po, si, so;
  int checks = 0, failures = 0;

  bs_cell dut (.tck, .trst_n, .ctl, .sel, .mode, .pi, .po, .si, .so);

  logic m_cap = 1'b0, m_upd = 1'b0;

  initial begin
    repeat (5000) #5 tck = ~tck;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl = '0; sel = 0; mode = 0; pi = 0; si = 0;
    #1 trst_n = 1'b0; #2 trst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge tck);
      ctl  = dr_ctrl_t'($urandom_range(0, 7));
      if (ctl.capture && ctl.shift) ctl.shift = 1'b0;
      sel  = ($urandom_range(0, 3) != 0);
      mode = $urandom_range(0, 1);
      pi   = $urandom_range(0, 1);
      si   = $urandom_range(0, 1);
      #1;
      checks++;
      if (po !== (mode ? m_upd : pi)) begin
        failures++;
        $display("po mismatch at %0d", n);
      end
      @(posedge tck);
      // model
      if (sel) begin
        if (ctl.update) m_upd = m_cap;
        if (ctl.capture)    m_cap = pi;
        else if (ctl.shift) m_cap = si;
      end
      #1;
      checks++;
      if (so !== m_cap) begin
        failures++;
        $display("so mismatch at %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

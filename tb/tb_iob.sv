// tb_iob: one IOB with its three boundary-scan cells.
// Part 1 applies the test vectors of the three configurations directly to
// the core-side inputs, with the BS cells transparent, and checks the
// tristate path (!pad_oe), the output path (pad_o), Input and Reg. Input
// against the expected outputs of the vector table.
// Part 2 exercises the BS cells: capture of the two path outputs and the
// pad, shift-out order (tristate cell first), update and the two modes.
// Part 3 drives random core-side stimulus and random configurations and
// compares all outputs with a reference model of the three flip-flops kept
// here (rising CLK; SR loads INIT before CE loads D; a configuration change
// keeps the stored values).
module tb_iob;
  import jtag_pkg::*;
  import iob_test_pkg::*;

  logic tck = 1'b0, trst_n = 1'b1;
  iob_stim_t stim;
  iob_cfg_t cfg;
  logic input_o, reg_input_o;
  dr_ctrl_t ctl;
  logic sel, mode_out, mode_in, si, so, pad_o, pad_oe, pad_i;
  int checks = 0, failures = 0;

  iob dut (.stim, .cfg, .input_o, .reg_input_o, .tck, .trst_n, .ctl, .sel,
           .mode_out, .mode_in, .si, .so, .pad_o, .pad_oe, .pad_i);

  task automatic chk(input logic got, input logic exp, input string what, input int n);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (vector %0d): got %b exp %b", what, n, got, exp);
    end
  endtask

  task automatic tclk();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] got3, pat;
    logic m_t, m_o, m_i;
    stim = '0; cfg = '0; ctl = '0; sel = 0; mode_out = 0; mode_in = 0; si = 0; pad_i = 0;
    #1 trst_n = 0; #1 trst_n = 1;
    // ---- part 1: vector table on all three paths at once ----
    for (int n = 0; n < N_VEC; n++) begin
      iob_vec_t v;
      v = VECTORS[n];
      cfg.mux_t  = GROUP_MUX[v.grp];
      cfg.mux_o  = GROUP_MUX[v.grp];
      cfg.init_t = GROUP_INIT[v.grp];
      cfg.init_o = GROUP_INIT[v.grp];
      cfg.init_i = GROUP_INIT[v.grp];
      #5;
      stim.tristate = v.d; stim.out_d = v.d; pad_i = v.d;
      stim.tec = v.ce; stim.oec = v.ce; stim.iec = v.ce; stim.sr = v.sr;
      #5;
      stim.clk = v.clk;
      #5;
      if (v.check) begin
        chk(!pad_oe, v.expect_q, "tristate path", n);
        chk(pad_o, v.expect_q, "output path", n);
        chk(input_o, v.d, "Input", n);
        if (v.grp != 0) chk(reg_input_o, v.expect_q, "Reg. Input", n);
      end
    end
    // ---- part 2: boundary-scan cells ----
    sel = 1;
    for (int n = 0; n < 16; n++) begin
      // set the two paths to known values through the direct multiplexer path
      cfg = '0;
      stim.tristate = 1'($urandom_range(0, 1));
      stim.out_d    = 1'($urandom_range(0, 1));
      pad_i         = 1'($urandom_range(0, 1));
      #1;
      ctl = '0; ctl.capture = 1; tclk();
      ctl = '0; ctl.shift = 1;
      pat = 3'($urandom());
      for (int k = 0; k < 3; k++) begin
        got3[k] = so;
        si = pat[k];
        tclk();
      end
      chk(got3[0], stim.tristate, "tristate cell capture", n);
      chk(got3[1], stim.out_d, "output cell capture", n);
      chk(got3[2], pad_i, "input cell capture", n);
      ctl = '0; ctl.update = 1; tclk(); ctl = '0;
      // the first bit shifted in ends in the cell next to TDO: pat[0] tristate,
      // pat[1] output, pat[2] input
      mode_out = 1; mode_in = 1; #1;
      chk(input_o, pat[2], "input cell drives Input", n);
      chk(pad_o, pat[1], "output cell drives pad", n);
      chk(pad_oe, !pat[0], "tristate cell drives enable", n);
      mode_out = 0; mode_in = 0; #1;
      chk(input_o, pad_i, "input cell transparent", n);
      chk(pad_o, stim.out_d, "output cell transparent", n);
    end
    // ---- part 3: random stimulus against a reference model ----
    sel = 0; mode_out = 0; mode_in = 0; ctl = '0;
    stim = '0; #1;
    m_t = !pad_oe; m_o = pad_o; m_i = reg_input_o;   // whatever part 2 left
    for (int n = 0; n < 400; n++) begin
      logic prev_clk;
      iob_stim_t s;
      if (n % 50 == 0) cfg = 5'($urandom());
      prev_clk = stim.clk;
      s = 7'($urandom());
      stim.tristate = s.tristate; stim.out_d = s.out_d; stim.tec = s.tec;
      stim.oec = s.oec; stim.iec = s.iec; stim.sr = s.sr;
      pad_i = 1'($urandom_range(0, 1));
      #2;
      stim.clk = s.clk;
      if (s.clk && !prev_clk) begin
        m_t = s.sr ? cfg.init_t : (s.tec ? s.tristate : m_t);
        m_o = s.sr ? cfg.init_o : (s.oec ? s.out_d : m_o);
        m_i = s.sr ? cfg.init_i : (s.iec ? pad_i : m_i);
      end
      #2;
      chk(!pad_oe, cfg.mux_t ? m_t : stim.tristate, "random: tristate path", n);
      chk(pad_o, cfg.mux_o ? m_o : stim.out_d, "random: output path", n);
      chk(input_o, pad_i, "random: Input", n);
      chk(reg_input_o, m_i, "random: Reg. Input", n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

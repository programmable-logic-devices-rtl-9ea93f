// tb_config_register: with four IOBs, shifts random configurations in,
// checks that outputs change only on update, that each IOB's word and the
// test flag land where the layout says, and that capture reads back the
// active configuration.
module tb_config_register;
  import jtag_pkg::*;

  localparam int N = 4;
  localparam int L = IOB_CFG_W * N + 1;

  logic tck = 1'b0, trst_n = 1'b1;
  dr_ctrl_t ctl;
  logic sel, si, so, utr_en;
  iob_cfg_t cfg [N];
  int checks = 0, failures = 0;

  config_register #(.N_IOB(N)) dut (.tck, .trst_n, .ctl, .sel, .si, .so, .utr_en, .cfg);

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
    logic [L-1:0] v, prev, rb;
    ctl = '0; sel = 1; si = 0;
    #1 trst_n = 0; #1 trst_n = 1;
    prev = '0;
    chk(32'(utr_en), 0, "reset flag");
    for (int n = 0; n < 20; n++) begin
      for (int k = 0; k < L; k++) v[k] = $urandom_range(0, 1);
      ctl = '0; ctl.capture = 1; tclk();
      ctl = '0; ctl.shift = 1;
      for (int k = 0; k < L; k++) begin
        rb[k] = so;
        si = v[k];
        tclk();
      end
      chk(32'(rb[15:0]), 32'(prev[15:0]), "read back low");
      chk(32'(rb[L-1]), 32'(prev[L-1]), "read back flag");
      chk(32'(cfg[0]), 32'(prev[4:0]), "no change before update");
      ctl = '0; ctl.update = 1; tclk(); ctl = '0;
      chk(32'(utr_en), 32'(v[L-1]), "test flag");
      for (int i = 0; i < N; i++) begin
        chk(32'(cfg[i].mux_t), 32'(v[5*i+4]), "mux_t");
        chk(32'(cfg[i].mux_o), 32'(v[5*i+3]), "mux_o");
        chk(32'(cfg[i].init_t), 32'(v[5*i+2]), "init_t");
        chk(32'(cfg[i].init_o), 32'(v[5*i+1]), "init_o");
        chk(32'(cfg[i].init_i), 32'(v[5*i]), "init_i");
      end
      prev = v;
    end
    // deselected: update does nothing
    sel = 0; ctl.update = 1; tclk(); ctl = '0;
    chk(32'(cfg[N-1]), 32'(prev[5*N-1 -: 5]), "hold when deselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

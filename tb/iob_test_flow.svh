// iob_test_flow.svh: scan-level procedure of the IOB structural test,
// shared by the PLD and board testbenches. Included inside a testbench
// module after jtag_tasks.svh; it expects localparams N_IOB (IOBs of the
// PLD) and NPOST (devices after the PLD on the chain, all kept in BYPASS),
// and ints checks / failures.
//
// Per test vector, four scans are made:
//   INTEST  shift the input-path D into every input cell (update applies it)
//   USER1   shift the seven broadcast stimulus bits (update applies them;
//           a 0->1 CLK bit is the clock edge)
//   INTEST  capture the tristate- and output-path values of every IOB
//   USER1   capture Input and Reg. Input of every IOB (same stimulus again,
//           so nothing changes)
// and every IOB's four responses are compared with the vector's expected
// output.

int n_vec_applied = 0, n_cfg_loaded = 0, n_bad_iob_resp = 0;

// IR scan: the PLD gets v, every later device gets BYPASS.
task automatic ir_pld(input jtag_pkg::instr_t v);
  bit din[], dout[];
  din = new[jtag_pkg::IR_LEN * (NPOST + 1)];
  foreach (din[k]) din[k] = 1'b1;
  for (int k = 0; k < jtag_pkg::IR_LEN; k++) din[jtag_pkg::IR_LEN * NPOST + k] = v[k];
  scan(1'b1, din, dout);
endtask

// DR scan of the PLD's selected register; element k is register bit k.
task automatic dr_pld(input bit data[], output bit res[]);
  bit din[], dout[];
  din = new[data.size() + NPOST];
  foreach (din[k]) din[k] = (k < NPOST) ? 1'b0 : data[k - NPOST];
  scan(1'b0, din, dout);
  res = new[data.size()];
  foreach (res[k]) res[k] = dout[k + NPOST];
endtask

// Load the same IOB configuration into every IOB.
task automatic configure_all(input logic mux, input logic init, input logic utr);
  bit d[], r[];
  d = new[5 * N_IOB + 1];
  for (int i = 0; i < N_IOB; i++) begin
    d[5*i+4] = mux;   // mux_t
    d[5*i+3] = mux;   // mux_o
    d[5*i+2] = init;  // init_t
    d[5*i+1] = init;  // init_o
    d[5*i]   = init;  // init_i
  end
  d[5*N_IOB] = utr;
  ir_pld(jtag_pkg::I_CFG_IN);
  dr_pld(d, r);
  n_cfg_loaded++;
endtask

// BS register image: input cells = din_v, output cells = 0, tristate
// cells = 1 (pads not driven). IOB i's cells are bits 3*(N-1-i)+{2,1,0}.
function automatic void bs_image(input logic din_v, ref bit d[]);
  d = new[3 * N_IOB];
  for (int i = 0; i < N_IOB; i++) begin
    d[3*(N_IOB-1-i)+2] = din_v;
    d[3*(N_IOB-1-i)+1] = 1'b0;
    d[3*(N_IOB-1-i)]   = 1'b1;
  end
endfunction

function automatic void utr_image(input iob_test_pkg::iob_vec_t v, ref bit d[]);
  jtag_pkg::iob_stim_t s;
  s.tristate = v.d; s.out_d = v.d; s.tec = v.ce; s.oec = v.ce; s.iec = v.ce;
  s.clk = v.clk; s.sr = v.sr;
  d = new[2 * N_IOB + 7];
  foreach (d[k]) d[k] = 1'b0;
  for (int b = 0; b < 7; b++) d[2*N_IOB + b] = s[b];
endfunction

// Apply one vector and check every IOB; returns the number of mismatches.
task automatic apply_vector(input iob_test_pkg::iob_vec_t v, output int bad);
  bit bsd[], utd[], bsr[], utr_r[];
  bs_image(v.d, bsd);
  utr_image(v, utd);
  ir_pld(jtag_pkg::I_INTEST);
  dr_pld(bsd, bsr);
  ir_pld(jtag_pkg::I_USER1);
  dr_pld(utd, utr_r);
  ir_pld(jtag_pkg::I_INTEST);
  dr_pld(bsd, bsr);
  ir_pld(jtag_pkg::I_USER1);
  dr_pld(utd, utr_r);
  n_vec_applied++;
  bad = 0;
  if (v.check) begin
    for (int i = 0; i < N_IOB; i++) begin
      bit t_resp, o_resp, in_resp, rin_resp;
      t_resp   = bsr[3*(N_IOB-1-i)];
      o_resp   = bsr[3*(N_IOB-1-i)+1];
      in_resp  = utr_r[2*i];
      rin_resp = utr_r[2*i+1];
      checks += 3;
      if (t_resp != v.expect_q) bad++;
      if (o_resp != v.expect_q) bad++;
      if (in_resp != v.d) bad++;
      if (v.grp != 0) begin
        checks++;
        if (rin_resp != v.expect_q) bad++;
      end
    end
  end
  failures += bad;
  n_bad_iob_resp += bad;
endtask

// The whole structural test: three configurations, all vectors.
task automatic run_iob_test();
  int bad;
  logic [1:0] grp;
  grp = 2'd3;
  for (int n = 0; n < iob_test_pkg::N_VEC; n++) begin
    iob_test_pkg::iob_vec_t v = iob_test_pkg::VECTORS[n];
    if (v.grp != grp) begin
      grp = v.grp;
      configure_all(iob_test_pkg::GROUP_MUX[grp], iob_test_pkg::GROUP_INIT[grp], 1'b1);
    end
    apply_vector(v, bad);
    if (bad != 0) $display("FAIL: vector %0d (table row %0d): %0d wrong responses", n, v.table_row, bad);
  end
endtask

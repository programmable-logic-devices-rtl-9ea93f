// interconnect_flow.svh: board interconnect test through the whole
// boundary-scan chain (PLD first, then N_CONN active connectors), shared by
// the board-level testbenches. Expects localparams N_IOB, N_BONDED, N_CONN,
// PPC (pins per connector) and CODE_W, and the scan task of jtag_tasks.svh.
// All devices are put in EXTEST; every bonded PLD pad drives the code
// pin+1 (CODE_W bits, one bit per pattern, then the complement), unbonded
// pads stay undriven; each connector cell and each PLD input cell captures
// what its line carries. A pin is flagged when the code it returns at the
// connector differs from the one it sent.

// chain position of a connector cell in a full-chain DR scan
function automatic int conn_pos(input int p);
  int k = p / PPC, c = p % PPC;
  return (N_CONN - 1 - k) * PPC + (PPC - 1 - c);
endfunction

// One interconnect test: returns the set of pins whose received code
// differs from the code sent, and how many the PLD's own input cells saw.
task automatic interconnect_test(output bit bad [N_BONDED], output bit bad_pld [N_BONDED],
                                output int n_bad, output int n_bad_pld);
  bit din[], dout[];
  logic [CODE_W-1:0] rx [N_BONDED], rxn [N_BONDED], rx_pld [N_BONDED];
  int base = N_CONN * PPC;
  din = new[IR_LEN * (N_CONN + 1)];
  foreach (din[k]) din[k] = 1'b0;                      // EXTEST everywhere
  scan(1'b1, din, dout);
  for (int pat = 0; pat < 2 * CODE_W; pat++) begin
    int b = pat % CODE_W;
    bit inv = (pat >= CODE_W);
    din = new[3 * N_IOB + base];
    foreach (din[k]) din[k] = 1'b0;
    for (int i = 0; i < N_IOB; i++) begin
      logic [CODE_W-1:0] code = CODE_W'(i + 1);
      din[base + 3*(N_IOB-1-i)]   = (i >= N_BONDED);     // bonded pads drive
      din[base + 3*(N_IOB-1-i)+1] = code[b] ^ inv;
    end
    scan(1'b0, din, dout);   // apply
    scan(1'b0, din, dout);   // capture
    for (int p = 0; p < N_BONDED; p++) begin
      if (inv) rxn[p][b] = dout[conn_pos(p)] ^ 1'b1;
      else begin
        rx[p][b]     = dout[conn_pos(p)];
        rx_pld[p][b] = dout[base + 3*(N_IOB-1-p)+2];
      end
    end
  end
  n_bad = 0;
  n_bad_pld = 0;
  for (int p = 0; p < N_BONDED; p++) begin
    // a good pin returns its code in the true and in the complement pass
    bad[p] = (rx[p] != CODE_W'(p + 1)) || (rxn[p] != CODE_W'(p + 1));
    if (bad[p]) n_bad++;
    bad_pld[p] = (rx_pld[p] != CODE_W'(p + 1));
    if (bad_pld[p]) n_bad_pld++;
  end
endtask


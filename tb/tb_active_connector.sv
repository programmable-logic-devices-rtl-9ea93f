// tb_active_connector: an eight-pin active connector driven through its
// TAP. Checks transparency in normal operation, the instruction-register
// capture pattern, BYPASS (one-bit delay), SAMPLE (board lines captured)
// and EXTEST (mating side driven from the cells). Cell 0 is next to TDI, so
// the first bit scanned in or out belongs to the last cell.
module tb_active_connector;
  import jtag_pkg::*;

  localparam int N = 8;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1, tdo;
  logic board_i [N], ext_o [N];
  int checks = 0, failures = 0;

  active_connector #(.N_PINS(N)) dut (.tck, .tms, .tdi, .trst_n, .tdo, .board_i, .ext_o);

  `include "jtag_tasks.svh"

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  task automatic load_ir(input instr_t v, output bit cap[]);
    bit d[] = new[IR_LEN];
    for (int k = 0; k < IR_LEN; k++) d[k] = v[k];
    scan(1'b1, d, cap);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit cap[], din[], dout[];
    foreach (board_i[i]) board_i[i] = $urandom_range(0, 1);
    #1 trst_n = 0; #1 trst_n = 1;
    tap_reset();
    // normal operation: transparent
    #1;
    foreach (board_i[i]) chk(ext_o[i], board_i[i], "transparent after reset");
    // BYPASS after reset: one-bit register
    din = new[20];
    foreach (din[k]) din[k] = $urandom_range(0, 1);
    scan(1'b0, din, dout);
    chk(dout[0], 1'b0, "bypass captures 0");
    for (int k = 1; k < 20; k++) chk(dout[k], din[k-1], "bypass delay");
    // SAMPLE: capture the board lines
    load_ir(I_SAMPLE, cap);
    chk(cap[0], 1'b1, "IR capture bit 0");
    chk(cap[1], 1'b0, "IR capture bit 1");
    din = new[N];
    foreach (din[k]) din[k] = $urandom_range(0, 1);
    scan(1'b0, din, dout);
    for (int k = 0; k < N; k++) chk(dout[k], board_i[N-1-k], "SAMPLE captures board line");
    foreach (board_i[i]) chk(ext_o[i], board_i[i], "SAMPLE stays transparent");
    // EXTEST: drive the mating side from the cells (preloaded by SAMPLE)
    load_ir(I_EXTEST, cap);
    #1;
    for (int k = 0; k < N; k++) chk(ext_o[N-1-k], din[k], "preloaded value driven in EXTEST");
    for (int n = 0; n < 8; n++) begin
      foreach (board_i[i]) board_i[i] = $urandom_range(0, 1);
      foreach (din[k]) din[k] = $urandom_range(0, 1);
      #1;
      scan(1'b0, din, dout);
      for (int k = 0; k < N; k++) chk(dout[k], board_i[N-1-k], "EXTEST captures board line");
      for (int k = 0; k < N; k++) chk(ext_o[N-1-k], din[k], "EXTEST drives mating side");
    end
    // back to BYPASS through Test-Logic-Reset
    tap_reset();
    #1;
    foreach (board_i[i]) chk(ext_o[i], board_i[i], "transparent again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

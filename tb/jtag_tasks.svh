// jtag_tasks.svh: TAP driving tasks shared by the scan-level testbenches.
// Included inside a testbench module that declares logic tck, tms, tdi,
// tdo. One tick is a 10-time-unit TCK period; TDO is sampled just before
// the rising edge. In scan_ir/scan_dr, element 0 of the data is shifted
// first and element 0 of the result is the first bit that came out, so for
// a register whose scan output is bit 0, element k lands in / came from
// bit k.

task automatic tick(input bit m, input bit d, output bit o);
  tms = m;
  tdi = d;
  #4;
  o = tdo;
  #1 tck = 1'b1;
  #5 tck = 1'b0;
endtask

task automatic tap_reset();
  bit o;
  repeat (5) tick(1'b1, 1'b0, o);
  tick(1'b0, 1'b0, o);  // Run-Test/Idle
endtask

// From Run-Test/Idle through a shift state and back to Run-Test/Idle.
task automatic scan(input bit is_ir, input bit din[], output bit dout[]);
  bit o;
  int n = din.size();
  dout = new[n];
  tick(1'b1, 1'b0, o);               // Select-DR
  if (is_ir) tick(1'b1, 1'b0, o);    // Select-IR
  tick(1'b0, 1'b0, o);               // Capture
  tick(1'b0, 1'b0, o);               // -> Shift (capture happens here)
  for (int k = 0; k < n; k++) tick(k == n - 1, din[k], dout[k]);
  tick(1'b1, 1'b0, o);               // Exit1 -> Update
  tick(1'b0, 1'b0, o);               // Update -> Run-Test/Idle
endtask

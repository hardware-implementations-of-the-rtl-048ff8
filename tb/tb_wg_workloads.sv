// tb_wg_workloads: the cipher instances whose results are tabulated for this
// family, run end to end against the software model of tb_wg_run (short
// keystreams, two keys each):
//   1 bit per cycle: WG-7 (d=63), WG-10 (d=73) with constant arrays; WG-11
//   without decimation; WG-14 (d=47), WG-16 (d=1057) and WG-16 with a 32-stage
//   LFSR (256-bit key) from discrete components with the trace equation.
//   Largest degrees of parallelism: WG-5 32 bits/cycle (normal and fast),
//   WG-8 16 bits/cycle normal and 8 bits/cycle fast (40 rounds allow no 16),
//   WG-11 14 bits/cycle normal and fast (fast needs a multiple of 14 rounds:
//   42 are used).
// Field polynomials, LFSR polynomials, stage counts and decimation exponents
// are the published instance parameters; the keystream lengths, key values,
// the 42-round count and the watchdog are choices of this testbench. Each
// configuration prints its own counts; the run fails if any configuration
// never initialised or never saw a stall.
module tb_wg_workloads;
  import wg_pkg::*;

  localparam int NCFG = 12;

  logic clk = 0;
  always #5 clk = ~clk;

  logic done [NCFG];
  int   ck [NCFG], fl [NCFG], gaps [NCFG], inits [NCFG], stalls [NCFG], multi [NCFG];
  tb_wg_run #(.M(7), .POLY(8'hEF), .L(23), .TAPS(23'h17CE), .D(63), .P(1), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_CONST), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .NBITS(128),
              .NAME("WG-7 d=63")) c0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]),
    .n_load_gaps(gaps[0]), .n_init_cycles(inits[0]), .n_stalls(stalls[0]), .n_multi_steps(multi[0]));
  tb_wg_run #(.M(10), .POLY(11'h42D), .L(16), .TAPS(16'h372), .D(73), .P(1), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_CONST), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .NBITS(128),
              .NAME("WG-10 d=73")) c1 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]),
    .n_load_gaps(gaps[1]), .n_init_cycles(inits[1]), .n_stalls(stalls[1]), .n_multi_steps(multi[1]));
  tb_wg_run #(.M(11), .POLY(12'h805), .L(15), .TAPS(15'h274), .D(1), .P(1), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_COMP), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .NBITS(128),
              .NAME("WG-11 d=1")) c2 (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]),
    .n_load_gaps(gaps[2]), .n_init_cycles(inits[2]), .n_stalls(stalls[2]), .n_multi_steps(multi[2]));
  tb_wg_run #(.M(14), .POLY(15'h6DBB), .L(12), .TAPS(12'hB8), .D(47), .P(1), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_COMP), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b1), .NBITS(64),
              .NAME("WG-14 d=47")) c3 (.clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]),
    .n_load_gaps(gaps[3]), .n_init_cycles(inits[3]), .n_stalls(stalls[3]), .n_multi_steps(multi[3]));
  tb_wg_run #(.M(16), .POLY(17'h155F5), .L(10), .TAPS(10'hC4), .D(1057), .P(1), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_COMP), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b1), .NBITS(64),
              .NAME("WG-16 d=1057")) c4 (.clk, .done(done[4]), .checks(ck[4]), .failures(fl[4]),
    .n_load_gaps(gaps[4]), .n_init_cycles(inits[4]), .n_stalls(stalls[4]), .n_multi_steps(multi[4]));
  tb_wg_run #(.M(16), .POLY(17'h155F5), .L(32), .TAPS(32'h16E), .D(1057), .P(1), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_COMP), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b1), .NBITS(64),
              .NAME("WG-16 256-bit key d=1057")) c5 (.clk, .done(done[5]), .checks(ck[5]), .failures(fl[5]),
    .n_load_gaps(gaps[5]), .n_init_cycles(inits[5]), .n_stalls(stalls[5]), .n_multi_steps(multi[5]));
  tb_wg_run #(.M(5), .POLY(6'h3B), .L(32), .TAPS(32'h6F7E), .D(11), .P(32), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_CONST), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .NBITS(512),
              .NAME("WG-5 d=11 P=32 normal")) c6 (.clk, .done(done[6]), .checks(ck[6]), .failures(fl[6]),
    .n_load_gaps(gaps[6]), .n_init_cycles(inits[6]), .n_stalls(stalls[6]), .n_multi_steps(multi[6]));
  tb_wg_run #(.M(5), .POLY(6'h3B), .L(32), .TAPS(32'h6F7E), .D(11), .P(32), .INIT_MODE(INIT_FAST),
              .DWGP_IMPL(IMPL_CONST), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .NBITS(512),
              .NAME("WG-5 d=11 P=32 fast")) c7 (.clk, .done(done[7]), .checks(ck[7]), .failures(fl[7]),
    .n_load_gaps(gaps[7]), .n_init_cycles(inits[7]), .n_stalls(stalls[7]), .n_multi_steps(multi[7]));
  tb_wg_run #(.M(8), .POLY(9'h165), .L(20), .TAPS(20'h1BE), .D(19), .P(16), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_CONST), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .NBITS(256),
              .NAME("WG-8 d=19 P=16 normal")) c8 (.clk, .done(done[8]), .checks(ck[8]), .failures(fl[8]),
    .n_load_gaps(gaps[8]), .n_init_cycles(inits[8]), .n_stalls(stalls[8]), .n_multi_steps(multi[8]));
  tb_wg_run #(.M(8), .POLY(9'h165), .L(20), .TAPS(20'h1BE), .D(19), .P(8), .INIT_MODE(INIT_FAST),
              .DWGP_IMPL(IMPL_CONST), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .NBITS(256),
              .NAME("WG-8 d=19 P=8 fast")) c9 (.clk, .done(done[9]), .checks(ck[9]), .failures(fl[9]),
    .n_load_gaps(gaps[9]), .n_init_cycles(inits[9]), .n_stalls(stalls[9]), .n_multi_steps(multi[9]));
  tb_wg_run #(.M(11), .POLY(12'h805), .L(15), .TAPS(15'h274), .D(203), .P(14), .INIT_MODE(INIT_NORMAL),
              .DWGP_IMPL(IMPL_COMP), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .NBITS(224),
              .NAME("WG-11 d=203 P=14 normal")) c10 (.clk, .done(done[10]), .checks(ck[10]), .failures(fl[10]),
    .n_load_gaps(gaps[10]), .n_init_cycles(inits[10]), .n_stalls(stalls[10]), .n_multi_steps(multi[10]));
  tb_wg_run #(.M(11), .POLY(12'h805), .L(15), .TAPS(15'h274), .D(203), .P(14), .INIT_MODE(INIT_FAST),
              .DWGP_IMPL(IMPL_COMP), .DWGT_IMPL(IMPL_CONST), .TRACE_EQ(1'b0), .INIT_ROUNDS(42), .NBITS(224),
              .NAME("WG-11 d=203 P=14 fast, 42 rounds")) c11 (.clk, .done(done[11]), .checks(ck[11]), .failures(fl[11]),
    .n_load_gaps(gaps[11]), .n_init_cycles(inits[11]), .n_stalls(stalls[11]), .n_multi_steps(multi[11]));

  int checks, failures;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NCFG; i++) all &= done[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += ck[i] + 1; failures += fl[i];
      if (inits[i] == 0 || stalls[i] == 0) begin
        failures++;
        $display("FAIL: config %0d did not initialise or stall", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

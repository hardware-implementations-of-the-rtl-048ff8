// tb_wg_cipher: end-to-end test of wg_cipher in several configurations side
// by side, each against the software model of tb_wg_run:
//   WG-11 d=203, 1 bit/cycle (discrete-components DWGP)
//   WG-11 d=203, 2 bits/cycle, normal initialisation (DWGT table lane)
//   WG-11 d=203, 2 bits/cycle, fast initialisation (two chained DWGPs)
//   WG-11 d=203, 3 bits/cycle, normal initialisation, DWGT from components
//   WG-8  d=19,  4 bits/cycle, fast and normal initialisation, tables
//   WG-5  d=11,  1 bit/cycle, tables
//   WG-13 d=195, 1 bit/cycle, trace as linear equation
// Every mechanism must occur at least once: key/IV load gaps, the
// initialisation phase, running stalls, multi-bit steps in normal and fast
// mode, and reset during the running phase (each configuration runs two
// keys).
module tb_wg_cipher;
  import wg_pkg::*;

  localparam int NCFG = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic done [NCFG];
  int   ck [NCFG], fl [NCFG], gaps [NCFG], inits [NCFG], stalls [NCFG], multi [NCFG];

  tb_wg_run #(.NAME("WG-11 P=1")) c0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]),
    .n_load_gaps(gaps[0]), .n_init_cycles(inits[0]), .n_stalls(stalls[0]), .n_multi_steps(multi[0]));
  tb_wg_run #(.P(2), .NAME("WG-11 P=2 normal")) c1 (.clk, .done(done[1]), .checks(ck[1]),
    .failures(fl[1]), .n_load_gaps(gaps[1]), .n_init_cycles(inits[1]), .n_stalls(stalls[1]),
    .n_multi_steps(multi[1]));
  tb_wg_run #(.P(2), .INIT_MODE(INIT_FAST), .NAME("WG-11 P=2 fast")) c2 (.clk, .done(done[2]),
    .checks(ck[2]), .failures(fl[2]), .n_load_gaps(gaps[2]), .n_init_cycles(inits[2]),
    .n_stalls(stalls[2]), .n_multi_steps(multi[2]));
  tb_wg_run #(.P(3), .DWGT_IMPL(IMPL_COMP), .NAME("WG-11 P=3 normal comp")) c3 (.clk,
    .done(done[3]), .checks(ck[3]), .failures(fl[3]), .n_load_gaps(gaps[3]),
    .n_init_cycles(inits[3]), .n_stalls(stalls[3]), .n_multi_steps(multi[3]));
  tb_wg_run #(.M(8), .POLY(9'h165), .L(20), .TAPS(20'h001BE), .D(19), .P(4),
              .INIT_MODE(INIT_FAST), .DWGP_IMPL(IMPL_CONST), .NAME("WG-8 P=4 fast")) c4 (.clk,
    .done(done[4]), .checks(ck[4]), .failures(fl[4]), .n_load_gaps(gaps[4]),
    .n_init_cycles(inits[4]), .n_stalls(stalls[4]), .n_multi_steps(multi[4]));
  tb_wg_run #(.M(8), .POLY(9'h165), .L(20), .TAPS(20'h001BE), .D(19), .P(4),
              .DWGP_IMPL(IMPL_CONST), .NAME("WG-8 P=4 normal")) c5 (.clk,
    .done(done[5]), .checks(ck[5]), .failures(fl[5]), .n_load_gaps(gaps[5]),
    .n_init_cycles(inits[5]), .n_stalls(stalls[5]), .n_multi_steps(multi[5]));
  tb_wg_run #(.M(5), .POLY(6'h3B), .L(32), .TAPS(32'h0000_6F7E), .D(11),
              .DWGP_IMPL(IMPL_CONST), .NAME("WG-5 P=1")) c6 (.clk,
    .done(done[6]), .checks(ck[6]), .failures(fl[6]), .n_load_gaps(gaps[6]),
    .n_init_cycles(inits[6]), .n_stalls(stalls[6]), .n_multi_steps(multi[6]));
  tb_wg_run #(.M(13), .POLY(14'h3A75), .L(13), .TAPS(13'h009A), .D(195), .TRACE_EQ(1'b1),
              .NBITS(100), .NAME("WG-13 P=1")) c7 (.clk,
    .done(done[7]), .checks(ck[7]), .failures(fl[7]), .n_load_gaps(gaps[7]),
    .n_init_cycles(inits[7]), .n_stalls(stalls[7]), .n_multi_steps(multi[7]));

  int checks, failures;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    int sum_gaps, sum_stalls, multi_fast, multi_norm;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NCFG; i++) all &= done[i];
    end while (!all);
    checks = 0; failures = 0;
    sum_gaps = 0; sum_stalls = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += ck[i]; failures += fl[i];
      sum_gaps += gaps[i]; sum_stalls += stalls[i];
      checks++;
      if (inits[i] == 0) begin failures++; $display("FAIL: config %0d never initialised", i); end
    end
    multi_fast = multi[2] + multi[4];
    multi_norm = multi[1] + multi[3] + multi[5];
    $display("mechanisms: load gaps=%0d stalls=%0d multi-bit fast=%0d multi-bit normal=%0d resets while running=%0d",
             sum_gaps, sum_stalls, multi_fast, multi_norm, NCFG);
    checks += 4;
    if (sum_gaps == 0)   begin failures++; $display("FAIL: no load gap"); end
    if (sum_stalls == 0) begin failures++; $display("FAIL: no running stall"); end
    if (multi_fast == 0) begin failures++; $display("FAIL: no fast multi-bit step"); end
    if (multi_norm == 0) begin failures++; $display("FAIL: no normal multi-bit step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wg_fsm: checks the phase sequence of the controller for L = 15 and 30
// initialisation cycles: exactly 15 loads (on valid cycles only, with random
// gaps), then exactly 30 cycles of initialisation whatever i_valid does, then
// running with o_advance = i_valid; reset returns to loading.
module tb_wg_fsm;
  import wg_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, reset, valid;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wg_phase_e phase;
  logic load, init, adv;

  wg_fsm u (.clk, .reset, .i_valid(valid), .o_phase(phase), .o_load(load), .o_init(init),
            .o_advance(adv));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int loads, inits, runs;
    for (int pass = 0; pass < 2; pass++) begin
      reset = 1; valid = 0;
      @(posedge clk); #1;
      reset = 0;
      loads = 0; inits = 0; runs = 0;
      for (int n = 0; n < 200; n++) begin
        valid = 1'($urandom);
        #1;
        chk(load === (phase == PH_LOAD && valid), "o_load");
        chk(init === (phase == PH_INIT), "o_init");
        chk(adv === (phase == PH_RUN && valid), "o_advance");
        if (phase == PH_LOAD) chk(inits == 0 && runs == 0, "load before init");
        if (phase == PH_INIT) chk(loads == 15 && runs == 0, "init after 15 loads");
        if (phase == PH_RUN)  chk(loads == 15 && inits == 30, "run after 30 init cycles");
        loads += load; inits += init; runs += adv;
        @(posedge clk); #1;
      end
      chk(loads == 15, "15 loads");
      chk(inits == 30, "30 init cycles");
      chk(runs > 0, "running reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

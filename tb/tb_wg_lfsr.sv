// tb_wg_lfsr: drives the LFSR state register with random load / step-one /
// step-P / hold commands and compares the state with a software shift
// register, for P = 1 (WG-11 sizes) and P = 3.
module tb_wg_lfsr;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic clk = 0, reset;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic              load, step1, stepp;
  logic [10:0]       kiv;
  logic [2:0][10:0]  fut;
  logic [14:0][10:0] st1, st3;

  wg_lfsr            u1 (.clk, .reset, .i_load(load), .i_step1(step1), .i_stepp(stepp),
                         .i_key_iv(kiv), .i_fut(fut[0]), .o_state(st1));
  wg_lfsr #(.P(3))   u3 (.clk, .reset, .i_load(load), .i_step1(step1), .i_stepp(stepp),
                         .i_key_iv(kiv), .i_fut(fut), .o_state(st3));

  logic [10:0] m1 [15];
  logic [10:0] m3 [15];

  initial begin
    int op;
    reset = 1; load = 0; step1 = 0; stepp = 0; kiv = '0; fut = '0;
    @(posedge clk); #1;
    reset = 0;
    for (int i = 0; i < 15; i++) begin m1[i] = '0; m3[i] = '0; end
    for (int n = 0; n < 3000; n++) begin
      op = n < 15 ? 0 : int'($urandom_range(0, 3));
      load = (op == 0); step1 = (op == 1); stepp = (op == 2);
      kiv = 11'($urandom);
      for (int j = 0; j < 3; j++) fut[j] = 11'($urandom);
      @(posedge clk); #1;
      // model
      case (op)
        0: begin
          for (int i = 0; i < 14; i++) begin m1[i] = m1[i+1]; m3[i] = m3[i+1]; end
          m1[14] = kiv; m3[14] = kiv;
        end
        1: begin
          for (int i = 0; i < 14; i++) begin m1[i] = m1[i+1]; m3[i] = m3[i+1]; end
          m1[14] = fut[0]; m3[14] = fut[0];
        end
        2: begin
          for (int i = 0; i < 14; i++) m1[i] = m1[i+1];
          m1[14] = fut[0];
          for (int i = 0; i < 12; i++) m3[i] = m3[i+3];
          for (int j = 0; j < 3; j++) m3[12+j] = fut[j];
        end
        default: ;
      endcase
      for (int i = 0; i < 15; i++) begin
        checks += 2;
        if (st1[i] !== m1[i]) begin failures++; if (failures < 10) $display("FAIL P=1 n=%0d i=%0d", n, i); end
        if (st3[i] !== m3[i]) begin failures++; if (failures < 10) $display("FAIL P=3 n=%0d i=%0d", n, i); end
      end
    end
    // reset clears the state
    load = 0; step1 = 0; stepp = 0; reset = 1;
    @(posedge clk); #1;
    checks++;
    if (st1 !== '0 || st3 !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

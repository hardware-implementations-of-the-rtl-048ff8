// tb_dwgp_fields: functional run of the permutation-area study.  For every
// field of the family (m = 5, 7, 8, 10, 11, 13, 14, 16) it instantiates the
// WG permutation and transformation with the field polynomials that gave the
// smallest area for discrete components and for constant arrays, with d = 1
// and with the field's decimation exponent, and checks them against the
// reference model (one tb_dwgp_field per field).  Fields up to 11 bits are
// checked exhaustively and include the constant-array variants; 13, 14 and
// 16 bits use random samples and discrete components only, because
// constant tables of 2^13 and more entries are costly to elaborate.
// The polynomials and exponents are the published ones; sample counts and
// the restriction of the tables to m <= 11 are this testbench's choices.
// A watchdog ends the run if a field never finishes.
module tb_dwgp_fields;

  localparam int NF = 8;

  logic done [NF];
  int   ck [NF], fl [NF];

  tb_dwgp_field #(.M(5),  .PC(6'h29),     .PK(6'h3B),     .DD(11),   .CONST(1), .NSAMP(32),   .NAME("WG-5"))  f0 (.done(done[0]), .checks(ck[0]), .failures(fl[0]));
  tb_dwgp_field #(.M(7),  .PC(8'h83),     .PK(8'hEF),     .DD(63),   .CONST(1), .NSAMP(128),  .NAME("WG-7"))  f1 (.done(done[1]), .checks(ck[1]), .failures(fl[1]));
  tb_dwgp_field #(.M(8),  .PC(9'h15F),    .PK(9'h165),    .DD(19),   .CONST(1), .NSAMP(256),  .NAME("WG-8"))  f2 (.done(done[2]), .checks(ck[2]), .failures(fl[2]));
  tb_dwgp_field #(.M(10), .PC(11'h409),   .PK(11'h42D),   .DD(73),   .CONST(1), .NSAMP(1024), .NAME("WG-10")) f3 (.done(done[3]), .checks(ck[3]), .failures(fl[3]));
  tb_dwgp_field #(.M(11), .PC(12'h805),   .PK(12'hDD7),   .DD(203),  .CONST(1), .NSAMP(2048), .NAME("WG-11")) f4 (.done(done[4]), .checks(ck[4]), .failures(fl[4]));
  tb_dwgp_field #(.M(13), .PC(14'h3A75),  .PK(14'h3A75),  .DD(195),  .CONST(0), .NSAMP(1000), .NAME("WG-13")) f5 (.done(done[5]), .checks(ck[5]), .failures(fl[5]));
  tb_dwgp_field #(.M(14), .PC(15'h6DBB),  .PK(15'h6DBB),  .DD(47),   .CONST(0), .NSAMP(1000), .NAME("WG-14")) f6 (.done(done[6]), .checks(ck[6]), .failures(fl[6]));
  tb_dwgp_field #(.M(16), .PC(17'h155F5), .PK(17'h155F5), .DD(1057), .CONST(0), .NSAMP(1000), .NAME("WG-16")) f7 (.done(done[7]), .checks(ck[7]), .failures(fl[7]));

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    bit all;
    do begin
      #1;
      all = 1;
      for (int i = 0; i < NF; i++) all &= done[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NF; i++) begin
      checks += ck[i]; failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// gf_mul: classic combinational multiplier in GF(2^M), polynomial basis.
//
// The product is formed in two parts.  First the plain polynomial product of
// the two inputs, 2*M-1 coefficients wide, is built from AND terms summed with
// XOR.  Then the reduction matrix folds the M-1 high coefficients back into the
// field: row j (M <= j <= 2*M-2) of that matrix is x^j mod f(x), worked out
// from POLY while the design elaborates, and every high coefficient that is set
// adds its row to the low M coefficients.  For f(x) = x^5 + x^2 + 1 the row for
// x^5 is 1 0 1 0 0 (x^5 = x^2 + 1) and the row for x^8 is x^3 + x^2 + 1.
//
// Interface: i_a, i_b, o_z are M-bit field elements (bit i = coefficient of
// alpha^i).  Purely combinational, no clock.  The two-stage structure
// (polynomial multiplication, then reduction by a matrix derived from the field
// polynomial) follows the multiplier this cipher family was built with; the bit
// ordering of the ports is this design's choice.
module gf_mul #(
  parameter int unsigned     M    = 11,
  parameter logic [M:0]      POLY = 12'h805   // x^11 + x^2 + 1
) (
  input  logic [M-1:0] i_a,
  input  logic [M-1:0] i_b,
  output logic [M-1:0] o_z
);

  // Reduction matrix rows: RED[j] = x^(j+M) mod f(x), j = 0 .. M-2.
  typedef logic [M-1:0] row_t;

  function automatic row_t red_row(int unsigned j);
    logic [M:0] r;
    r = (M+1)'(1) << (M - 1);           // x^(M-1)
    for (int unsigned s = 0; s <= j; s++) begin
      r = r << 1;
      if (r[M]) r = r ^ POLY;
    end
    return r[M-1:0];
  endfunction

  logic [2*M-2:0] prod;

  // Polynomial multiplication.
  always_comb begin
    prod = '0;
    for (int unsigned i = 0; i < M; i++)
      for (int unsigned j = 0; j < M; j++)
        prod[i+j] ^= i_a[i] & i_b[j];
  end

  // Reduction.
  always_comb begin
    o_z = prod[M-1:0];
    for (int unsigned j = 0; j + 1 < M; j++)
      if (prod[M+j]) o_z = o_z ^ red_row(j);
  end

  initial begin
    assert (POLY[M] && POLY[0])
      else $error("gf_mul: field polynomial must have degree M and a constant term");
  end

endmodule

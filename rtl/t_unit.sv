// t_unit: output transformation of the state-space parallel LFSR.
//
// Recovers the ordinary LFSR state X(t) = T * X^T(t) from the transformed
// state held in the register.  T is upper-triangular Toeplitz, built from the
// transformation vector V = [1, v_1 .. v_{n-1}]: row i holds v_{j-i} in
// column j >= i.  Each output bit is the XOR of the selected state bits.  The
// matrix follows the design's formulation; sharing of XOR terms is left to
// synthesis.
//
// Interface: xt is X^T(t), x is X(t), both in element order (bit i is
// element i, element 0 being the coefficient of s^(n-1)).  Combinational.
module t_unit #(
  parameter int unsigned N    = 32,
  parameter logic [N-1:0] TVEC = 32'h8000_0212
) (
  input  logic [N-1:0] xt,
  output logic [N-1:0] x
);
  localparam plfsr_pkg::mat_t M = plfsr_pkg::t_matrix(N, plfsr_pkg::vec_t'(TVEC));

  always_comb begin
    for (int unsigned i = 0; i < N; i++) x[i] = ^(M[i][N-1:0] & xt);
  end
endmodule

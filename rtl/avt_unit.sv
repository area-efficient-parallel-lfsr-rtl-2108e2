// avt_unit: feedback coupling of the state-space parallel LFSR.
//
// Multiplies the transformed state X^T(t) by the n x n GF(2) matrix
// AvT = T^-1 * A^v * T, the transition over v serial steps seen in the
// transformed basis.  Each output bit is the XOR of the state bits selected
// by one matrix row; the matrix is a constant worked out at elaboration
// (plfsr_pkg).  The matrix follows the state-space formulation; sharing of
// common XOR terms between rows is left to the synthesis tool.
//
// Interface: xt is X^T(t), y is AvT*X^T(t), both in element order (bit i is
// element i).  Purely combinational; it lies in the feedback loop.
module avt_unit #(
  parameter int unsigned N    = 32,
  parameter int unsigned V    = N,
  parameter logic [N-1:0] POLY = 32'h04C1_1DB7,
  parameter logic [N-1:0] TVEC = 32'h8000_0212
) (
  input  logic [N-1:0] xt,
  output logic [N-1:0] y
);
  localparam plfsr_pkg::mat_t M = plfsr_pkg::avt_matrix(N, V, plfsr_pkg::vec_t'(POLY),
                                                        plfsr_pkg::vec_t'(TVEC));

  always_comb begin
    for (int unsigned i = 0; i < N; i++) y[i] = ^(M[i][N-1:0] & xt);
  end
endmodule

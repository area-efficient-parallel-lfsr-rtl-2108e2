// bvt_unit: input coupling of the state-space parallel LFSR.
//
// Multiplies the v message bits applied in one clock, U_v(t), by the n x v
// GF(2) matrix BvT = T^-1 * Bv.  Every output bit is the XOR of the input bits
// selected by one row of the matrix; the matrix is worked out while the design
// elaborates (plfsr_pkg), so only XOR gates remain.  The matrix and its role
// follow the state-space formulation; leaving the sharing of common XOR terms
// between rows to the synthesis tool is this design's choice.
//
// Interface: u[j] is the j-th bit in time of the block (u[0] first), y[i] is
// element i of the transformed state update.  Purely combinational.
module bvt_unit #(
  parameter int unsigned N    = 32,            // generator polynomial degree n
  parameter int unsigned V    = N,             // bits per clock v
  parameter logic [N-1:0] POLY = 32'h04C1_1DB7, // g_{n-1}..g_0 (CRC-32)
  parameter logic [N-1:0] TVEC = 32'h8000_0212  // transformation vector V
) (
  input  logic [V-1:0] u,
  output logic [N-1:0] y
);
  localparam plfsr_pkg::mat_t M = plfsr_pkg::bvt_matrix(N, V, plfsr_pkg::vec_t'(POLY),
                                                        plfsr_pkg::vec_t'(TVEC));

  always_comb begin
    for (int unsigned i = 0; i < N; i++) y[i] = ^(M[i][V-1:0] & u);
  end
endmodule

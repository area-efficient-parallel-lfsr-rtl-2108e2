// parallel_lfsr: v-bit-per-clock CRC generator built as a state-space
// transformed parallel LFSR.
//
// A serial CRC register needs one clock per message bit.  Here v message bits
// enter per clock: the block goes through the input coupling BvT (bvt_unit),
// is XORed with the fed-back state AvT*X^T (avt_unit) and stored in the n-bit
// register D (state_reg).  The register holds the transformed state
// X^T = T^-1*X; the CRC is recovered outside the loop as X = T*X^T (t_unit).
// With a well-chosen transformation vector V the three constant matrices
// together hold far fewer ones, so fewer XOR gates, than the plain look-ahead
// matrices A^v and Bv.  Structure, matrices and the vector V follow the
// design; the handshake below is this implementation's own.
//
// The defaults are the CRC-32 configuration: degree 32, 32 bits per clock,
// generator 0x04C11DB7 and vector 0x80000212.  The CRC is the plain
// polynomial remainder M(s)*s^n mod G(s): zero initial state, message taken
// most significant bit first, no final inversion.
//
// Interface and timing:
//   in_valid  a v-bit block is applied this clock; in_data[V-1] is the
//             earliest bit in time, in_data[0] the latest.
//   in_first  with in_valid: the block is the first of a message (the state
//             restarts from zero).
//   in_last   with in_valid: the block is the last of a message.
//   crc       X(t) read through T; crc[N-1] is the coefficient of s^(n-1).
//   crc_valid high for one clock when the CRC of a message appears on crc;
//             crc then holds until the next message's first block reaches D.
// A message of m bits (m a multiple of v) is taken in m/v clocks; in_valid
// may drop between blocks, and a new message may follow the last block of
// the previous one on the next clock.
//
// IN_PIPE = 1 (default) registers the input term BvT*U, with its flags,
// before it is added into D.  The input coupling then sits outside the
// feedback loop, whose path is only AvT plus one XOR, and the circuit holds
// 2n delay elements, the count the design's area figures use for v = n.
// crc_valid rises 2 clocks after the last block is applied.  With
// IN_PIPE = 0 the structure is exactly BvT -> XOR -> D, and crc_valid rises
// 1 clock after the last block.
module parallel_lfsr #(
  parameter int unsigned N    = 32,             // generator polynomial degree n
  parameter int unsigned V    = N,              // message bits per clock v
  parameter logic [N-1:0] POLY = 32'h04C1_1DB7, // g_{n-1}..g_0, s^n implied
  parameter logic [N-1:0] TVEC = 32'h8000_0212, // transformation vector V
  parameter bit           IN_PIPE = 1'b1        // register BvT*U ahead of D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [V-1:0] in_data,
  output logic [N-1:0] crc,
  output logic         crc_valid
);
  if (N < 2 || N > plfsr_pkg::MAXN || V < 1 || V > plfsr_pkg::MAXN) begin : g_bad_size
    $error("parallel_lfsr: N and V must lie in 2..%0d and 1..%0d",
           plfsr_pkg::MAXN, plfsr_pkg::MAXN);
  end
  if (TVEC[N-1] != 1'b1) begin : g_bad_tvec
    $error("parallel_lfsr: the leading element of TVEC must be 1");
  end

  logic [V-1:0] u;       // u[j]: j-th bit in time
  logic [N-1:0] inj;     // BvT * U
  logic [N-1:0] fb;      // AvT * X^T
  logic [N-1:0] xt;      // X^T, content of register D
  logic [N-1:0] x;       // X = T * X^T, element order

  always_comb begin
    for (int unsigned j = 0; j < V; j++) u[j] = in_data[V-1-j];
  end

  bvt_unit #(.N(N), .V(V), .POLY(POLY), .TVEC(TVEC)) u_bvt (.u(u), .y(inj));
  avt_unit #(.N(N), .V(V), .POLY(POLY), .TVEC(TVEC)) u_avt (.xt(xt), .y(fb));

  // Input term as it enters the adder, optionally one clock later.
  logic         d_valid, d_first, d_last;
  logic [N-1:0] d_inj;

  if (IN_PIPE) begin : g_in_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d_valid <= 1'b0;
        d_first <= 1'b0;
        d_last  <= 1'b0;
        d_inj   <= '0;
      end else begin
        d_valid <= in_valid;
        d_first <= in_first;
        d_last  <= in_last;
        if (in_valid) d_inj <= inj;
      end
    end
  end else begin : g_no_pipe
    always_comb begin
      d_valid = in_valid;
      d_first = in_first;
      d_last  = in_last;
      d_inj   = inj;
    end
  end

  state_reg #(.N(N)) u_d (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (d_valid),
    .first(d_first),
    .fb   (fb),
    .inj  (d_inj),
    .xt   (xt)
  );

  t_unit #(.N(N), .TVEC(TVEC)) u_t (.xt(xt), .x(x));

  always_comb begin
    for (int unsigned i = 0; i < N; i++) crc[N-1-i] = x[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) crc_valid <= 1'b0;
    else        crc_valid <= d_valid && d_last;
  end

  // Input rule: a block that does not start a message must continue one
  // (in_valid is expected low while rst_n is low).
  logic open_msg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        open_msg <= 1'b0;
    else if (in_valid) open_msg <= !in_last;
  end

  a_continue_open: assert property (@(posedge clk)
    in_valid && !in_first |-> open_msg)
    else $error("parallel_lfsr: block applied outside a message");
endmodule

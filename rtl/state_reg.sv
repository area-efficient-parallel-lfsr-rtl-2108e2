// state_reg: the XOR adder and delay register D of the parallel LFSR.
//
// On every clock with en high the register takes
//     X^T(t+1) = AvT*X^T(t) + BvT*U_v(t)
// from its two inputs: fb (the feedback term, AvT*X^T) and inj (the input
// term, BvT*U).  When first is high as well, the block starts a new message:
// the feedback term is dropped, which is the same as starting from the
// all-zero state.  With en low the register holds.  The adder and register
// follow the design; the start-of-message control, the hold on en low and
// the asynchronous active-low reset to zero are this design's choices.
//
// Timing: one cycle per v-bit block; xt shows the new state after the edge.
module state_reg #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         first,
  input  logic [N-1:0] fb,
  input  logic [N-1:0] inj,
  output logic [N-1:0] xt
);
  logic [N-1:0] xt_next;

  always_comb begin
    xt_next = (first ? '0 : fb) ^ inj;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  xt <= '0;
    else if (en) xt <= xt_next;
  end
endmodule

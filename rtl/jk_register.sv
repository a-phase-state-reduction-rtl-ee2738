// jk_register: a bank of J-K flip-flops clocked by CL2.
//
// It holds either the output variables z or the internal variables v of the
// control unit. Each bit follows the J-K rule on the rising edge of CL2:
// J=1,K=0 sets it, J=0,K=1 resets it, J=K=0 keeps it and J=K=1 toggles it.
// The set/reset instructions of the flow chart become J and K terms
// (J = F_i * f_j, K = F_i * f_k); the phase-state separation rules make sure
// a correctly derived control unit never drives J and K of one bit at once,
// which an assertion checks. The J-K realization and the CL2 clock follow the
// described structure; the reset value parameter is this design's choice.
//
// Interface: cl2 (clock), rst_n (asynchronous reset, active low),
// j[N], k[N] (control inputs), q[N] (state).
module jk_register #(
  parameter int unsigned N          = 3,
  parameter logic [N-1:0] RESET_VAL = '0
) (
  input  logic         cl2,
  input  logic         rst_n,
  input  logic [N-1:0] j,
  input  logic [N-1:0] k,
  output logic [N-1:0] q
);

  always_ff @(posedge cl2 or negedge rst_n) begin
    if (!rst_n) q <= RESET_VAL;
    else        q <= (j & ~q) | (~k & q);
  end

  // Separation rule 5: a set and a reset of the same variable never share a
  // phase state, so J and K are never active together.
  a_no_toggle: assert property (@(posedge cl2) disable iff (!rst_n) (j & k) == '0)
    else $error("jk_register: J and K both active: %b", j & k);

endmodule

// input_register: the input flip-flops of the control unit.
//
// Every input variable x is sampled on the rising edge of the first clock
// phase CL1, so that the control functions, which are evaluated between CL1
// and CL2, see inputs that stay still while the internal flip-flops, the
// output flip-flops and the phase register change on CL2. Clocking the input
// flip-flops by CL1 follows the described structure; the asynchronous
// active-low reset to zero is this design's own choice.
//
// Interface: cl1 (clock), rst_n (asynchronous reset, active low),
// x_in[NX] (raw inputs), x_q[NX] (sampled inputs, valid one CL1 edge later).
module input_register #(
  parameter int unsigned NX = 3
) (
  input  logic          cl1,
  input  logic          rst_n,
  input  logic [NX-1:0] x_in,
  output logic [NX-1:0] x_q
);

  always_ff @(posedge cl1 or negedge rst_n) begin
    if (!rst_n) x_q <= '0;
    else        x_q <= x_in;
  end

endmodule

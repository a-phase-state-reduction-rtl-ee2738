// clock_inhibitor: the f_c block that lets CL2 reach the phase register only
// when a phase-state change is wanted.
//
// The enable is the logical sum of every transition condition f_{i-j} with
// i != j: f_c = sum f_{i-j}. A term f_{i-i} (staying in the same phase state)
// does not count. The design method gates the clock itself, CL_y = f_c * CL2;
// here the phase register receives f_c as a synchronous clock enable on CL2,
// which has the same effect on the register contents without a gated clock
// net. The function is the method's; the enable form is this design's
// choice.
//
// Interface: tr[i][j] = f_{i-j} (combinational, from the control function
// network), cl_en = f_c (combinational).
module clock_inhibitor #(
  parameter int unsigned NF = 6
) (
  input  logic [NF-1:0][NF-1:0] tr,
  output logic                  cl_en
);

  always_comb begin
    cl_en = 1'b0;
    for (int i = 0; i < NF; i++)
      for (int jj = 0; jj < NF; jj++)
        if (i != jj) cl_en |= tr[i][jj];
  end

endmodule

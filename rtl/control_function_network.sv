// control_function_network: the combinational mappings f_z, f_v and f_f of
// the control unit, as two-level AND-OR functions.
//
// The flow chart, already cut into phase states, is given as a table of
// product terms (cu_pkg::term_t). A term is active when its phase-state
// variable F_i is 1 and every input and internal variable it tests has the
// required value; these are the variables of the conditional-jump and wait
// instructions met between the start of the phase state and the instruction
// the term controls. Active terms are ORed into the control input they name:
// J or K of an output flip-flop, J or K of an internal flip-flop, or the
// transition condition f_{i-j}. Building each control function as a sum of
// such terms is the design method's own; holding the terms in a parameter
// table, so that one module serves any flow chart, is this design's choice.
//
// Interface (all combinational): f[NF] one-hot phase-state variables,
// x[NX] sampled inputs, v[NV] internal variables; jz/kz[NZ] and jv/kv[NV]
// J-K control inputs, tr[i][j] transition conditions f_{i-j}.
module control_function_network
  import cu_pkg::*;
#(
  parameter int unsigned NX = cu_pkg::EX_NX,
  parameter int unsigned NZ = cu_pkg::EX_NZ,
  parameter int unsigned NV = cu_pkg::EX_NV,
  parameter int unsigned NF = cu_pkg::EX_NF,
  parameter int unsigned NT = cu_pkg::EX_NT,
  parameter term_t [NT-1:0] TERMS = cu_pkg::EX_TERMS
) (
  input  logic [NF-1:0]         f,
  input  logic [NX-1:0]         x,
  input  logic [NV-1:0]         v,
  output logic [NZ-1:0]         jz,
  output logic [NZ-1:0]         kz,
  output logic [NV-1:0]         jv,
  output logic [NV-1:0]         kv,
  output logic [NF-1:0][NF-1:0] tr
);

  logic [MAX_X-1:0] xw;
  logic [MAX_V-1:0] vw;
  logic [NT-1:0]    prod;

  assign xw = MAX_X'(x);
  assign vw = MAX_V'(v);

  // AND plane: one product per term.
  always_comb begin
    for (int t = 0; t < NT; t++) begin
      prod[t] = 1'b0;
      for (int i = 0; i < NF; i++)
        if (int'(TERMS[t].phase) == i) prod[t] = f[i];
      prod[t] = prod[t]
             && (((xw ^ TERMS[t].x_val) & TERMS[t].x_care) == '0)
             && (((vw ^ TERMS[t].v_val) & TERMS[t].v_care) == '0);
    end
  end

  // OR plane: each control input is the sum of the terms that name it.
  always_comb begin
    jz = '0;
    kz = '0;
    jv = '0;
    kv = '0;
    tr = '0;
    for (int t = 0; t < NT; t++) begin
      for (int m = 0; m < NZ; m++) begin
        if (prod[t] && int'(TERMS[t].idx) == m && TERMS[t].act == ACT_SET_Z)   jz[m] = 1'b1;
        if (prod[t] && int'(TERMS[t].idx) == m && TERMS[t].act == ACT_RESET_Z) kz[m] = 1'b1;
      end
      for (int m = 0; m < NV; m++) begin
        if (prod[t] && int'(TERMS[t].idx) == m && TERMS[t].act == ACT_SET_V)   jv[m] = 1'b1;
        if (prod[t] && int'(TERMS[t].idx) == m && TERMS[t].act == ACT_RESET_V) kv[m] = 1'b1;
      end
      for (int i = 0; i < NF; i++)
        for (int jj = 0; jj < NF; jj++)
          if (prod[t] && int'(TERMS[t].phase) == i && int'(TERMS[t].idx) == jj
              && TERMS[t].act == ACT_GOTO)
            tr[i][jj] = 1'b1;
    end
  end

endmodule

// control_unit: a control unit in the fixed phase-register structure, driven
// by a flow chart that has been cut into phase states.
//
// Structure: the inputs x are sampled by input flip-flops on CL1. Between CL1
// and CL2 the control function network evaluates, from the phase-state
// variables F, the sampled inputs and the internal variables v, the J-K
// inputs of the output flip-flops z and of the internal flip-flops v and the
// transition conditions f_{i-j}. On CL2 the J-K flip-flops change and, when
// the clock inhibitor sees a transition (f_c = sum of f_{i-j}, i != j), the
// phase register moves to the next phase state. A phase state without an
// active transition simply repeats on every CL2 (a wait instruction); every
// phase-state transition costs one CL2 period (the delay instruction).
// The structure is that of the phase-register design method; the default term table is a small
// handshake flow chart of this design's own (see cu_pkg), with a
// shift-register phase-state assignment.
//
// Interface: cl1, cl2 (two-phase clocks; CL1 rises between CL2 edges),
// rst_n (asynchronous reset, active low, enters phase state INIT),
// x[NX] inputs, z[NZ] outputs (registered on CL2), v[NV] internal variables,
// y[P] phase-register state, f[NF] one-hot phase-state variables, fc the
// phase-register clock enable (for observation).
module control_unit
  import cu_pkg::*;
#(
  parameter int unsigned NX    = cu_pkg::EX_NX,
  parameter int unsigned NZ    = cu_pkg::EX_NZ,
  parameter int unsigned NV    = cu_pkg::EX_NV,
  parameter int unsigned NF    = cu_pkg::EX_NF,
  parameter int unsigned P     = (NF > 1) ? $clog2(NF) : 1,
  parameter int unsigned NT    = cu_pkg::EX_NT,
  parameter term_t [NT-1:0] TERMS = cu_pkg::EX_TERMS,
  parameter logic [NF-1:0][P-1:0] CODES = cu_pkg::EX_CODES,
  parameter int unsigned INIT  = 0,
  parameter bit          SHIFT = 1'b1
) (
  input  logic          cl1,
  input  logic          cl2,
  input  logic          rst_n,
  input  logic [NX-1:0] x,
  output logic [NZ-1:0] z,
  output logic [NV-1:0] v,
  output logic [P-1:0]  y,
  output logic [NF-1:0] f,
  output logic          fc
);

  logic [NX-1:0]         xq;
  logic [NZ-1:0]         jz, kz;
  logic [NV-1:0]         jv, kv;
  logic [NF-1:0][NF-1:0] tr;
  logic [NF-1:0]         go;

  input_register #(.NX(NX)) u_in (
    .cl1(cl1), .rst_n(rst_n), .x_in(x), .x_q(xq)
  );

  control_function_network #(
    .NX(NX), .NZ(NZ), .NV(NV), .NF(NF), .NT(NT), .TERMS(TERMS)
  ) u_cfn (
    .f(f), .x(xq), .v(v), .jz(jz), .kz(kz), .jv(jv), .kv(kv), .tr(tr)
  );

  jk_register #(.N(NZ)) u_z (
    .cl2(cl2), .rst_n(rst_n), .j(jz), .k(kz), .q(z)
  );

  jk_register #(.N(NV)) u_v (
    .cl2(cl2), .rst_n(rst_n), .j(jv), .k(kv), .q(v)
  );

  clock_inhibitor #(.NF(NF)) u_inh (
    .tr(tr), .cl_en(fc)
  );

  // Column sums: go[j] = OR over i of f_{i-j}.
  always_comb begin
    go = '0;
    for (int i = 0; i < NF; i++) go |= tr[i];
  end

  phase_register #(
    .NF(NF), .P(P), .CODES(CODES), .INIT(INIT), .SHIFT(SHIFT)
  ) u_ph (
    .cl2(cl2), .rst_n(rst_n), .en(fc), .go(go), .y(y), .f(f)
  );

endmodule

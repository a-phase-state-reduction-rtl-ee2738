// phase_register: the register that holds the current phase state, with its
// decoder.
//
// The phase state is kept in P = ceil(log2 NF) state variables y, encoded by
// the assignment table CODES (CODES[i] is the code of phase state F_i). The
// decoder turns y into the one-hot phase-state variables F_i used by the
// control functions. On a rising CL2 edge for which the clock inhibitor
// enables the register, y takes the code of the phase state whose transition
// condition is active (the column sums of f_{i-j}).
//
// With SHIFT = 1 the register is a shift register, as in the method's
// shift-register assignment: y[P-1:1] takes y[P-2:0] and only y[0] has an
// input function (the OR of CODES[j][0] over the active targets), so all
// other flip-flops need no control logic at all. This works only for an
// assignment in which every transition i->j has CODES[j][P-1:1] equal to
// CODES[i][P-2:0]; an assertion checks that for every transition taken.
// With SHIFT = 0 all P bits are loaded from the target code.
// The shift-register structure and p = ceil(log2 f) follow the design method; the
// code table as a parameter, the binary alternative and the reset into phase
// state INIT (the method asks for a transition into the initial phase
// state, rule 7) are this design's choices.
//
// Interface: cl2 (clock), rst_n (asynchronous reset, active low), en (f_c
// from the clock inhibitor), go[NF] (go[j] = OR_i f_{i-j}), y[P] (state
// variables), f[NF] (one-hot phase-state variables, combinational from y).
module phase_register #(
  parameter int unsigned NF    = cu_pkg::EX_NF,
  parameter int unsigned P     = (NF > 1) ? $clog2(NF) : 1,
  parameter logic [NF-1:0][P-1:0] CODES = cu_pkg::EX_CODES,
  parameter int unsigned INIT  = 0,
  parameter bit          SHIFT = 1'b1
) (
  input  logic          cl2,
  input  logic          rst_n,
  input  logic          en,
  input  logic [NF-1:0] go,
  output logic [P-1:0]  y,
  output logic [NF-1:0] f
);

  logic [P-1:0] target;  // OR of the codes of the active targets
  logic [P-1:0] y_next;

  always_comb begin
    target = '0;
    for (int jj = 0; jj < NF; jj++)
      if (go[jj]) target |= CODES[jj];
  end

  if (SHIFT && P > 1) begin : g_shift
    assign y_next = {y[P-2:0], target[0]};
  end else begin : g_load
    assign y_next = target;
  end

  always_ff @(posedge cl2 or negedge rst_n) begin
    if (!rst_n)  y <= CODES[INIT];
    else if (en) y <= y_next;
  end

  // Phase-state decoder.
  always_comb begin
    for (int i = 0; i < NF; i++) f[i] = (y == CODES[i]);
  end

  // Separation rule 6 makes the next phase state unique.
  a_one_target: assert property (@(posedge cl2) disable iff (!rst_n) en |-> $onehot(go))
    else $error("phase_register: %0d transition targets active", $countones(go));

  // The assignment must allow the shift-register realization.
  if (SHIFT && P > 1) begin : g_chk
    a_shiftable: assert property (@(posedge cl2) disable iff (!rst_n)
                                  en |-> target[P-1:1] == y[P-2:0])
      else $error("phase_register: transition to code %b not reachable by a shift from %b",
                  target, y);
  end

endmodule

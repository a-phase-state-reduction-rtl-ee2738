// tb_rule3_feedback: the separation rule for a jump on an input that the
// unit's own output changes asynchronously, run on two control units built
// from the same flow-chart fragment.
//
// Fragment: wait go; if x_i { z_m set; wait x_j } else { z_l set }; stop.
//   x0 = go, x1 = x_i, x2 = x_j;  z0 = z_m, z1 = z_l.
// The environment drops x_i as soon as z_m is set (x_i = ready and not z_m),
// which is the situation the rule is about. Unit A has a phase-state
// boundary between the jump on x_i and the wait on x_j; unit B has both in
// one phase state. While unit B waits for x_j its phase state repeats, CL1
// samples the changed x_i and the next CL2 also sets z_l, against the flow
// chart. The test checks that unit A follows the flow chart on both paths
// and for any wait length, and that unit B shows the predicted wrong z_l.
module tb_rule3_feedback;
  import cu_pkg::*;

  localparam int unsigned NT_A = 5;
  localparam term_t [NT_A-1:0] TERMS_A = '{
    mk(2, 4, 4, 0, 0, ACT_GOTO,  3),   // F2: wait x_j -> F3
    mk(1, 2, 0, 0, 0, ACT_GOTO,  3),   // F1, x_i=0 -> F3
    mk(1, 2, 0, 0, 0, ACT_SET_Z, 1),   // F1, x_i=0: z_l set
    mk(1, 2, 2, 0, 0, ACT_GOTO,  2),   // F1, x_i=1 -> F2
    mk(1, 2, 2, 0, 0, ACT_SET_Z, 0)    // F1, x_i=1: z_m set
  };
  localparam int unsigned NT_B = 4;
  localparam term_t [NT_B-1:0] TERMS_B = '{
    mk(1, 2, 0, 0, 0, ACT_GOTO,  2),   // F1, x_i=0 -> F2
    mk(1, 2, 0, 0, 0, ACT_SET_Z, 1),   // F1, x_i=0: z_l set
    mk(1, 6, 6, 0, 0, ACT_GOTO,  2),   // F1, x_i=1, x_j -> F2
    mk(1, 2, 2, 0, 0, ACT_SET_Z, 0)    // F1, x_i=1: z_m set
  };
  // The shared F0 exit on go is added in front of both tables.
  localparam term_t GO = mk(0, 1, 1, 0, 0, ACT_GOTO, 1);
  localparam term_t [NT_A:0] FULL_A = {TERMS_A, GO};
  localparam term_t [NT_B:0] FULL_B = {TERMS_B, GO};

  localparam logic [3:0][1:0] CODES_A = '{2'd3, 2'd2, 2'd1, 2'd0};
  localparam logic [2:0][1:0] CODES_B = '{2'd2, 2'd1, 2'd0};

  logic cl1 = 1'b0, cl2 = 1'b0, rst_n = 1'b1;
  logic go = 1'b0, x_j = 1'b0, ready = 1'b0;
  logic [2:0] x_a, x_b;
  logic [1:0] z_a, z_b, y_a, y_b;
  logic [0:0] v_a, v_b;
  logic [3:0] f_a;
  logic [2:0] f_b;
  logic fc_a, fc_b;
  int checks = 0, failures = 0, n_hazard = 0, n_wait = 0, n_mpath = 0, n_lpath = 0;

  // Asynchronous feedback: x_i follows z_m through the environment.
  assign x_a = {x_j, ready & ~z_a[0], go};
  assign x_b = {x_j, ready & ~z_b[0], go};

  control_unit #(.NX(3), .NZ(2), .NV(1), .NF(4), .P(2), .NT(NT_A + 1), .TERMS(FULL_A),
                 .CODES(CODES_A), .INIT(0), .SHIFT(1'b0)) u_a (
    .cl1(cl1), .cl2(cl2), .rst_n(rst_n), .x(x_a), .z(z_a), .v(v_a), .y(y_a), .f(f_a), .fc(fc_a));

  control_unit #(.NX(3), .NZ(2), .NV(1), .NF(3), .P(2), .NT(NT_B + 1), .TERMS(FULL_B),
                 .CODES(CODES_B), .INIT(0), .SHIFT(1'b0)) u_b (
    .cl1(cl1), .cl2(cl2), .rst_n(rst_n), .x(x_b), .z(z_b), .v(v_b), .y(y_b), .f(f_b), .fc(fc_b));

  task automatic cycle();
    #2 cl1 = 1'b1;
    #2 cl1 = 1'b0;
    #2 cl2 = 1'b1;
    #2 cl2 = 1'b0;
    #2;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: z_a=%b f_a=%b z_b=%b f_b=%b", what, z_a, f_a, z_b, f_b);
    end
  endtask

  initial begin
    for (int trial = 0; trial < 40; trial++) begin
      int wait_len;
      wait_len = $urandom % 6;
      go = 1'b0; x_j = 1'b0; ready = trial[0];
      #1 rst_n = 1'b0;
      #1 rst_n = 1'b1;
      chk(z_a == '0 && z_b == '0 && f_a == 4'b0001 && f_b == 3'b001 && !fc_a && !fc_b, "reset");
      go = 1'b1;
      cycle();                          // F0 -> F1
      chk(f_a == 4'b0010 && f_b == 3'b010 && y_a == 2'd1 && y_b == 2'd1, "enter F1");
      cycle();                          // jump on x_i
      if (ready) begin
        n_mpath++;
        chk(z_a == 2'b01 && f_a == 4'b0100, "A: z_m set, waiting for x_j");
        chk(z_b == 2'b01 && f_b == 3'b010, "B: z_m set, same phase state");
        chk(x_a[1] == 1'b0 && x_b[1] == 1'b0, "x_i dropped after z_m");
        cycle();
        chk(z_a == 2'b01 && f_a == 4'b0100, "A: still waiting, z_l untouched");
        chk(z_b == 2'b11 && f_b == 3'b100, "B: erroneous z_l set as predicted");
        if (z_b == 2'b11) n_hazard++;
        for (int w = 0; w < wait_len; w++) begin
          cycle();
          n_wait++;
          chk(z_a == 2'b01 && f_a == 4'b0100 && !fc_a, "A: wait with clock inhibited");
        end
        x_j = 1'b1;
        cycle();
        chk(z_a == 2'b01 && f_a == 4'b1000, "A: end after x_j");
      end else begin
        n_lpath++;
        chk(z_a == 2'b10 && f_a == 4'b1000, "A: z_l path");
        chk(z_b == 2'b10 && f_b == 3'b100, "B: z_l path");
      end
      cycle();
      chk(f_a == 4'b1000 && !fc_a && y_a == 2'd3 && y_b == 2'd2
          && v_a == '0 && v_b == '0, "both stay at end");
    end
    chk(n_hazard > 0 && n_wait > 0 && n_mpath > 0 && n_lpath > 0, "all paths exercised");
    $display("m-path=%0d l-path=%0d waits=%0d hazards shown by unseparated unit=%0d",
             n_mpath, n_lpath, n_wait, n_hazard);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

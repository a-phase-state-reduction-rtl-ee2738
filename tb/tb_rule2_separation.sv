// tb_rule2_separation: the separation rule for an internal-variable test
// followed by an input wait, run on two control units built from the same
// flow-chart fragment.
//
// Fragment: wait go; if mode then v set. Then: if v = 1 { z_k set; v reset;
// wait x_j } else { z_l set }; stop.
//   x0 = go, x1 = x_j, x2 = mode;  z0 = z_k, z1 = z_l;  v0 = v.
// Unit A is separated as the rule demands: a phase-state transition lies
// between the test of v and the wait on x_j (F1 tests v, F2 waits, F3 is the
// end). Unit B puts the test of v and the wait in one phase state. With v = 1
// and x_j = 0, unit B sets z_k and resets v on the first CL2, stays in the
// same phase state because x_j is 0, and on the next CL2 sees v = 0 and also
// sets z_l, which the flow chart never does on that path. The test checks
// that unit A follows the flow chart for both values of mode and any length
// of the wait, and that unit B shows exactly the erroneous z_l that the rule
// is there to prevent. Both units use a plain loaded phase register with
// binary codes.
module tb_rule2_separation;
  import cu_pkg::*;

  // Unit A: separated.
  localparam int unsigned NT_A = 8;
  localparam term_t [NT_A-1:0] TERMS_A = '{
    mk(2, 2, 2, 0, 0, ACT_GOTO,    3),   // F2: wait x_j -> F3
    mk(1, 0, 0, 1, 0, ACT_GOTO,    3),   // F1, v=0 -> F3
    mk(1, 0, 0, 1, 0, ACT_SET_Z,   1),   // F1, v=0: z_l set
    mk(1, 0, 0, 1, 1, ACT_GOTO,    2),   // F1, v=1 -> F2
    mk(1, 0, 0, 1, 1, ACT_RESET_V, 0),   // F1, v=1: v reset
    mk(1, 0, 0, 1, 1, ACT_SET_Z,   0),   // F1, v=1: z_k set
    mk(0, 1, 1, 0, 0, ACT_GOTO,    1),   // F0, go -> F1
    mk(0, 5, 5, 0, 0, ACT_SET_V,   0)    // F0, go, mode: v set
  };
  localparam logic [3:0][1:0] CODES_A = '{2'd3, 2'd2, 2'd1, 2'd0};

  // Unit B: test of v and wait on x_j in one phase state.
  localparam int unsigned NT_B = 7;
  localparam term_t [NT_B-1:0] TERMS_B = '{
    mk(1, 0, 0, 1, 0, ACT_GOTO,    2),   // F1, v=0 -> F2
    mk(1, 0, 0, 1, 0, ACT_SET_Z,   1),   // F1, v=0: z_l set
    mk(1, 2, 2, 1, 1, ACT_GOTO,    2),   // F1, v=1, x_j -> F2
    mk(1, 0, 0, 1, 1, ACT_RESET_V, 0),   // F1, v=1: v reset
    mk(1, 0, 0, 1, 1, ACT_SET_Z,   0),   // F1, v=1: z_k set
    mk(0, 1, 1, 0, 0, ACT_GOTO,    1),   // F0, go -> F1
    mk(0, 5, 5, 0, 0, ACT_SET_V,   0)    // F0, go, mode: v set
  };
  localparam logic [2:0][1:0] CODES_B = '{2'd2, 2'd1, 2'd0};

  logic cl1 = 1'b0, cl2 = 1'b0, rst_n = 1'b1;
  logic [2:0] x = '0;
  logic [1:0] z_a, z_b, y_a, y_b;
  logic [0:0] v_a, v_b;
  logic [3:0] f_a;
  logic [2:0] f_b;
  logic fc_a, fc_b;
  int checks = 0, failures = 0, n_hazard = 0, n_wait = 0, n_kpath = 0, n_lpath = 0;

  control_unit #(.NX(3), .NZ(2), .NV(1), .NF(4), .P(2), .NT(NT_A), .TERMS(TERMS_A),
                 .CODES(CODES_A), .INIT(0), .SHIFT(1'b0)) u_a (
    .cl1(cl1), .cl2(cl2), .rst_n(rst_n), .x(x), .z(z_a), .v(v_a), .y(y_a), .f(f_a), .fc(fc_a));

  control_unit #(.NX(3), .NZ(2), .NV(1), .NF(3), .P(2), .NT(NT_B), .TERMS(TERMS_B),
                 .CODES(CODES_B), .INIT(0), .SHIFT(1'b0)) u_b (
    .cl1(cl1), .cl2(cl2), .rst_n(rst_n), .x(x), .z(z_b), .v(v_b), .y(y_b), .f(f_b), .fc(fc_b));

  task automatic cycle();
    #2 cl1 = 1'b1;
    #2 cl1 = 1'b0;
    #2 cl2 = 1'b1;
    #2 cl2 = 1'b0;
    #2;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int trial = 0; trial < 40; trial++) begin
      logic mode;
      int wait_len;
      mode = trial[0];
      wait_len = $urandom % 6;
      x = '0;
      #1 rst_n = 1'b0;
      #1 rst_n = 1'b1;
      chk(z_a == '0 && z_b == '0 && f_a == 4'b0001 && f_b == 3'b001 && fc_b == 1'b0, "reset");
      x = {mode, 1'b0, 1'b1};          // go = 1, x_j = 0
      cycle();                          // F0 -> F1, v = mode
      chk(f_a == 4'b0010 && f_b == 3'b010 && v_a[0] == mode && v_b[0] == mode, "enter F1");
      cycle();                          // test of v
      if (mode) begin
        n_kpath++;
        chk(z_a == 2'b01 && v_a[0] == 1'b0 && f_a == 4'b0100, "A: z_k set, v reset, waiting");
        chk(z_b == 2'b01 && v_b[0] == 1'b0 && f_b == 3'b010, "B: z_k set, v reset, same phase");
        cycle();                        // x_j still 0
        chk(z_a == 2'b01 && f_a == 4'b0100, "A: still waiting, z_l untouched");
        // The unseparated unit takes the v = 0 branch on the second CL2.
        chk(z_b == 2'b11 && f_b == 3'b100, "B: erroneous z_l set as predicted");
        if (z_b == 2'b11) n_hazard++;
        for (int w = 0; w < wait_len; w++) begin
          cycle();
          n_wait++;
          chk(z_a == 2'b01 && f_a == 4'b0100 && fc_a == 1'b0, "A: wait with clock inhibited");
        end
        x[1] = 1'b1;                    // x_j arrives
        cycle();
        chk(z_a == 2'b01 && f_a == 4'b1000, "A: end after x_j");
      end else begin
        n_lpath++;
        chk(z_a == 2'b10 && f_a == 4'b1000, "A: z_l path");
        chk(z_b == 2'b10 && f_b == 3'b100, "B: z_l path");
      end
      cycle();
      chk(f_a == 4'b1000 && fc_a == 1'b0 && y_a == 2'd3 && y_b == 2'd2, "A: stays at end, B at end");
    end
    chk(n_hazard > 0 && n_wait > 0 && n_kpath > 0 && n_lpath > 0, "all paths exercised");
    $display("k-path=%0d l-path=%0d waits=%0d hazards shown by unseparated unit=%0d",
             n_kpath, n_lpath, n_wait, n_hazard);
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

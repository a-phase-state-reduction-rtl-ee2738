// tb_control_unit: end-to-end test of the control unit at its default
// parameters (the example handshake flow chart, shift-register phase
// register).
//
// The two clocks are generated as non-overlapping phases: the inputs change,
// CL1 samples them, then CL2 updates the flip-flops. A behavioural model of
// the flow chart, written as a plain case statement over the phase-state
// number and independent of the term table and of the state codes, steps on
// every CL2 edge; outputs, internal variable, phase-state variables, state
// code and the clock enable f_c are compared after every edge. Inputs are
// random, with start, ack and mode held for random stretches so that every
// wait instruction waits and both branches of the conditional jump are
// taken. Each mechanism is counted and must occur: waits in F0, F2 and F3
// (clock inhibited), the repeat branch F3->F1, the exit branch F3->F4, the
// delay phase F4 (exactly one CL2 period), the internal-variable set and
// reset, a complete request ending in done, and an asynchronous reset in the
// middle of a run.
module tb_control_unit;
  import cu_pkg::*;

  logic cl1 = 1'b0, cl2 = 1'b0, rst_n = 1'b1;
  logic [2:0] x = '0;
  logic [2:0] z;
  logic [0:0] v;
  logic [2:0] y;
  logic [5:0] f;
  logic fc;

  control_unit dut (
    .cl1(cl1), .cl2(cl2), .rst_n(rst_n), .x(x), .z(z), .v(v), .y(y), .f(f), .fc(fc)
  );

  // Reference model state.
  int   ph;
  logic req, busy, done, rep;
  logic [2:0] xs;       // inputs as sampled by CL1
  logic exp_fc;
  int checks = 0, failures = 0;
  int n_wait0 = 0, n_wait2 = 0, n_wait3 = 0, n_repeat = 0, n_exit = 0;
  int n_delay = 0, n_vset = 0, n_vreset = 0, n_done = 0, n_reset = 0, n_cycles = 0;
  int f4_len = 0;

  localparam logic [5:0][2:0] CODE = '{3'b100, 3'b010, 3'b101, 3'b110, 3'b011, 3'b001};

  // One flow-chart step, as the flow chart reads.
  task automatic model_step();
    logic start, ack, mode;
    start = xs[0]; ack = xs[1]; mode = xs[2];
    exp_fc = 1'b1;
    case (ph)
      0: if (start) begin busy = 1; done = 0; ph = 1; end
         else begin exp_fc = 0; n_wait0++; end
      1: begin req = 1; if (mode) begin rep = 1; n_vset++; end ph = 2; end
      2: if (ack) begin req = 0; ph = 3; end
         else begin exp_fc = 0; n_wait2++; end
      3: if (!ack) begin
           if (rep) begin rep = 0; ph = 1; n_repeat++; n_vreset++; end
           else begin ph = 4; n_exit++; end
         end else begin exp_fc = 0; n_wait3++; end
      4: begin ph = 5; n_delay++; end
      default: begin busy = 0; done = 1; ph = 0; n_done++; end
    endcase
  endtask

  task automatic model_reset();
    ph = 0; req = 0; busy = 0; done = 0; rep = 0; xs = '0;
  endtask

  task automatic compare(string when);
    checks++;
    if (z !== {done, busy, req} || v[0] !== rep || f !== (6'd1 << ph) || y !== CODE[ph]) begin
      failures++;
      $display("FAIL %s cycle %0d: z=%b v=%b f=%b y=%b, expected z=%b v=%b F%0d y=%b",
               when, n_cycles, z, v, f, y, {done, busy, req}, rep, ph, CODE[ph]);
    end
  endtask

  // Input stimulus: each input keeps its value for a random stretch.
  int hold_s = 0, hold_a = 0, hold_m = 0;
  task automatic drive_inputs();
    if (hold_s == 0) begin x[0] = ($urandom % 3) == 0; hold_s = 1 + $urandom % 6; end
    if (hold_a == 0) begin x[1] = 1'($urandom % 2);       hold_a = 1 + $urandom % 5; end
    if (hold_m == 0) begin x[2] = ($urandom % 4) == 0; hold_m = 1 + $urandom % 8; end
    hold_s--; hold_a--; hold_m--;
  endtask

  task automatic cycle();
    drive_inputs();
    #2 cl1 = 1'b1; xs = x;
    #2 cl1 = 1'b0;
    #1 checks++;   // f_c is evaluated between CL1 and CL2
    model_step();
    if (fc !== exp_fc) begin
      failures++;
      $display("FAIL cycle %0d: f_c=%b expected %b", n_cycles, fc, exp_fc);
    end
    #1 cl2 = 1'b1;
    #1 compare("after CL2");
    // Delay instruction: F4 lasts exactly one CL2 period.
    if (ph == 4) f4_len++;
    else if (f4_len != 0) begin
      checks++;
      if (f4_len != 1) begin failures++; $display("FAIL delay phase lasted %0d", f4_len); end
      f4_len = 0;
    end
    #3 cl2 = 1'b0;
    n_cycles++;
  endtask

  localparam int NCYC = 4000;

  initial begin
    model_reset();
    #1 rst_n = 1'b0;
    #1 compare("reset");
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      cycle();
      if (n == NCYC / 2) begin
        // Asynchronous reset in the middle of a run: back to F0, flags cleared.
        #1 rst_n = 1'b0;
        model_reset();
        #1 compare("mid-run reset");
        n_reset++;
        rst_n = 1'b1;
      end
    end
    $display("mechanisms: wait F0=%0d wait F2=%0d wait F3=%0d repeat=%0d exit=%0d delay=%0d v-set=%0d v-reset=%0d done=%0d reset=%0d",
             n_wait0, n_wait2, n_wait3, n_repeat, n_exit, n_delay, n_vset, n_vreset, n_done, n_reset);
    foreach (n_cnt[i]) begin
      checks++;
      if (n_cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_cnt[10];
  always_comb begin
    n_cnt = '{n_wait0, n_wait2, n_wait3, n_repeat, n_exit, n_delay, n_vset, n_vreset, n_done, n_reset};
  end

  initial begin
    #((NCYC + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

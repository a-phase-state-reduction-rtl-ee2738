// tb_phase_register: self-checking test of the phase register.
// Instance 1 is the default shift-register realization with the example
// assignment (F0..F5 = 001,011,110,101,010,100); it is walked along random
// legal transitions of the example flow chart (0->1, 1->2, 2->3, 3->1, 3->4,
// 4->5, 5->0) with random clock enables. Instance 2 is a plain loaded
// register (SHIFT=0) with five phase states in binary code, walked along
// arbitrary transitions. The state must follow the reference only on enabled
// CL2 edges, and the decoded phase-state variables must be one-hot.
module tb_phase_register;
  logic cl2 = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0, n_moves = 0, n_held = 0, n_bin_moves = 0;

  // Shift-register instance with the example assignment.
  localparam logic [5:0][2:0] CODES = '{3'b100, 3'b010, 3'b101, 3'b110, 3'b011, 3'b001};
  logic en_s; logic [5:0] go_s, f_s; logic [2:0] y_s;
  int ph_s;
  phase_register dut_s (.cl2(cl2), .rst_n(rst_n), .en(en_s), .go(go_s), .y(y_s), .f(f_s));

  // Loaded instance, five states, binary codes, initial state 2.
  localparam logic [4:0][2:0] BCODES = '{3'd4, 3'd3, 3'd2, 3'd1, 3'd0};
  logic en_b; logic [4:0] go_b, f_b; logic [2:0] y_b;
  int ph_b;
  phase_register #(.NF(5), .P(3), .CODES(BCODES), .INIT(2), .SHIFT(1'b0)) dut_b (
    .cl2(cl2), .rst_n(rst_n), .en(en_b), .go(go_b), .y(y_b), .f(f_b));

  function automatic int pick_next(int ph);
    case (ph)
      0: return 1;
      1: return 2;
      2: return 3;
      3: return (($urandom % 2) != 0) ? 1 : 4;
      4: return 5;
      default: return 0;
    endcase
  endfunction

  task automatic check_state();
    checks += 4;
    if (y_s !== CODES[ph_s]) begin failures++; $display("FAIL shift y=%b exp %b", y_s, CODES[ph_s]); end
    if (f_s !== (6'd1 << ph_s)) begin failures++; $display("FAIL shift f=%b exp F%0d", f_s, ph_s); end
    if (y_b !== BCODES[ph_b]) begin failures++; $display("FAIL bin y=%b exp %b", y_b, BCODES[ph_b]); end
    if (f_b !== (5'd1 << ph_b)) begin failures++; $display("FAIL bin f=%b exp F%0d", f_b, ph_b); end
  endtask

  initial begin
    en_s = 1'b0; go_s = '0; en_b = 1'b0; go_b = '0;
    ph_s = 0; ph_b = 2;
    #1 rst_n = 1'b0;
    #1 check_state();
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      int nx_s, nx_b;
      nx_s = pick_next(ph_s);
      nx_b = $urandom % 5;
      en_s = ($urandom % 3) != 0;
      en_b = ($urandom % 3) != 0;
      go_s = en_s ? (6'd1 << nx_s) : 6'($urandom);
      go_b = en_b ? (5'd1 << nx_b) : 5'($urandom);
      #2 cl2 = 1'b1;
      if (en_s) begin ph_s = nx_s; n_moves++; end else n_held++;
      if (en_b) begin ph_b = nx_b; n_bin_moves++; end
      #1 check_state();
      #2 cl2 = 1'b0;
    end
    checks++;
    if (n_moves == 0 || n_held == 0 || n_bin_moves == 0) failures++;
    rst_n = 1'b0; ph_s = 0; ph_b = 2;
    #1 check_state();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_jk_register: self-checking test of the J-K flip-flop bank.
// Random J/K patterns (never J and K on the same bit, as a correctly
// separated flow chart guarantees) are applied on CL2 edges and the state is
// compared with a reference that applies set, reset and hold bit by bit.
module tb_jk_register;
  localparam int unsigned N = 8;
  logic cl2 = 1'b0, rst_n = 1'b1;
  logic [N-1:0] j = '0, k = '0, q, ref_q;
  int checks = 0, failures = 0, n_set = 0, n_reset = 0;

  jk_register #(.N(N)) dut (.cl2(cl2), .rst_n(rst_n), .j(j), .k(k), .q(q));

  initial begin
    ref_q = '0;
    #1 rst_n = 1'b0;
    #1 checks++;
    if (q !== '0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      j = N'($urandom) & N'($urandom);
      k = N'($urandom) & N'($urandom) & ~j;
      #2 cl2 = 1'b1;
      for (int b = 0; b < N; b++) begin
        if (j[b]) begin ref_q[b] = 1'b1; n_set++; end
        else if (k[b]) begin ref_q[b] = 1'b0; n_reset++; end
      end
      #1 checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL step %0d: j=%b k=%b q=%b expected %b", n, j, k, q, ref_q);
      end
      #2 cl2 = 1'b0;
    end
    checks++;
    if (n_set == 0 || n_reset == 0) failures++;
    rst_n = 1'b0;
    #1 checks++;
    if (q !== '0) failures++;
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

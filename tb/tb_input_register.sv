// tb_input_register: self-checking test of the CL1 input flip-flops.
// Random inputs are applied; the sampled value must change only on a CL1
// edge, hold across input changes between edges, and clear on reset.
module tb_input_register;
  localparam int unsigned NX = 8;
  logic cl1 = 1'b0, rst_n = 1'b1;
  logic [NX-1:0] x_in = '0, x_q, expect_q;
  int checks = 0, failures = 0;

  input_register #(.NX(NX)) dut (.cl1(cl1), .rst_n(rst_n), .x_in(x_in), .x_q(x_q));

  task automatic chk(logic [NX-1:0] exp, string what);
    checks++;
    if (x_q !== exp) begin
      failures++;
      $display("FAIL %s: x_q=%h expected %h", what, x_q, exp);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1 chk('0, "reset");
    rst_n = 1'b1;
    expect_q = '0;
    for (int n = 0; n < 200; n++) begin
      x_in = NX'($urandom);
      #2 chk(expect_q, "hold before edge");
      cl1 = 1'b1; expect_q = x_in;
      #1 chk(expect_q, "sample on edge");
      x_in = NX'($urandom);
      #1 chk(expect_q, "hold after input change");
      cl1 = 1'b0;
      #1;
    end
    rst_n = 1'b0;
    #1 chk('0, "asynchronous reset");
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

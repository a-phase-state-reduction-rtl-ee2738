// tb_clock_inhibitor: self-checking test of the f_c enable.
// Random transition matrices (sparse, with and without self terms) are
// applied; f_c must be 1 exactly when some f_{i-j} with i != j is 1, so a
// matrix holding only self terms f_{i-i} must leave the clock inhibited.
module tb_clock_inhibitor;
  localparam int unsigned NF = 6;
  logic [NF-1:0][NF-1:0] tr;
  logic cl_en, expect_en;
  int checks = 0, failures = 0, n_self_only = 0, n_on = 0;

  clock_inhibitor #(.NF(NF)) dut (.tr(tr), .cl_en(cl_en));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [NF*NF-1:0] flat, diag;
      diag = '0;
      for (int i = 0; i < NF; i++) diag[i*NF+i] = 1'b1;
      unique case (n % 4)
        0: flat = '0;
        1: flat = diag & (NF*NF)'({$urandom, $urandom});
        2: flat = (NF*NF)'(1) << ($urandom % (NF*NF));
        default: flat = (NF*NF)'({$urandom, $urandom}) & (NF*NF)'({$urandom, $urandom})
                        & (NF*NF)'({$urandom, $urandom});
      endcase
      tr = flat;
      expect_en = (flat & ~diag) != '0;
      if (!expect_en && (flat != '0)) n_self_only++;
      if (expect_en) n_on++;
      #1 checks++;
      if (cl_en !== expect_en) begin
        failures++;
        $display("FAIL: tr=%h f_c=%b expected %b", flat, cl_en, expect_en);
      end
    end
    checks++;
    if (n_self_only == 0 || n_on == 0) failures++;
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

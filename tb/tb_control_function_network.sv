// tb_control_function_network: self-checking test of the two-level control
// functions with the default (example handshake) term table.
// Every combination of phase state (including none), inputs and internal
// variable is applied, and all J-K inputs and transition conditions are
// compared with Boolean equations written out by hand from the example flow
// chart:
//   J_req  = F1          K_req  = F2 ack
//   J_busy = F0 start    K_busy = F5
//   J_done = F5          K_done = F0 start
//   J_v0   = F1 mode     K_v0   = F3 !ack v0
//   f_0-1 = F0 start, f_1-2 = F1, f_2-3 = F2 ack, f_3-1 = F3 !ack v0,
//   f_3-4 = F3 !ack !v0, f_4-5 = F4, f_5-0 = F5
module tb_control_function_network;
  import cu_pkg::*;
  localparam int unsigned NF = EX_NF;
  logic [NF-1:0] f;
  logic [2:0] x;
  logic [0:0] v;
  logic [2:0] jz, kz, ejz, ekz;
  logic [0:0] jv, kv, ejv, ekv;
  logic [NF-1:0][NF-1:0] tr, etr;
  int checks = 0, failures = 0;

  control_function_network dut (
    .f(f), .x(x), .v(v), .jz(jz), .kz(kz), .jv(jv), .kv(kv), .tr(tr)
  );

  initial begin
    for (int ph = -1; ph < int'(NF); ph++) begin
      for (int xi = 0; xi < 8; xi++) begin
        for (int vi = 0; vi < 2; vi++) begin
          logic start, ack, mode, v0;
          f = (ph < 0) ? '0 : (NF'(1) << ph);
          x = 3'(xi);
          v = 1'(vi);
          start = x[0]; ack = x[1]; mode = x[2]; v0 = v[0];
          ejz = {f[5], 1'b0, f[1]} | {1'b0, f[0] & start, 1'b0};
          ekz = {f[0] & start, f[5], f[2] & ack};
          ejv = f[1] & mode;
          ekv = f[3] & !ack & v0;
          etr = '0;
          etr[0][1] = f[0] & start;
          etr[1][2] = f[1];
          etr[2][3] = f[2] & ack;
          etr[3][1] = f[3] & !ack & v0;
          etr[3][4] = f[3] & !ack & !v0;
          etr[4][5] = f[4];
          etr[5][0] = f[5];
          #1;
          checks += 5;
          if (jz !== ejz) begin failures++; $display("FAIL jz f=%b x=%b v=%b: %b exp %b", f, x, v, jz, ejz); end
          if (kz !== ekz) begin failures++; $display("FAIL kz f=%b x=%b v=%b: %b exp %b", f, x, v, kz, ekz); end
          if (jv !== ejv) begin failures++; $display("FAIL jv f=%b x=%b v=%b: %b exp %b", f, x, v, jv, ejv); end
          if (kv !== ekv) begin failures++; $display("FAIL kv f=%b x=%b v=%b: %b exp %b", f, x, v, kv, ekv); end
          if (tr !== etr) begin failures++; $display("FAIL tr f=%b x=%b v=%b: %h exp %h", f, x, v, tr, etr); end
        end
      end
    end
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

// tb_gf_square: checks the squarer (with its reduction) on random elements,
// 0, 1 and z^k for every k against the reference multiplier, and checks
// that squaring m times returns the operand (Frobenius map of order m).
module tb_gf_square;
  import tb_gf_ref::*;
  int checks = 0, failures = 0;
  fe_t a, s;

  gf_square dut (.dt1(a), .s_out(s));

  task automatic check();
    #1;
    checks++;
    if (s !== gf_mul(a, a)) begin
      failures++;
      $display("FAIL square %h -> %h, expected %h", a, s, gf_mul(a, a));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t a0;
    a = '0; check();
    a = fe_t'(1); check();
    for (int k = 0; k < M; k++) begin
      a = fe_t'(1) << k;
      check();
    end
    for (int t = 0; t < 200; t++) begin
      a = rand_fe();
      check();
    end
    a0 = rand_fe();
    a  = a0;
    for (int k = 0; k < M; k++) begin
      #1 a = s;
    end
    #1;
    checks++;
    if (a !== a0) begin
      failures++;
      $display("FAIL a^(2^m) != a");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

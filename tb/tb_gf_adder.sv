// tb_gf_adder: checks the GF(2^m) adder on random operands against a
// bit-by-bit modulo-2 sum, including the identities a + a = 0 and a + 0 = a.
module tb_gf_adder;
  import tb_gf_ref::*;
  int checks = 0, failures = 0;
  fe_t a, b, s, ref_s;

  gf_adder dut (.dt1(a), .dt2(b), .a_out(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      a = rand_fe();
      b = (t % 3 == 0) ? a : (t % 3 == 1) ? '0 : rand_fe();
      #1;
      for (int i = 0; i < M; i++) ref_s[i] = (a[i] + b[i]) % 2;
      checks++;
      if (s !== ref_s) begin
        failures++;
        $display("FAIL add %h + %h = %h, expected %h", a, b, s, ref_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

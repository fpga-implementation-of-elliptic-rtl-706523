// tb_nist_reduce: checks the fast reduction on random 2m-1 bit polynomials,
// on single-coefficient polynomials z^k for every k and on the all-ones
// polynomial, against a bit-serial reduction modulo the pentanomial.
module tb_nist_reduce;
  import tb_gf_ref::*;
  int checks = 0, failures = 0;
  fe2_t c;
  fe_t  r;

  nist_reduce dut (.c(c), .r(r));

  task automatic check();
    #1;
    checks++;
    if (r !== gf_reduce(c)) begin
      failures++;
      $display("FAIL reduce %h -> %h, expected %h", c, r, gf_reduce(c));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2 * M - 1; k++) begin
      c = fe2_t'(1) << k;
      check();
    end
    c = '1;
    check();
    for (int t = 0; t < 300; t++) begin
      c = {rand_fe(), rand_fe()} >> 1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

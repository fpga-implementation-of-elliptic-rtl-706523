// tb_gf_mult: checks the bit-serial multiplier. For each pair of operands en
// is held for m cycles; done must rise exactly in the m-th cycle (latency m)
// and never earlier, and m_out must equal the reference product. Products
// are run back to back to check the counter restarts, and special operands
// (0, 1, all ones, z^(m-1)) are included.
module tb_gf_mult;
  import tb_gf_ref::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  fe_t  a, b, p;
  logic done;

  gf_mult dut (.clk, .rst, .en, .dt1(a), .dt2(b), .done, .m_out(p));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t x, fe_t y);
    int cyc = 1;
    a  = x;
    b  = y;
    en = 1;
    #1;
    while (!done && cyc <= M + 2) begin
      @(negedge clk);
      #1;
      cyc++;
    end
    checks++;
    if (cyc != M) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, M);
    end
    checks++;
    if (p !== gf_mul(x, y)) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, gf_mul(x, y));
    end
    @(negedge clk);
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run('0, rand_fe());
    run(fe_t'(1), REF_GX);
    run(REF_GY, fe_t'(1));
    run('1, '1);
    run(fe_t'(1) << (M - 1), fe_t'(1) << (M - 1));
    for (int t = 0; t < 40; t++) run(rand_fe(), rand_fe());
    @(negedge clk) en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

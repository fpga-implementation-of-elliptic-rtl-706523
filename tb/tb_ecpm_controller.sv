// tb_ecpm_controller: runs the ECPM controller (with its inversion
// sequencer) against a behavioural datapath and checks the point
// multiplication it sequences: the affine result left in X1 / T1 must equal
// the reference double-and-add result d*P, the cycle count from start to
// done must be 6 + (m-1)(6m+8) + 2(10m-1) + 9m + 7, and the instruction mix
// must be 6 multiplications, 3 additions and 5 squarings per key bit. Both
// key-bit values occur in the random scalars; busy and the done pulse are
// checked as well.
module tb_ecpm_controller;
  import tb_gf_ref::*;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  fe_t  d, xp, yp;
  instr_t instr;
  logic busy, done, mul_done;
  int n_add, n_sqr, n_mul, n_bad;

  localparam int EXP_CYC = 6 + (M - 1) * (6 * M + 8) + 2 * (10 * M - 1) + 9 * M + 7;

  ecpm_controller dut (.clk, .rst, .start, .d, .mul_done, .instr, .busy, .done);
  tb_dp_model dp (.clk, .rst, .instr, .xp, .yp, .mul_done, .n_add, .n_sqr, .n_mul, .n_bad);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * EXP_CYC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(fe_t k, pt_t p);
    int  cyc = 0, a0, s0, m0;
    pt_t q;
    q = pt_mul(k, p);
    @(negedge clk);
    a0 = n_add; s0 = n_sqr; m0 = n_mul;
    d = k; xp = p.x; yp = p.y;
    start = 1;
    @(negedge clk);
    start = 0;
    d = rand_fe();  // the scalar is latched at start
    chk(busy, "busy after start");
    cyc = 1;
    while (!done && cyc < EXP_CYC + 10) begin
      @(negedge clk);
      cyc++;
    end
    chk(cyc == EXP_CYC + 1, $sformatf("done after %0d cycles, expected %0d", cyc - 1, EXP_CYC));
    chk(!busy, "busy together with done");
    chk(dp.regs[R_X1] == q.x, $sformatf("x_q %h expected %h", dp.regs[R_X1], q.x));
    chk(dp.regs[R_T1] == q.y, $sformatf("y_q %h expected %h", dp.regs[R_T1], q.y));
    chk(instr.ra == R_X1 && instr.rb == R_T1 && instr.op == OP_NOP, "idle read ports");
    chk(n_mul - m0 == 6 * (M - 1) + 9 + 18, $sformatf("%0d multiplications", n_mul - m0));
    chk(n_add - a0 == 3 * (M - 1) + 3 + 6, $sformatf("%0d additions", n_add - a0));
    chk(n_sqr - s0 == 5 * (M - 1) + 2 + 1 + 2 * (M - 1), $sformatf("%0d squarings", n_sqr - s0));
    chk(n_bad == 0, "instruction changed during a multiplication");
    @(negedge clk);
    chk(!done, "done is a single pulse");
  endtask

  initial begin
    pt_t g, p2;
    fe_t k;
    d = '0; xp = '0; yp = '0;
    g = base_point();
    chk(on_curve(g), "reference base point on curve");
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    k = rand_fe(); k[M-1] = 1'b1;
    run(k, g);
    p2 = pt_mul(rand_fe(), g);
    k = rand_fe(); k[M-1] = 1'b1;
    run(k, p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

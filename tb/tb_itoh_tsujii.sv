// tb_itoh_tsujii: runs the inversion sequencer against a behavioural
// datapath. For random field elements (and 1) it checks that dst holds the
// reference inverse (Fermat), that a * dst = 1, that the source register is
// unchanged, that the sequence used 9 multiplications and m-1 squarings and
// that it took 9m + (m-1) = 1629 cycles from start to done, inclusive.
module tb_itoh_tsujii;
  import tb_gf_ref::*;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [2:0] ra, rbeta, rtmp, rdst;
  instr_t instr;
  logic active, done, mul_done;
  int n_add, n_sqr, n_mul, n_bad;

  itoh_tsujii dut (.clk, .rst, .start, .a_reg(ra), .beta_reg(rbeta), .tmp_reg(rtmp),
                   .dst_reg(rdst), .mul_done, .instr, .active, .done);
  tb_dp_model dp (.clk, .rst, .instr, .xp('0), .yp('0), .mul_done,
                  .n_add, .n_sqr, .n_mul, .n_bad);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  task automatic run(fe_t a, logic [2:0] ia, logic [2:0] ib, logic [2:0] it, logic [2:0] id);
    int cyc = 0, s0, m0;
    @(negedge clk);
    dp.regs[ia] = a;
    ra = ia; rbeta = ib; rtmp = it; rdst = id;
    s0 = n_sqr; m0 = n_mul;
    start = 1;
    do begin
      #1;
      cyc++;
      if (done) break;
      @(negedge clk);
      start = 0;
    end while (cyc < 3000);
    @(negedge clk);
    start = 0;
    chk(cyc == 9 * M + (M - 1), $sformatf("cycles %0d, expected %0d", cyc, 9 * M + M - 1));
    chk(dp.regs[id] == gf_inv(a), $sformatf("inverse of %h is %h", a, dp.regs[id]));
    chk(gf_mul(dp.regs[id], a) == fe_t'(1), "a * a^-1 != 1");
    if (id != ia) chk(dp.regs[ia] == a, "source register modified");
    chk(n_mul - m0 == 9, $sformatf("%0d multiplications", n_mul - m0));
    chk(n_sqr - s0 == M - 1, $sformatf("%0d squarings", n_sqr - s0));
    chk(n_bad == 0, "instruction changed during a multiplication");
    chk(!active, "still active after done");
  endtask

  initial begin
    ra = 0; rbeta = 1; rtmp = 2; rdst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(fe_t'(1), 3'd1, 3'd2, 3'd3, 3'd2);
    run(REF_GX, 3'd1, 3'd2, 3'd3, 3'd2);
    run(rand_fe(), 3'd6, 3'd5, 3'd7, 3'd5);
    run(rand_fe(), 3'd0, 3'd4, 3'd3, 3'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

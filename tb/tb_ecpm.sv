// tb_ecpm: end-to-end test of the point-multiplication unit (DESIGN-I) at
// m = 163. Multiplies the NIST base point and a second curve point by
// random scalars (top bit set) and compares (qx, qy) with the reference
// double-and-add result; checks the result lies on the curve, that the
// latency is 6 + (m-1)(6m+8) + 2(10m-1) + 9m + 7 cycles, that inputs are
// captured at start, and that the result holds after done. Corner scalars
// (only the top bit set, all bits set) are included.
module tb_ecpm;
  import tb_gf_ref::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  fe_t  d, x, y, qx, qy;
  logic busy, done;

  localparam int EXP_CYC = 6 + (M - 1) * (6 * M + 8) + 2 * (10 * M - 1) + 9 * M + 7;

  ecpm dut (.clk, .rst, .start, .d, .x_coord(x), .y_coord(y), .busy, .done, .qx, .qy);

  always #5 clk = ~clk;

  initial begin
    repeat (6 * EXP_CYC) @(posedge clk);
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
    int  cyc;
    pt_t q, r;
    q = pt_mul(k, p);
    @(negedge clk);
    d = k; x = p.x; y = p.y;
    start = 1;
    @(negedge clk);
    start = 0;
    d = rand_fe(); x = rand_fe(); y = rand_fe();
    cyc = 1;
    while (!done && cyc < EXP_CYC + 10) begin
      @(negedge clk);
      cyc++;
    end
    chk(cyc == EXP_CYC + 1, $sformatf("done after %0d cycles, expected %0d", cyc - 1, EXP_CYC));
    chk(qx == q.x, $sformatf("qx %h expected %h", qx, q.x));
    chk(qy == q.y, $sformatf("qy %h expected %h", qy, q.y));
    r.inf = 1'b0; r.x = qx; r.y = qy;
    chk(on_curve(r), "result not on the curve");
    repeat (5) @(negedge clk);
    chk(qx == q.x && qy == q.y && !busy, "result held while idle");
  endtask

  initial begin
    pt_t g, p2;
    fe_t k;
    d = '0; x = '0; y = '0;
    g = base_point();
    chk(on_curve(g), "base point on curve");
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    k = rand_fe(); k[M-1] = 1'b1;
    run(k, g);
    p2 = pt_mul(rand_fe(), g);
    k = rand_fe(); k[M-1] = 1'b1;
    run(k, p2);
    // Corner scalars: only the top bit set (all later bits 0), all ones.
    run(fe_t'(1) << (M - 1), g);
    run('1, p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

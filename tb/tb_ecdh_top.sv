// tb_ecdh_top: end-to-end test of the ECDH key-agreement processor at its
// default size (GF(2^163), NIST B-163), with no parameter overrides.
//
// Two users A and B with random private keys (top bit set) each generate a
// public key (sel = 01, built-in base point), exchange them and each
// generate the shared secret from the other's key (sel = 10). The test
// checks both public keys and both shared secrets against the reference
// double-and-add model, that SK_A = SK_B, the done flags, and the latency
// of every operation (164470 ECPM cycles plus one for the done flag). It
// also issues no-operation requests (sel = 00 and 11), a request while busy,
// and a multiplication of a user-supplied point through the external-point
// path. Each mechanism is counted and must have occurred: public-key and
// shared-key runs, no-operations, ignored requests, ladder steps for key
// bits 0 and 1, and inversions.
module tb_ecdh_top;
  import tb_gf_ref::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, st = 0;
  logic [1:0] sel = 2'b00;
  fe_t d, qss_x, qss_y, r_x, r_y;
  logic d_pm, d_ss, busy;

  localparam int EXP_CYC = 6 + (M - 1) * (6 * M + 8) + 2 * (10 * M - 1) + 9 * M + 7;

  int n_pkg = 0, n_skg = 0, n_nop = 0, n_ignored = 0, n_bit0 = 0, n_bit1 = 0, n_inv = 0;

  ecdh_top dut (.clk, .rst, .st, .sel, .d, .qss_xp(qss_x), .qss_yp(qss_y),
                .r_xp(r_x), .r_yp(r_y), .d_pm, .d_ss, .busy);

  always #5 clk = ~clk;

  // Mechanism counters, observed inside the design.
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_ecpm.u_ctrl.state == 2'd2 && dut.u_ecpm.u_ctrl.step == 5'd0
          && dut.u_ecpm.u_ctrl.adv) begin
        if (dut.u_ecpm.u_ctrl.di) n_bit1++;
        else                      n_bit0++;
      end
      if (dut.u_ecpm.u_ctrl.inv_done) n_inv++;
    end
  end

  initial begin
    repeat (8 * EXP_CYC) @(posedge clk);
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

  // One request; returns the result point.
  task automatic request(logic [1:0] s, fe_t k, pt_t other, output pt_t res);
    int cyc;
    @(negedge clk);
    sel = s; d = k; qss_x = other.x; qss_y = other.y; st = 1;
    @(negedge clk);
    st = 0;
    d = rand_fe(); qss_x = rand_fe(); qss_y = rand_fe();
    cyc = 1;
    // A request while busy must be ignored.
    st = 1; sel = 2'b01;
    @(negedge clk);
    st = 0;
    cyc++;
    if (busy) n_ignored++;
    while (!(d_pm || d_ss) && cyc < EXP_CYC + 10) begin
      @(negedge clk);
      cyc++;
    end
    // cyc counts from the cycle after the st edge: the ECPM latency, one
    // cycle for its done pulse and one for the registered done flag.
    chk(cyc == EXP_CYC + 2, $sformatf("sel=%b finished after %0d cycles, expected %0d",
                                      s, cyc, EXP_CYC + 2));
    chk(d_pm == (s == 2'b01) && d_ss == (s == 2'b10), $sformatf("done flags for sel=%b", s));
    if (s == 2'b01) n_pkg++;
    else            n_skg++;
    res.inf = 1'b0; res.x = r_x; res.y = r_y;
    repeat (3) @(negedge clk);
    chk(!busy, "busy again without a request");
  endtask

  task automatic nop(logic [1:0] s);
    @(negedge clk);
    sel = s; st = 1;
    @(negedge clk);
    st = 0;
    repeat (3) @(negedge clk);
    chk(!busy, $sformatf("sel=%b must not start an operation", s));
    n_nop++;
  endtask

  initial begin
    fe_t da, db, dc;
    pt_t g, qa, qb, ska, skb, ref_qa, ref_qb, ref_sk, p, rp, refp;
    d = '0; qss_x = '0; qss_y = '0;
    g  = base_point();
    da = rand_fe(); da[M-1] = 1'b1;
    db = rand_fe(); db[M-1] = 1'b1;
    ref_qa = pt_mul(da, g);
    ref_qb = pt_mul(db, g);
    ref_sk = pt_mul(da, ref_qb);
    chk(on_curve(g), "base point on the curve");
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    nop(2'b00);
    request(2'b01, da, '0, qa);                      // public key of A
    chk(qa == ref_qa, $sformatf("Q_A %h,%h", qa.x, qa.y));
    nop(2'b11);
    request(2'b01, db, '0, qb);                      // public key of B
    chk(qb == ref_qb, $sformatf("Q_B %h,%h", qb.x, qb.y));
    request(2'b10, da, qb, ska);                     // A: d_A * Q_B
    request(2'b10, db, qa, skb);                     // B: d_B * Q_A
    chk(ska == skb, "shared secrets differ");
    chk(ska == ref_sk, $sformatf("SK %h,%h", ska.x, ska.y));
    chk(on_curve(ska), "shared secret on the curve");

    // A public key on a user-supplied base point goes through M1/M2 = 1.
    p  = pt_mul(rand_fe(), g);
    dc = rand_fe(); dc[M-1] = 1'b1;
    refp = pt_mul(dc, p);
    request(2'b10, dc, p, rp);
    chk(rp == refp, "multiplication of an external point");

    $display("mechanisms: pkg=%0d skg=%0d nop=%0d ignored=%0d bit0=%0d bit1=%0d inv=%0d",
             n_pkg, n_skg, n_nop, n_ignored, n_bit0, n_bit1, n_inv);
    chk(n_pkg == 2 && n_skg == 3, "public/shared key runs");
    chk(n_nop == 2, "no-operation requests");
    chk(n_ignored == 5, "requests ignored while busy");
    chk(n_bit0 > 0 && n_bit1 > 0 && n_bit0 + n_bit1 == 5 * (M - 1), "ladder steps for both bit values");
    chk(n_inv == 10, "two inversions per multiplication");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

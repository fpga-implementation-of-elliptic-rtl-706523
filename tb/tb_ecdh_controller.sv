// tb_ecdh_controller: drives the ECDH controller with a stand-in for the
// ECPM unit that reports done a fixed number of cycles after each start.
// Checks: sel = 00 and 11 start nothing; 01 starts a public-key run with
// M1/M2 on the base point and ends with d_pm; 10 starts a shared-key run
// with M1/M2 on the external key and ends with d_ss; st is ignored while
// busy; the done flags hold until the next start, which clears them.
module tb_ecdh_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, st = 0, ecpm_done = 0;
  logic [1:0] sel = 2'b00;
  logic ecpm_start, m12_sel, d_pm, d_ss, busy;
  int   starts = 0;

  ecdh_controller dut (.clk, .rst, .st, .sel, .ecpm_done, .ecpm_start, .m12_sel,
                       .d_pm, .d_ss, .busy);

  always #5 clk = ~clk;

  // Stand-in ECPM: done 20 cycles after a start.
  int countdown = -1;
  always_ff @(posedge clk) begin
    ecpm_done <= 1'b0;
    if (ecpm_start) begin
      starts    <= starts + 1;
      countdown <= 19;
    end else if (countdown > 0) countdown <= countdown - 1;
    else if (countdown == 0) begin
      ecpm_done <= 1'b1;
      countdown <= -1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic op(logic [1:0] s, logic expect_run);
    int n0 = starts;
    @(negedge clk);
    sel = s; st = 1;
    #1;
    chk(ecpm_start == expect_run, $sformatf("start for sel=%b", s));
    if (expect_run) chk(m12_sel == (s == 2'b10), "M1/M2 select at start");
    @(negedge clk);
    st = 0;
    if (!expect_run) begin
      chk(!busy && starts == n0, $sformatf("sel=%b must be a no-operation", s));
      return;
    end
    chk(busy && !d_pm && !d_ss, "busy, flags cleared");
    chk(m12_sel == (s == 2'b10), "M1/M2 select held");
    // a second st while busy must be ignored
    sel = 2'b01; st = 1;
    #1 chk(!ecpm_start, "st ignored while busy");
    @(negedge clk);
    st = 0;
    while (busy) @(negedge clk);
    chk(starts == n0 + 1, "exactly one ECPM run");
    chk(d_pm == (s == 2'b01) && d_ss == (s == 2'b10), "done flag");
    repeat (3) @(negedge clk);
    chk(d_pm == (s == 2'b01) && d_ss == (s == 2'b10), "done flag held");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(!busy && !d_pm && !d_ss, "idle after reset");
    op(2'b00, 0);
    op(2'b01, 1);
    op(2'b11, 0);
    op(2'b10, 1);
    op(2'b01, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

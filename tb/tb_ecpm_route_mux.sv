// tb_ecpm_route_mux: checks every setting of the routing multiplexers
// M3 (x / y / b), M4 (ECC parameter / register operand) and M5 (adder /
// multiplier / squarer result) with distinct random inputs.
module tb_ecpm_route_mux;
  import tb_gf_ref::*;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  fe_t x, y, b, d_ra, a_out, m_out, s_out, dt1, wb, exp_dt1, exp_wb;
  par_e m3;
  wb_e  m5;
  logic m4;

  ecpm_route_mux dut (.x_coord(x), .y_coord(y), .b, .m3_sel(m3), .m4_sel(m4), .d_ra, .dt1,
                      .m5_sel(m5), .a_out, .m_out, .s_out, .wb);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      x = rand_fe(); y = rand_fe(); b = rand_fe(); d_ra = rand_fe();
      a_out = rand_fe(); m_out = rand_fe(); s_out = rand_fe();
      for (int s3 = 0; s3 < 3; s3++)
        for (int s4 = 0; s4 < 2; s4++)
          for (int s5 = 0; s5 < 3; s5++) begin
            m3 = par_e'(s3); m4 = s4[0]; m5 = wb_e'(s5);
            #1;
            exp_dt1 = !s4[0] ? d_ra : (s3 == 0) ? x : (s3 == 1) ? y : b;
            exp_wb  = (s5 == 0) ? a_out : (s5 == 1) ? m_out : s_out;
            checks++;
            if (dt1 !== exp_dt1 || wb !== exp_wb) begin
              failures++;
              $display("FAIL m3=%0d m4=%0d m5=%0d", s3, s4, s5);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

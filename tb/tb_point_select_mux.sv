// tb_point_select_mux: checks that M1/M2 pass the base point for sel = 0 and
// the other party's public key for sel = 1, for both coordinates.
module tb_point_select_mux;
  import tb_gf_ref::*;
  int checks = 0, failures = 0;
  logic sel;
  fe_t xp, yp, qx, qy, x, y;

  point_select_mux dut (.sel, .xp, .yp, .qss_xp(qx), .qss_yp(qy), .x_coord(x), .y_coord(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      xp = rand_fe(); yp = rand_fe(); qx = rand_fe(); qy = rand_fe();
      sel = 0;
      #1;
      checks++;
      if (x !== xp || y !== yp) begin failures++; $display("FAIL sel=0"); end
      sel = 1;
      #1;
      checks++;
      if (x !== qx || y !== qy) begin failures++; $display("FAIL sel=1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

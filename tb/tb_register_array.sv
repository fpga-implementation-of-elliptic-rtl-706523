// tb_register_array: checks the 8 x m register file against a shadow copy:
// reset clears every register, writes land only in the addressed register,
// both read ports return any register combinationally, the preset writes
// the constant 1, and nothing changes when neither we nor set_one is high.
module tb_register_array;
  import tb_gf_ref::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we = 0, set_one = 0;
  logic [2:0] ra, rb, wa;
  fe_t wd, d_ra, dt2;
  fe_t shadow [8];
  int unsigned kind;

  register_array dut (.clk, .rst, .ra, .rb, .d_ra, .dt2, .we, .set_one, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); rb = 3'(7 - i);
      #1;
      checks++;
      if (d_ra !== shadow[i] || dt2 !== shadow[7-i]) begin
        failures++;
        $display("FAIL read %0d/%0d", i, 7 - i);
      end
    end
  endtask

  initial begin
    ra = 0; rb = 0; wa = 0; wd = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 8; i++) shadow[i] = '0;
    check_all();
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      wa = 3'($urandom);
      wd = rand_fe();
      kind = $urandom % 4;
      case (kind)
        0: begin we = 0; set_one = 0; end
        1: begin we = 0; set_one = 1; shadow[wa] = fe_t'(1); end
        default: begin we = 1; set_one = 0; shadow[wa] = wd; end
      endcase
      @(negedge clk);
      we = 0; set_one = 0;
      check_all();
    end
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    for (int i = 0; i < 8; i++) shadow[i] = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

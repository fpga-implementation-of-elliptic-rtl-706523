// tb_dp_model: behavioural model of the ECPM datapath used to test the
// controllers on their own. It executes one ecc_pkg::instr_t per cycle with
// the reference arithmetic of tb_gf_ref: ADD, SQR and the register preset
// write at the clock edge; a MUL must be held for exactly m cycles, mul_done
// is raised in the m-th and the product is written at that edge. It counts
// instructions by kind and flags a multiplication whose instruction changes
// before it completes.
module tb_dp_model (
  input  logic            clk,
  input  logic            rst,
  input  ecc_pkg::instr_t instr,
  input  tb_gf_ref::fe_t  xp,
  input  tb_gf_ref::fe_t  yp,
  output logic            mul_done,
  output int              n_add,
  output int              n_sqr,
  output int              n_mul,
  output int              n_bad
);
  import tb_gf_ref::*;
  import ecc_pkg::*;

  fe_t             regs [8];
  int              cnt;
  ecc_pkg::instr_t prev;
  fe_t             dt1, dt2, par;

  always_comb begin
    unique case (instr.par)
      PAR_X:   par = xp;
      PAR_Y:   par = yp;
      default: par = REF_B;
    endcase
    dt1      = instr.dt1_par ? par : regs[instr.ra];
    dt2      = regs[instr.rb];
    mul_done = (instr.op == OP_MUL) && (cnt == M - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 8; k++) regs[k] <= '0;
      cnt <= 0; n_add <= 0; n_sqr <= 0; n_mul <= 0; n_bad <= 0;
    end else begin
      prev <= instr;
      if (instr.op == OP_MUL && cnt != 0 && instr != prev) n_bad <= n_bad + 1;
      unique case (instr.op)
        OP_ADD: begin regs[instr.wa] <= dt1 ^ dt2;          n_add <= n_add + 1; end
        OP_SQR: begin regs[instr.wa] <= gf_mul(dt1, dt1);   n_sqr <= n_sqr + 1; end
        OP_ONE:       regs[instr.wa] <= fe_t'(1);
        OP_MUL: begin
          if (cnt == M - 1) begin
            regs[instr.wa] <= gf_mul(dt1, dt2);
            n_mul <= n_mul + 1;
            cnt   <= 0;
          end else begin
            cnt <= cnt + 1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule

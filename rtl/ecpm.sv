// ecpm: elliptic-curve point multiplication unit (DESIGN-I), Q = d * P on
// the binary curve y^2 + xy = x^3 + x^2 + b over GF(2^m).
//
// A Montgomery ladder in Lopez-Dahab projective coordinates (x-only
// arithmetic), with a final conversion back to affine (x_q, y_q). The
// datapath is the one of the design: an 8 x m register array, the routing
// multiplexers M3 (ECC parameter), M4 (operand DT1) and M5 (write-back), a
// one-cycle XOR adder, a one-cycle squarer and an m-cycle bit-serial
// shift-and-add multiplier, each followed by NIST reduction where needed.
// Inversion reuses the squarer and multiplier (Itoh-Tsujii). Everything is
// sequenced by ecpm_controller.
//
// Interface:
//   start       one-cycle request while not busy. d, x_coord and y_coord are
//               captured at that edge; they may change afterwards.
//   busy        high while a multiplication runs.
//   done        one-cycle pulse when it has finished.
//   qx, qy      the affine result, valid from done until the next start.
// The curve constant b is a parameter (the design always uses a constant b).
// d must have its top bit d[m-1] set. A result at infinity is not detected.
// Latency: 6 + (m-1)(6m+8) + 2(10m-1) + 9m + 7 cycles (164470 for m = 163).
// The block structure and the ladder follow the original architecture;
// capturing the inputs at start and reading the result through the
// register-array ports are this implementation's choices. The original
// quotes 163902 cycles; the difference is all in the projective-to-affine
// conversion, whose step list is this implementation's own.
module ecpm #(
  parameter int           M = ecc_pkg::M,
  parameter logic [M-1:0] B = ecc_pkg::CURVE_B
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [M-1:0] d,
  input  logic [M-1:0] x_coord,
  input  logic [M-1:0] y_coord,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] qx,
  output logic [M-1:0] qy
);
  import ecc_pkg::*;

  instr_t       instr;
  logic [M-1:0] x_q, y_q;           // captured input point
  logic [M-1:0] d_ra, dt1, dt2, a_out, m_out, s_out, wb;
  logic         mul_en, mul_done;
  logic         we, set_one;
  wb_e          m5_sel;

  // Input point registers, loaded when a multiplication is started.
  always_ff @(posedge clk) begin
    if (rst) begin
      x_q <= '0;
      y_q <= '0;
    end else if (start && !busy) begin
      x_q <= x_coord;
      y_q <= y_coord;
    end
  end

  ecpm_controller #(.M(M)) u_ctrl (
    .clk, .rst, .start, .d, .mul_done,
    .instr, .busy, .done
  );

  always_comb begin
    mul_en  = (instr.op == OP_MUL);
    set_one = (instr.op == OP_ONE);
    we      = (instr.op == OP_ADD) || (instr.op == OP_SQR) || (mul_en && mul_done);
    unique case (instr.op)
      OP_MUL:  m5_sel = WB_MUL;
      OP_SQR:  m5_sel = WB_SQR;
      default: m5_sel = WB_ADD;
    endcase
  end

  register_array #(.M(M)) u_regs (
    .clk, .rst,
    .ra(instr.ra), .rb(instr.rb),
    .d_ra, .dt2,
    .we, .set_one, .wa(instr.wa), .wd(wb)
  );

  ecpm_route_mux #(.M(M)) u_mux (
    .x_coord(x_q), .y_coord(y_q), .b(B),
    .m3_sel(instr.par), .m4_sel(instr.dt1_par), .d_ra, .dt1,
    .m5_sel, .a_out, .m_out, .s_out, .wb
  );

  gf_adder  #(.M(M)) u_add (.dt1, .dt2, .a_out);
  gf_square #(.M(M)) u_sqr (.dt1, .s_out);
  gf_mult   #(.M(M)) u_mul (.clk, .rst, .en(mul_en), .dt1, .dt2, .done(mul_done), .m_out);

  assign qx = d_ra;  // X1 = x_q while idle
  assign qy = dt2;   // T1 = y_q while idle

endmodule

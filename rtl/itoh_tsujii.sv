// itoh_tsujii: instruction sequencer for GF(2^m) inversion by the Itoh-Tsujii
// method, run on the shared SQUARE and MULT units of the ECPM datapath.
//
// With beta_k = a^(2^k - 1), the inverse is a^-1 = (beta_(m-1))^2. beta_(m-1)
// is built with the addition chain given by the binary expansion of m-1:
// starting from beta_1 = a, each further bit of m-1 (from the most
// significant down) doubles k,  beta_2k = (beta_k)^(2^k) * beta_k, and a one
// bit adds one more step, beta_(k+1) = (beta_k)^2 * a. For m = 163 the chain
// is 1,2,4,5,10,20,40,80,81,162: nine multiplications and 161 squarings,
// plus the final squaring, i.e. 9m + (m-1) = 1629 cycles.
//
// Each step squares into the scratch register tmp (the first square reads
// beta, or a while k = 1, the rest work in place) and then multiplies
// tmp by beta (or by a) into beta. The final square writes dst. Register a
// is left unchanged; beta and tmp are overwritten.
//
// Interface: when idle, raising start makes the sequencer issue its first
// instruction in that same cycle; start is ignored while busy. Each cycle
// instr carries the datapath instruction (valid while active). A
// multiplication is held until mul_done. done is high in the cycle of the
// last instruction (the final square).
// The method and its cost (nine multiplications, m-1 squarings) follow the
// original architecture; the sequencer structure and register use are this
// implementation's own.
module itoh_tsujii #(
  parameter int M = ecc_pkg::M
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [2:0]        a_reg,
  input  logic [2:0]        beta_reg,
  input  logic [2:0]        tmp_reg,
  input  logic [2:0]        dst_reg,
  input  logic              mul_done,
  output ecc_pkg::instr_t   instr,
  output logic              active,
  output logic              done
);
  import ecc_pkg::*;

  localparam int                E    = M - 1;            // exponent chain target
  localparam int                EMSB = $clog2(M) - 1;    // floor(log2(M-1)) for M-1 not a power of two
  localparam int                KW   = $clog2(M) + 1;
  localparam logic [KW-1:0]     EV   = KW'(E);

  typedef enum logic [1:0] {IV_IDLE, IV_SQ, IV_MUL, IV_FIN} iv_e;

  iv_e         st,   e_st,   n_st;
  logic [KW-1:0] k,  e_k,    n_k;     // beta holds a^(2^k - 1)
  logic [KW-1:0] left, e_left, n_left;  // squarings still to issue in this step
  logic        first, e_first, n_first;
  logic        inc,   e_inc,   n_inc;   // current step is the "+1" step
  logic [KW-1:0] pos, e_pos,  n_pos;    // bit of E being processed
  logic [KW-1:0] k_new;

  always_comb begin
    // Effective state: an idle sequencer that is started behaves as if it
    // were already in the first square of the first doubling step.
    if (st == IV_IDLE) begin
      e_st    = start ? IV_SQ : IV_IDLE;
      e_k     = KW'(1);
      e_left  = KW'(1);
      e_first = 1'b1;
      e_inc   = 1'b0;
      e_pos   = KW'(EMSB - 1);
    end else begin
      e_st = st; e_k = k; e_left = left; e_first = first; e_inc = inc; e_pos = pos;
    end

    n_st = e_st; n_k = e_k; n_left = e_left; n_first = e_first; n_inc = e_inc; n_pos = e_pos;
    instr = INSTR_NOP;
    done  = 1'b0;
    k_new = e_inc ? e_k + 1'b1 : e_k << 1;

    unique case (e_st)
      IV_SQ: begin
        instr = mk(OP_SQR, 1'b0, PAR_X,
                   e_first ? ((e_k == KW'(1)) ? a_reg : beta_reg) : tmp_reg,
                   tmp_reg, tmp_reg);
        n_first = 1'b0;
        if (e_left == KW'(1)) n_st = IV_MUL;
        else                  n_left = e_left - 1'b1;
      end
      IV_MUL: begin
        instr = mk(OP_MUL, 1'b0, PAR_X, tmp_reg,
                   (e_inc || e_k == KW'(1)) ? a_reg : beta_reg, beta_reg);
        if (mul_done) begin
          n_k     = k_new;
          n_first = 1'b1;
          n_st    = IV_SQ;
          if (!e_inc && ((EV >> e_pos) & KW'(1)) != '0) begin
            n_inc  = 1'b1;
            n_left = KW'(1);
          end else if (e_pos == '0) begin
            n_st = IV_FIN;
          end else begin
            n_inc  = 1'b0;
            n_pos  = e_pos - 1'b1;
            n_left = k_new;
          end
        end
      end
      IV_FIN: begin
        instr = mk(OP_SQR, 1'b0, PAR_X, beta_reg, tmp_reg, dst_reg);
        done  = 1'b1;
        n_st  = IV_IDLE;
      end
      default: ;
    endcase
    active = (e_st != IV_IDLE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IV_IDLE; k <= '0; left <= '0; first <= 1'b0; inc <= 1'b0; pos <= '0;
    end else begin
      st <= n_st; k <= n_k; left <= n_left; first <= n_first; inc <= n_inc; pos <= n_pos;
    end
  end

endmodule

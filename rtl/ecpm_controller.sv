// ecpm_controller: finite-state controller of the ECPM unit (Montgomery
// point multiplication Q = d*G, Algorithm 1 of the design).
//
// It issues one datapath instruction (ecc_pkg::instr_t) per cycle; a
// multiplication is held until the multiplier reports mul_done (m cycles),
// every other instruction takes one cycle.
//
//   IDLE  waits for start, then latches the scalar d.
//   A2P   six states, affine to projective: Z1 <- 1, T1 <- 0 (T1 + T1),
//         X1 <- xp + T1, Z2 <- xp^2, X2 <- Z2^2, X2 <- b + X2.
//   LOOP  fourteen states per key bit, i = m-2 down to 0: seven for the
//         point addition and seven for the point doubling of Algorithm 1.
//         When d_i = 1 they update (X1,Z1) by addition and (X2,Z2) by
//         doubling; when d_i = 0 the same instructions run with the two
//         register pairs exchanged, so every bit costs the same
//         6 multiplications + 8 one-cycle operations (6m + 8 cycles).
//   CONV  projective to affine: 9 multiplications, 7 one-cycle operations
//         and two inversions run by the itoh_tsujii sub-sequencer
//         (1/Z1 for x_q, 1/(xp*Z1*Z2) for y_q).
//
// The scalar's top bit d_(m-1) is taken to be 1 (the precondition of
// Algorithm 1); it is not examined. Total cycles from the start edge to done:
// 6 + (m-1)(6m+8) + 2*(10m-1) + 9m + 7, i.e. 164470 for m = 163.
//
// At the end x_q is in register X1 and y_q in T1. While idle the controller
// keeps read port A on X1 and port B on T1 so the results appear on the
// register array outputs. busy is high from the cycle after start until the
// last instruction; done is a one-cycle pulse in the following cycle.
// The six-state / fourteen-state structure and the ladder instructions
// follow the original architecture. The instruction encoding, the way Z1 = 1
// and X1 = xp are loaded, and the conversion sequence are this
// implementation's own.
module ecpm_controller #(
  parameter int M = ecc_pkg::M
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [M-1:0]    d,
  input  logic            mul_done,
  output ecc_pkg::instr_t instr,
  output logic            busy,
  output logic            done
);
  import ecc_pkg::*;

  localparam int IW = $clog2(M);

  typedef enum logic [1:0] {S_IDLE, S_A2P, S_LOOP, S_CONV} state_e;

  typedef struct packed {
    instr_t     ins;
    logic       inv;    // this step is an inversion
    logic [2:0] ia, ib, it, id;  // inversion: a, beta, tmp, dst
  } conv_t;

  localparam int CONV_LAST = 17;

  state_e        state;
  logic [4:0]    step;
  logic [IW-1:0] i;
  logic [M-1:0]  d_q;
  logic          di;

  conv_t           cv;
  instr_t          inv_instr;
  logic            inv_start, inv_active, inv_done;
  logic            adv;

  // ---- affine to projective ------------------------------------------------
  function automatic instr_t a2p_instr(logic [4:0] s);
    unique case (s)
      5'd0:    return mk(OP_ONE, 1'b0, PAR_X, R_Z1, R_Z1, R_Z1);  // Z1 = 1
      5'd1:    return mk(OP_ADD, 1'b0, PAR_X, R_T1, R_T1, R_T1);  // T1 = T1 + T1 = 0
      5'd2:    return mk(OP_ADD, 1'b1, PAR_X, R_T1, R_T1, R_X1);  // X1 = xp + 0
      5'd3:    return mk(OP_SQR, 1'b1, PAR_X, R_T1, R_T1, R_Z2);  // Z2 = xp^2
      5'd4:    return mk(OP_SQR, 1'b0, PAR_X, R_Z2, R_T1, R_X2);  // X2 = Z2^2 = xp^4
      default: return mk(OP_ADD, 1'b1, PAR_B, R_T1, R_X2, R_X2);  // X2 = b + X2
    endcase
  endfunction

  // ---- one ladder step (PA then PD), registers exchanged when d_i = 0 -----
  function automatic instr_t loop_instr(logic [4:0] s, logic bit_i);
    logic [2:0] xa, za, xb, zb;
    xa = bit_i ? R_X1 : R_X2;  za = bit_i ? R_Z1 : R_Z2;
    xb = bit_i ? R_X2 : R_X1;  zb = bit_i ? R_Z2 : R_Z1;
    unique case (s)
      // point addition into (xa, za)
      5'd0:    return mk(OP_MUL, 1'b0, PAR_X, xb,   za,   za);    // Za = Xb * Za
      5'd1:    return mk(OP_MUL, 1'b0, PAR_X, xa,   zb,   xa);    // Xa = Xa * Zb
      5'd2:    return mk(OP_ADD, 1'b0, PAR_X, xa,   za,   R_T1);  // T1 = Xa + Za
      5'd3:    return mk(OP_MUL, 1'b0, PAR_X, xa,   za,   xa);    // Xa = Xa * Za
      5'd4:    return mk(OP_SQR, 1'b0, PAR_X, R_T1, za,   za);    // Za = T1^2
      5'd5:    return mk(OP_MUL, 1'b1, PAR_X, R_T1, za,   R_T1);  // T1 = xp * Za
      5'd6:    return mk(OP_ADD, 1'b0, PAR_X, xa,   R_T1, xa);    // Xa = Xa + T1
      // point doubling of (xb, zb)
      5'd7:    return mk(OP_SQR, 1'b0, PAR_X, zb,   zb,   zb);    // Zb = Zb^2
      5'd8:    return mk(OP_SQR, 1'b0, PAR_X, zb,   zb,   R_T1);  // T1 = Zb^2
      5'd9:    return mk(OP_MUL, 1'b1, PAR_B, R_T1, R_T1, R_T1);  // T1 = b * T1
      5'd10:   return mk(OP_SQR, 1'b0, PAR_X, xb,   zb,   xb);    // Xb = Xb^2
      5'd11:   return mk(OP_MUL, 1'b0, PAR_X, xb,   zb,   zb);    // Zb = Xb * Zb
      5'd12:   return mk(OP_SQR, 1'b0, PAR_X, xb,   zb,   xb);    // Xb = Xb^2
      default: return mk(OP_ADD, 1'b0, PAR_X, xb,   R_T1, xb);    // Xb = Xb + T1
    endcase
  endfunction

  // ---- projective to affine ---------------------------------------------
  //   x_q = X1/Z1
  //   y_q = (xp + x_q) [(X1 + xp Z1)(X2 + xp Z2) + (xp^2 + yp) Z1 Z2] / (xp Z1 Z2) + yp
  function automatic conv_t conv_step(logic [4:0] s);
    conv_t c;
    c.inv = 1'b0; c.ia = R_X1; c.ib = R_X1; c.it = R_X1; c.id = R_X1;
    c.ins = INSTR_NOP;
    unique case (s)
      5'd0:  c.ins = mk(OP_MUL, 1'b0, PAR_X, R_Z1, R_Z2, R_T2);  // T2 = Z1 Z2
      5'd1:  c.ins = mk(OP_MUL, 1'b1, PAR_X, R_T1, R_T2, R_T3);  // T3 = xp Z1 Z2
      5'd2:  c.ins = mk(OP_MUL, 1'b1, PAR_X, R_T1, R_Z1, R_T4);  // T4 = xp Z1
      5'd3:  c.ins = mk(OP_ADD, 1'b0, PAR_X, R_X1, R_T4, R_T4);  // T4 = X1 + xp Z1
      5'd4:  c.ins = mk(OP_MUL, 1'b1, PAR_X, R_T1, R_Z2, R_T1);  // T1 = xp Z2
      5'd5:  c.ins = mk(OP_ADD, 1'b0, PAR_X, R_X2, R_T1, R_T1);  // T1 = X2 + xp Z2
      5'd6:  c.ins = mk(OP_MUL, 1'b0, PAR_X, R_T4, R_T1, R_T1);  // T1 = T4 * T1
      5'd7:  c.ins = mk(OP_SQR, 1'b1, PAR_X, R_Z2, R_Z2, R_Z2);  // Z2 = xp^2
      5'd8:  c.ins = mk(OP_ADD, 1'b1, PAR_Y, R_Z2, R_Z2, R_Z2);  // Z2 = yp + xp^2
      5'd9:  c.ins = mk(OP_MUL, 1'b0, PAR_X, R_Z2, R_T2, R_Z2);  // Z2 = Z2 * Z1 Z2
      5'd10: c.ins = mk(OP_ADD, 1'b0, PAR_X, R_T1, R_Z2, R_T1);  // T1 = T1 + Z2
      5'd11: begin                                               // X2 = 1 / Z1
        c.inv = 1'b1; c.ia = R_Z1; c.ib = R_X2; c.it = R_Z2; c.id = R_X2;
      end
      5'd12: c.ins = mk(OP_MUL, 1'b0, PAR_X, R_X1, R_X2, R_X1);  // X1 = x_q
      5'd13: begin                                               // T2 = 1 / (xp Z1 Z2)
        c.inv = 1'b1; c.ia = R_T3; c.ib = R_T2; c.it = R_T4; c.id = R_T2;
      end
      5'd14: c.ins = mk(OP_MUL, 1'b0, PAR_X, R_T1, R_T2, R_T1);  // T1 = T1 / (xp Z1 Z2)
      5'd15: c.ins = mk(OP_ADD, 1'b1, PAR_X, R_X1, R_X1, R_Z1);  // Z1 = xp + x_q
      5'd16: c.ins = mk(OP_MUL, 1'b0, PAR_X, R_Z1, R_T1, R_T1);  // T1 = Z1 * T1
      default: c.ins = mk(OP_ADD, 1'b1, PAR_Y, R_T1, R_T1, R_T1); // T1 = yp + T1 = y_q
    endcase
    return c;
  endfunction

  always_comb begin
    di        = d_q[i];
    cv        = conv_step(step);
    inv_start = (state == S_CONV) && cv.inv;
    unique case (state)
      S_A2P:   instr = a2p_instr(step);
      S_LOOP:  instr = loop_instr(step, di);
      S_CONV:  instr = cv.inv ? inv_instr : cv.ins;
      default: instr = INSTR_NOP;  // reads X1 (x_q) on port A, T1 (y_q) on port B
    endcase
    if (state == S_CONV && cv.inv) adv = inv_done;
    else if (instr.op == OP_MUL)   adv = mul_done;
    else                           adv = (state != S_IDLE);
  end

  itoh_tsujii #(.M(M)) u_inv (
    .clk, .rst,
    .start(inv_start),
    .a_reg(cv.ia), .beta_reg(cv.ib), .tmp_reg(cv.it), .dst_reg(cv.id),
    .mul_done,
    .instr(inv_instr),
    .active(inv_active),
    .done(inv_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      step  <= '0;
      i     <= '0;
      d_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          d_q   <= d;
          state <= S_A2P;
          step  <= '0;
        end
        S_A2P: begin
          if (step == 5'd5) begin
            state <= S_LOOP;
            step  <= '0;
            i     <= IW'(M - 2);
          end else begin
            step <= step + 1'b1;
          end
        end
        S_LOOP: if (adv) begin
          if (step == 5'd13) begin
            step <= '0;
            if (i == '0) state <= S_CONV;
            else         i     <= i - 1'b1;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_CONV: if (adv) begin
          if (step == 5'(CONV_LAST)) begin
            state <= S_IDLE;
            step  <= '0;
            done  <= 1'b1;
          end else begin
            step <= step + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // An inversion is only ever requested from the CONV state.
  a_inv_in_conv: assert property (@(posedge clk) disable iff (rst)
                                  inv_active |-> state == S_CONV);

endmodule

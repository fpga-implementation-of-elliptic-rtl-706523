// ecdh_controller: key-agreement controller of the ECDH processor
// (DESIGN-II).
//
// A three-state machine. IDLE: nothing is computed. PKG: a public key
// Q = d*G is being generated. SKG: a shared secret SK = d*Q_other is being
// generated. The two-bit sel input chooses the operation when st is raised
// in IDLE: 00 = no operation, 01 = public key, 10 = shared key (11 is
// treated as no operation). The controller forwards st to the ECPM
// controller as ecpm_start, drives the select line of the routing
// multiplexers M1/M2 (0 = base point G, 1 = other party's public key) and,
// when the ECPM unit reports done, returns to IDLE and raises d_pm (public
// key ready) or d_ss (shared secret ready).
//
// Timing: m12_sel is already correct in the cycle st is accepted, so the
// ECPM unit captures the right point. d_pm / d_ss go high the cycle after
// ecpm_done and stay high until the next accepted st, which clears both.
// st is ignored while an operation is in progress.
// The three states, the select encoding 00/01/10 and the M1/M2 control
// follow the original architecture; the held done flags, the handling of
// sel = 11 and of st while busy are this implementation's choices.
module ecdh_controller (
  input  logic       clk,
  input  logic       rst,
  input  logic       st,
  input  logic [1:0] sel,
  input  logic       ecpm_done,
  output logic       ecpm_start,
  output logic       m12_sel,
  output logic       d_pm,
  output logic       d_ss,
  output logic       busy
);
  typedef enum logic [1:0] {IDLE, PKG, SKG} state_e;

  state_e state;
  logic   go_pk, go_sk;

  always_comb begin
    go_pk      = (state == IDLE) && st && (sel == 2'b01);
    go_sk      = (state == IDLE) && st && (sel == 2'b10);
    ecpm_start = go_pk || go_sk;
    m12_sel    = (state == SKG) || go_sk;
    busy       = (state != IDLE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      d_pm  <= 1'b0;
      d_ss  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          if (ecpm_start) begin
            d_pm  <= 1'b0;
            d_ss  <= 1'b0;
            state <= go_pk ? PKG : SKG;
          end
        end
        PKG: if (ecpm_done) begin
          d_pm  <= 1'b1;
          state <= IDLE;
        end
        SKG: if (ecpm_done) begin
          d_ss  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_one_done: assert property (@(posedge clk) disable iff (rst) !(d_pm && d_ss));

endmodule

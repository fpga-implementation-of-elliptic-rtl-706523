// ecdh_top: elliptic-curve Diffie-Hellman key-agreement processor
// (DESIGN-II) over GF(2^163), NIST curve B-163.
//
// One point-multiplication unit (ecpm, DESIGN-I) serves both halves of the
// protocol. The ECDH controller and the routing multiplexers M1/M2 in front
// of it select the point to multiply: the base point G (built-in constants
// GX, GY) to generate a public key Q = d*G, or the other party's public key
// (qss_xp, qss_yp) to generate the shared secret SK = d*Q_other. A complete
// key agreement is therefore two requests, one public key and one shared
// secret, 2 x 164470 cycles.
//
// Ports: clk, rst (synchronous, active high); st starts the operation
// chosen by sel (01 public key, 10 shared key, 00/11 nothing); d is the
// private scalar (top bit must be 1); r_xp/r_yp carry the result, valid
// while d_pm (public key) or d_ss (shared secret) is high. busy is high
// while an operation runs. Inputs need only be valid in the st cycle.
// The structure (ECDH controller, M1/M2, one ECPM unit) follows the
// original architecture. Its result ports are drawn at the ECDH controller;
// here they come straight from the ECPM unit.
module ecdh_top #(
  parameter int           M  = ecc_pkg::M,
  parameter logic [M-1:0] B  = ecc_pkg::CURVE_B,
  parameter logic [M-1:0] GX = ecc_pkg::BASE_GX,
  parameter logic [M-1:0] GY = ecc_pkg::BASE_GY
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         st,
  input  logic [1:0]   sel,
  input  logic [M-1:0] d,
  input  logic [M-1:0] qss_xp,
  input  logic [M-1:0] qss_yp,
  output logic [M-1:0] r_xp,
  output logic [M-1:0] r_yp,
  output logic         d_pm,
  output logic         d_ss,
  output logic         busy
);
  logic         ecpm_start, ecpm_done, ecpm_busy, m12_sel;
  logic [M-1:0] x_coord, y_coord;

  ecdh_controller u_ecdh_ctrl (
    .clk, .rst, .st, .sel,
    .ecpm_done, .ecpm_start, .m12_sel,
    .d_pm, .d_ss, .busy
  );

  point_select_mux #(.M(M)) u_m12 (
    .sel(m12_sel), .xp(GX), .yp(GY), .qss_xp, .qss_yp,
    .x_coord, .y_coord
  );

  ecpm #(.M(M), .B(B)) u_ecpm (
    .clk, .rst, .start(ecpm_start), .d, .x_coord, .y_coord,
    .busy(ecpm_busy), .done(ecpm_done), .qx(r_xp), .qy(r_yp)
  );

  // The ECPM unit only runs on behalf of the ECDH controller.
  a_busy: assert property (@(posedge clk) disable iff (rst) ecpm_busy |-> busy);

endmodule

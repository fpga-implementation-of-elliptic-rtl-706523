// point_select_mux: routing multiplexers M1 and M2 of the key-agreement
// processor.
//
// M1 selects the x coordinate and M2 the y coordinate of the point that the
// ECPM unit multiplies: with sel = 0 the base point G (xp, yp) for public-key
// generation, with sel = 1 the other party's public key (Qss_xp, Qss_yp) for
// shared-secret generation. Both multiplexers share one select line, driven
// by the ECDH controller. Combinational.
// The two multiplexers and their 0/1 meaning follow the original
// architecture; sharing a single select line is this implementation's choice.
module point_select_mux #(
  parameter int M = ecc_pkg::M
) (
  input  logic         sel,
  input  logic [M-1:0] xp,
  input  logic [M-1:0] yp,
  input  logic [M-1:0] qss_xp,
  input  logic [M-1:0] qss_yp,
  output logic [M-1:0] x_coord,
  output logic [M-1:0] y_coord
);
  assign x_coord = sel ? qss_xp : xp;  // M1
  assign y_coord = sel ? qss_yp : yp;  // M2
endmodule

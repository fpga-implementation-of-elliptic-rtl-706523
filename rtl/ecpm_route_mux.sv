// ecpm_route_mux: the three routing multiplexers of the ECPM unit.
//
//   M3 (3:1) picks the ECC parameter: x_coord, y_coord or the curve
//            constant b.
//   M4 (2:1) picks operand DT1 for the arithmetic units: the ECC parameter
//            from M3 or the register array's port-A output D_RA.
//   M5 (3:1) picks the value written back to the register array: the
//            adder output A_out, the multiplier output M_out or the squarer
//            output S_out.
//
// Purely combinational; the select inputs come from the ECPM controller.
// The three multiplexers and their inputs follow the original architecture;
// the select encodings (ecc_pkg::par_e, ecc_pkg::wb_e) are this
// implementation's own.
module ecpm_route_mux #(
  parameter int M = ecc_pkg::M
) (
  input  logic [M-1:0]  x_coord,
  input  logic [M-1:0]  y_coord,
  input  logic [M-1:0]  b,
  input  ecc_pkg::par_e m3_sel,
  input  logic          m4_sel,   // 1 = ECC parameter, 0 = D_RA
  input  logic [M-1:0]  d_ra,
  output logic [M-1:0]  dt1,
  input  ecc_pkg::wb_e  m5_sel,
  input  logic [M-1:0]  a_out,
  input  logic [M-1:0]  m_out,
  input  logic [M-1:0]  s_out,
  output logic [M-1:0]  wb
);
  import ecc_pkg::*;

  logic [M-1:0] ecc_parameter;

  always_comb begin
    unique case (m3_sel)
      PAR_X:   ecc_parameter = x_coord;
      PAR_Y:   ecc_parameter = y_coord;
      default: ecc_parameter = b;
    endcase
    dt1 = m4_sel ? ecc_parameter : d_ra;
    unique case (m5_sel)
      WB_ADD:  wb = a_out;
      WB_MUL:  wb = m_out;
      default: wb = s_out;
    endcase
  end

endmodule

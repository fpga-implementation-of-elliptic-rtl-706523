// register_array: 8 x m register file of the ECPM unit.
//
// It holds the projective coordinates X1, Z1, X2, Z2, the temporary T1 and
// three further temporaries used by the projective-to-affine conversion and
// the inversions. Two 8:1 read multiplexers give the operands D_RA (port A,
// towards M4) and DT2 (port B, straight to the adder and multiplier); a 1:8
// write demultiplexer stores the write-back value chosen by M5.
//
// Besides the write port there is a preset input, set_one, which loads the
// constant 1 into register wa. The projective representation needs Z1 = 1
// at the start of a point multiplication and none of the arithmetic units
// can produce that constant; the preset is this implementation's way of
// providing it.
//
// Timing: reads are combinational, writes happen at the rising clock edge.
// Synchronous reset clears every register.
module register_array #(
  parameter int M = ecc_pkg::M,
  parameter int N = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(N)-1:0] ra,
  input  logic [$clog2(N)-1:0] rb,
  output logic [M-1:0]         d_ra,
  output logic [M-1:0]         dt2,
  input  logic                 we,
  input  logic                 set_one,
  input  logic [$clog2(N)-1:0] wa,
  input  logic [M-1:0]         wd
);
  logic [M-1:0] regs [N];

  assign d_ra = regs[ra];
  assign dt2  = regs[rb];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (set_one) begin
      regs[wa] <= M'(1);
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

endmodule

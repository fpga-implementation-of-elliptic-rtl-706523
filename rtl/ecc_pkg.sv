// ecc_pkg: field, curve and instruction definitions shared by the ECDH /
// ECPM processor.
//
// The field is GF(2^163) in polynomial basis with the NIST pentanomial
// f(z) = z^163 + z^7 + z^6 + z^3 + 1, and the curve is NIST B-163,
// y^2 + xy = x^3 + x^2 + b. These follow the design's stated choice of a
// NIST binary curve over GF(2^163); the numeric values of b and of the base
// point G are the published NIST B-163 constants.
//
// The ECPM datapath is driven by one instruction per cycle (instr_t). An
// instruction names the arithmetic unit whose result is written back (M5),
// where operand DT1 comes from (M4: register port A or the ECC parameter
// chosen by M3), the two register read addresses and the write address.
// The instruction format is this implementation's own encoding.
package ecc_pkg;

  localparam int M  = 163;  // field degree
  localparam int K1 = 3;    // middle terms of the reduction pentanomial
  localparam int K2 = 6;
  localparam int K3 = 7;

  localparam logic [M-1:0] CURVE_B = 163'h2_0a601907_b8c953ca_1481eb10_512f7874_4a3205fd;
  localparam logic [M-1:0] BASE_GX = 163'h3_f0eba162_86a2d57e_a0991168_d4994637_e8343e36;
  localparam logic [M-1:0] BASE_GY = 163'h0_d51fbc6c_71a0094f_a2cdd545_b11c5c0c_797324f1;

  // Register array addresses (8 x m register file).
  localparam logic [2:0] R_X1 = 3'd0;
  localparam logic [2:0] R_Z1 = 3'd1;
  localparam logic [2:0] R_X2 = 3'd2;
  localparam logic [2:0] R_Z2 = 3'd3;
  localparam logic [2:0] R_T1 = 3'd4;
  localparam logic [2:0] R_T2 = 3'd5;
  localparam logic [2:0] R_T3 = 3'd6;
  localparam logic [2:0] R_T4 = 3'd7;

  // Operation of one datapath instruction.
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,  // no write
    OP_ADD = 3'd1,  // wa <= DT1 + DT2           (1 cycle)
    OP_SQR = 3'd2,  // wa <= DT1^2               (1 cycle)
    OP_MUL = 3'd3,  // wa <= DT1 * DT2           (m cycles)
    OP_ONE = 3'd4   // wa <= 1 (register preset) (1 cycle)
  } op_e;

  // M3: ECC parameter select.
  typedef enum logic [1:0] {
    PAR_X = 2'd0,
    PAR_Y = 2'd1,
    PAR_B = 2'd2
  } par_e;

  // M5: write-back select.
  typedef enum logic [1:0] {
    WB_ADD = 2'd0,
    WB_MUL = 2'd1,
    WB_SQR = 2'd2
  } wb_e;

  typedef struct packed {
    op_e        op;
    logic       dt1_par;  // M4: 1 = DT1 is the ECC parameter, 0 = register port A
    par_e       par;      // M3 select
    logic [2:0] ra;       // register read port A (D_RA)
    logic [2:0] rb;       // register read port B (DT2)
    logic [2:0] wa;       // register write address
  } instr_t;

  localparam instr_t INSTR_NOP = '{op: OP_NOP, dt1_par: 1'b0, par: PAR_X,
                                   ra: R_X1, rb: R_T1, wa: R_X1};

  function automatic instr_t mk(op_e op, logic dt1_par, par_e par,
                                logic [2:0] ra, logic [2:0] rb, logic [2:0] wa);
    instr_t i;
    i.op = op; i.dt1_par = dt1_par; i.par = par; i.ra = ra; i.rb = rb; i.wa = wa;
    return i;
  endfunction

endpackage

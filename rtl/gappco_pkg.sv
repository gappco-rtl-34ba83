// gappco_pkg: constants and types shared by the GAPPCO I coprocessor.
//
// The register file holds M_REGS registers of DATA_W bits, so every register
// address is ADDR_W bits wide. Values are two's-complement fixed point with
// FRAC_W fraction bits (Q16.16 by default); the 32-bit register width and the
// 32-register file with 5-bit addresses are the design's published sizes, the
// fixed-point format is this implementation's choice.
//
// dv_cfg_t is the configuration record of one basic 4-width DotVectors unit.
// Its fields are declared in bitstream order (first field = most significant
// bits): EN1, EN2, then for each of the four multipliers addr1/sign1/addr2/
// sign2, then RESULT1 addr/type and RESULT2 addr/type. The RESULT2 fields are
// always present (62 bits per record) and are ignored in 4-width mode.
package gappco_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned FRAC_W   = 16;
  localparam int unsigned M_REGS   = 32;
  localparam int unsigned ADDR_W   = $clog2(M_REGS);
  localparam int unsigned N_MULT   = 4;   // multipliers per DotVectors unit
  localparam int unsigned N_OPS    = 2 * N_MULT;
  localparam int unsigned COUNT_W  = 4;   // width of the unit counts in the bitstream
  localparam int unsigned DV_LAT   = 3;   // issue to write-back, in cycles

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic        [ADDR_W-1:0] addr_t;

  // Result type bit: 0 = final result, 1 = intermediate result.
  typedef enum logic {
    RES_FINAL        = 1'b0,
    RES_INTERMEDIATE = 1'b1
  } res_type_e;

  typedef struct packed {
    addr_t addr;
    logic  sign;   // 1: the operand is negated before the multiplier
  } operand_cfg_t;

  typedef struct packed {
    operand_cfg_t op1;
    operand_cfg_t op2;
  } mult_cfg_t;

  typedef struct packed {
    addr_t     addr;
    res_type_e rtype;
  } result_cfg_t;

  typedef struct packed {
    logic                   en1;   // DEMUXx1 enable
    logic                   en2;   // DEMUXx2 enable
    mult_cfg_t [0:N_MULT-1] mult;  // mult[0] = MULTx1 (sent first) ... mult[3] = MULTx4
    result_cfg_t            res1;
    result_cfg_t            res2;
  } dv_cfg_t;

  localparam int unsigned DV_CFG_W = $bits(dv_cfg_t);

  // One register-file write port.
  typedef struct packed {
    logic  we;
    addr_t addr;
    data_t data;
  } rf_wr_t;

  // Saturate a wide signed value to DATA_W bits.
  function automatic data_t sat_data(input logic signed [2*DATA_W-1:0] v);
    localparam logic signed [2*DATA_W-1:0] MAXV = (2*DATA_W)'({1'b0, {(DATA_W-1){1'b1}}});
    localparam logic signed [2*DATA_W-1:0] MINV = -MAXV - 1;
    if (v > MAXV)      return data_t'(MAXV);
    else if (v < MINV) return data_t'(MINV);
    else               return data_t'(v);
  endfunction

endpackage

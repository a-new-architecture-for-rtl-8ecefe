// maf_pkg: widths, rounding modes and flag types shared by the multiple-precision
// multiply-add fused (MAF) unit. One 64-bit datapath computes either one IEEE double
// A*B+C or two packed IEEE single A*B+C. The widths follow the double-precision datapath
// (53-bit multiplier, 106-bit product, 161-bit alignment/add/normalize window, 13-bit
// exponents) and the single-precision lanes inside it (24, 48, 74 and 10 bits). Lane 1
// of a single pair lives in the low half of every bus, lane 2 in the high half; in double
// mode all lane-1 signals carry the double operation.
package maf_pkg;

  localparam int unsigned DMW   = 53;   // double mantissa width incl. hidden bit
  localparam int unsigned SMW   = 24;   // single mantissa width incl. hidden bit
  localparam int unsigned PW    = 106;  // product width
  localparam int unsigned WW    = 161;  // alignment / adder / normalization window
  localparam int unsigned LW    = 74;   // single-lane window
  localparam int unsigned MSBW  = 55;   // upper (incrementer) part of the window
  localparam int unsigned DEW   = 13;   // double exponent datapath width
  localparam int unsigned SEW   = 10;   // single exponent datapath width
  localparam int unsigned L2LO  = 75;   // lowest window bit of single lane 2

  // Offsets used by the exponent difference: shift = ea + eb - ec - OFF
  localparam int DOFF = 967;            // 1023 - 56
  localparam int SOFF = 100;            // 127 - 27
  localparam int DMAXSH = 161;
  localparam int SMAXSH = 74;

  typedef enum logic [1:0] {
    RM_RNE = 2'd0,   // round to nearest, ties to even
    RM_RTZ = 2'd1,   // round toward zero
    RM_RUP = 2'd2,   // round toward +infinity
    RM_RDN = 2'd3    // round toward -infinity
  } rmode_e;

  // Exception flags, one bit per lane (bit 0: double or single lane 1, bit 1: single lane 2)
  typedef struct packed {
    logic [1:0] invalid;    // an operand is zero, subnormal, infinity or NaN
    logic [1:0] overflow;
    logic [1:0] underflow;
    logic [1:0] inexact;
  } maf_flags_t;

endpackage

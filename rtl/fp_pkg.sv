// fp_pkg: types and constants shared by the floating-point multiply-accumulate
// datapath. A binary single-precision word is packed as sign (bit 31), biased
// exponent (bits 30:23) and fraction (bits 22:0); the significand of a normal
// number is 1.F, i.e. 24 bits with the hidden one on top. The bias is 127.
package fp_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  localparam int unsigned BIAS      = 127;
  localparam int unsigned EXP_MAX   = 254;        // largest exponent of a finite number
  localparam logic [30:0] MAX_FINITE = 31'h7F7F_FFFF;

endpackage

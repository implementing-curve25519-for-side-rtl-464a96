// c25519_pkg: constants and types shared by the Curve25519 scalar-multiplication core.
//
// Field elements are 255-bit values modulo the pseudo-Mersenne prime p = 2^255 - 19.
// The block memory holds them at 6-bit addresses; this package fixes the logical
// memory map used by the arithmetic controller's programs, the encoding of one
// microcode operation, and the group order #E used by scalar blinding.
//
// The prime, the ladder constant and the 6-bit address width follow the design
// description; the memory map and the microcode encoding are this design's own.
package c25519_pkg;

  localparam int unsigned FE_W   = 255;                    // field element width
  localparam int unsigned ADDR_W = 6;                      // block-memory address width

  localparam logic [FE_W-1:0] P_MOD = {{(FE_W-5){1'b1}}, 5'b01101}; // 2^255 - 19
  localparam logic [FE_W-1:0] A24   = FE_W'(121665);       // (486662 - 2) / 4

  // Group order of Curve25519: #E = 8 * l, l = 2^252 + 27742317777372353535851937790883648493
  localparam logic [255:0] GROUP_ORDER =
    256'h80000000000000000000000000000000a6f7cef517bce6b2c09318d2e7ae9f68;

  typedef logic [FE_W-1:0]   fe_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // ---------------------------------------------------------------------------
  // Logical memory map. The four ladder coordinates sit at 0..3 so that the
  // scalar bit can swap R0 and R1 by flipping address bit 1.
  // ---------------------------------------------------------------------------
  localparam addr_t AD_R0X = 6'd0;   // x of R0 (result point at the end)
  localparam addr_t AD_R0Z = 6'd1;
  localparam addr_t AD_R1X = 6'd2;
  localparam addr_t AD_R1Z = 6'd3;
  localparam addr_t AD_X1  = 6'd4;   // affine x of the input point
  localparam addr_t AD_A24 = 6'd5;   // ladder constant 121665
  localparam addr_t AD_LAM = 6'd6;   // random projective factor lambda
  localparam addr_t AD_ZER = 6'd7;   // constant 0
  localparam addr_t AD_OUT = 6'd8;   // affine result x = X * Z^(p-2)
  localparam addr_t AD_T0  = 6'd16;  // temporaries T0..T15 at 16..31

  // Ladder-relative names: the point being doubled (X2,Z2) and the other one
  // (X3,Z3). The controller maps them onto R0/R1 with the scalar bit.
  localparam addr_t AD_X2 = 6'd0;
  localparam addr_t AD_Z2 = 6'd1;
  localparam addr_t AD_X3 = 6'd2;
  localparam addr_t AD_Z3 = 6'd3;

  // ---------------------------------------------------------------------------
  // One microcode operation: a multiplication (dst = a * b) or an
  // addition/subtraction (dst = a +/- b). rep > 0 repeats a multiplication in
  // place (dst = dst * dst) for long squaring chains.
  // ---------------------------------------------------------------------------
  typedef struct packed {
    logic        is_mul;   // 1: multiplier, 0: adder/subtractor
    logic        sub;      // adder only: 0 a + b, 1 a - b
    addr_t       a;
    addr_t       b;
    addr_t       d;
    logic [6:0]  rep;      // extra in-place squarings after the first product
    logic        last;     // last operation of the program
  } ucode_t;

  typedef enum logic [1:0] {
    PRG_INIT   = 2'd0,   // randomize projective coordinates of R1
    PRG_LADDER = 2'd1,   // one Montgomery ladder step
    PRG_INVERT = 2'd2    // affine conversion by Fermat's little theorem
  } prog_e;

  // Command/response protocol of the core.
  typedef enum logic [1:0] {
    CMD_LOAD_K = 2'd0,   // data: secret scalar k (255 or 256 bits, clamped inside)
    CMD_LOAD_U = 2'd1,   // data: x coordinate of the input point
    CMD_RUN    = 2'd2    // start the scalar multiplication; response carries x(kP)
  } cmd_e;

  typedef enum logic [1:0] {
    RSP_ACK    = 2'd0,   // load command accepted
    RSP_RESULT = 2'd1,   // data holds the affine result
    RSP_ERROR  = 2'd2    // unknown command
  } rsp_e;

endpackage

// cnn_pkg -- shared types and constants of the two-cell chaotic CNN core.
//
// Every number the core stores is a 16-bit signed two's-complement
// fixed-point value in Q3.12 format: 1 sign bit, 3 integer bits and 12
// fraction bits, range -8 .. 7.99976, resolution 2^-12. The reset values of
// the parameter registers are the network of the reference design:
// p = 2, s = 1.2, sinusoid amplitude A = 4.04, sampling period T = 0.005 and
// initial state x(0) = (0.14, -0.1), each rounded to the nearest Q3.12 code.
// The register numbering used by the host link is this design's own choice.
package cnn_pkg;

  localparam int unsigned WORD_W = 16;  // width of every stored value
  localparam int unsigned FRAC_W = 12;  // fraction bits of Q3.12

  typedef logic signed [WORD_W-1:0] q3_12_t;

  localparam q3_12_t Q_ONE = 16'sd4096;       // 1.0

  // Reset values (nearest Q3.12 code of the reference parameters)
  localparam q3_12_t P_DEFAULT   = 16'sd8192;   // p   = 2.0
  localparam q3_12_t S_DEFAULT   = 16'sd4915;   // s   = 1.2     (1.19995)
  localparam q3_12_t AMP_DEFAULT = 16'sd16548;  // A   = 4.04    (4.04004)
  localparam q3_12_t T_DEFAULT   = 16'sd20;     // T   = 0.005   (0.00488)
  localparam q3_12_t X1_DEFAULT  = 16'sd573;    // x1(0) = 0.14  (0.13989)
  localparam q3_12_t X2_DEFAULT  = -16'sd410;   // x2(0) = -0.1  (-0.10010)

  // Parameter registers of the CNN circuit, as addressed by the host link.
  // A11..A22 are the four coupling weights of the two-cell template:
  //   cell 1: A11 * f(x1) + A12 * f(x2)   (p, -s)
  //   cell 2: A21 * f(x1) + A22 * f(x2)   (s,  p)
  typedef enum logic [2:0] {
    REG_X1_INIT = 3'd0,
    REG_X2_INIT = 3'd1,
    REG_A11     = 3'd2,
    REG_A12     = 3'd3,
    REG_A21     = 3'd4,
    REG_A22     = 3'd5,
    REG_T       = 3'd6,
    REG_AMP     = 3'd7
  } reg_addr_e;

  // Host link command bytes (upper nibble of the first byte)
  localparam logic [3:0] CMD_WRITE  = 4'h1;  // 0x1r, hi, lo : write register r
  localparam logic [7:0] CMD_START  = 8'h20; // initialise and run
  localparam logic [7:0] CMD_STOP   = 8'h21; // pause after the current iteration
  localparam logic [7:0] CMD_RESUME = 8'h22; // continue a paused run
  localparam logic [7:0] CMD_READ   = 8'h30; // 0x30, addr hi, addr lo : read cache
  localparam logic [7:0] CMD_STATUS = 8'h40; // read iteration count and flags

endpackage

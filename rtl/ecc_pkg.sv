// ecc_pkg: types and constants shared by the Enhanced Compression Code
// (ECC) decompressor.
//
// The ECC is a two-stage code. The first stage, the Integrated Compression
// Code (ICC), encodes alternating runs of 0s and 1s with either an
// Alternating Variable Run-length (AVR) codeword, a Golomb codeword with
// group size m = 16, or raw bypass bits. The second stage applies the
// nine-coded (9C) block code on top of the ICC bit stream. The decoder
// undoes the stages in reverse order: 9C first, then ICC.
//
// The 9C codewords and the Golomb group size are the published ones; the
// encodings of the multiplexer select and of the case numbers are this
// design's own.
package ecc_pkg;

  // Golomb group size used by the ICC (m = 16).
  localparam int unsigned GOLOMB_M = 16;

  // Source selected by the 9C output multiplexer for one K/2-bit half
  // (2-bit select: constant 0, constant 1, or the incoming data bit).
  typedef enum logic [1:0] {
    HALF_ZERO = 2'b00,
    HALF_ONE  = 2'b01,
    HALF_DATA = 2'b10
  } half_sel_e;

  // The nine 9C cases, numbered as in the code table (1..9).
  typedef enum logic [3:0] {
    C9_NONE    = 4'd0,
    C9_ALL0    = 4'd1,  // codeword 0
    C9_ALL1    = 4'd2,  // codeword 10
    C9_0_1     = 4'd3,  // codeword 11000: left 0s, right 1s
    C9_1_0     = 4'd4,  // codeword 11001: left 1s, right 0s
    C9_1_U     = 4'd5,  // codeword 11010 + right half
    C9_U_1     = 4'd6,  // codeword 11011 + left half
    C9_0_U     = 4'd7,  // codeword 11100 + right half
    C9_U_0     = 4'd8,  // codeword 11101 + left half
    C9_U_U     = 4'd9   // codeword 1111  + both halves
  } ninec_case_e;

  // Codeword type the ICC decoder starts on (select / bypass side band).
  typedef enum logic [1:0] {
    ICC_AVR    = 2'b00,
    ICC_GOLOMB = 2'b01,
    ICC_BYPASS = 2'b10
  } icc_mode_e;

endpackage

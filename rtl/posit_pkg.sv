// posit_pkg: types and constants shared by the light posit processing unit (PPU).
//
// The light PPU only converts numbers: between IEEE binary32 (FP32), two's-complement
// fixed point and the three posit formats posit<8,0>, posit<16,0> and posit<16,1>.
// Every converter goes through one common intermediate form, unum_t: a sign, a
// binary scale and a fraction below an implicit leading one, plus flags for zero
// and NaR (Not a Real) / NaN. Decoders produce it, encoders consume it.
//
// The operation list and the instruction fields follow the custom-0 ISA extension
// of the light PPU (major opcode 0x0b). The operation names use the RISC-V order
// FCVT.<destination>.<source>.
package posit_pkg;

  // Width of the intermediate fraction, MSB-aligned below the hidden one. 64 bits
  // hold every fraction bit of a 64-bit fixed-point operand.
  localparam int unsigned UFRAC_W = 64;
  // Width of the signed binary scale (exponent): FP32 needs -126..127.
  localparam int unsigned SCALE_W = 10;

  typedef struct packed {
    logic                       nar;    // NaR / NaN / infinity
    logic                       zero;   // exact zero
    logic                       sign;   // 1: negative
    logic signed [SCALE_W-1:0]  scale;  // value = (-1)^sign * 2^scale * 1.frac
    logic [UFRAC_W-1:0]         frac;   // fraction bits, MSB first
  } unum_t;

  // Instruction fields of the extension.
  localparam logic [6:0] OPC_CUSTOM0     = 7'b0001011;
  localparam logic [6:0] F7_FROM_POSIT   = 7'b1100000;
  localparam logic [6:0] F7_TO_POSIT     = 7'b1101000;
  localparam logic [4:0] RS2_P8          = 5'b00010;
  localparam logic [4:0] RS2_P16         = 5'b00011;

  // FP32 quiet NaN returned for a NaR operand.
  localparam logic [31:0] FP32_QNAN      = 32'h7FC0_0000;

  typedef enum logic [4:0] {
    OP_NONE           = 5'd0,   // not a light PPU instruction
    // posit -> FP32
    OP_S_P8           = 5'd1,   // FCVT.S.P8
    OP_S_P16_0        = 5'd2,   // FCVT.S.P16.0
    OP_S_P16_1        = 5'd3,   // FCVT.S.P16.1
    // FP32 -> posit
    OP_P8_S           = 5'd4,   // FCVT.P8.S
    OP_P16_0_S        = 5'd5,   // FCVT.P16.0.S
    OP_P16_1_S        = 5'd6,   // FCVT.P16.1.S
    // posit -> fixed point
    OP_H_P8           = 5'd7,   // FXCVT.H.P8     (16-bit, Q8.8)
    OP_W_P16_0        = 5'd8,   // FXCVT.W.P16.0  (32-bit, Q16.16)
    OP_L_P16_1        = 5'd9,   // FXCVT.L.P16.1  (64-bit, Q32.32)
    // fixed point -> posit
    OP_P8_H           = 5'd10,  // FXCVT.P8.H
    OP_P16_0_W        = 5'd11,  // FXCVT.P16.0.W
    OP_P16_1_L        = 5'd12,  // FXCVT.P16.1.L
    // posit -> posit
    OP_P8_P16_0       = 5'd13,  // FCVT.P8.P16.0
    OP_P16_0_P8       = 5'd14,  // FCVT.P16.0.P8
    OP_P16_1_P16_0    = 5'd15,  // FCVT.P16.1.P16.0
    OP_P16_1_P8       = 5'd16,  // FCVT.P16.1.P8
    OP_P8_P16_1       = 5'd17,  // FCVT.P8.P16.1
    OP_P16_0_P16_1    = 5'd18   // FCVT.P16.0.P16.1
  } ppu_op_e;

  // Fixed-point formats used by the FXCVT instructions: total width and
  // fraction bits. A posit<N,0> in [-1,1] maps onto N fraction bits by a left
  // shift of two places, so N fraction bits are kept for the ES=0 formats.
  localparam int unsigned FX_H_W = 16, FX_H_F = 8;
  localparam int unsigned FX_W_W = 32, FX_W_F = 16;
  localparam int unsigned FX_L_W = 64, FX_L_F = 32;

endpackage

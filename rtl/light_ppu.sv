// light_ppu: the combinational core of the light posit processing unit.
//
// Every converter of the unit sits side by side and sees the same 64-bit
// operand; each takes the low 8, 16, 32 or 64 bits it needs. An opcode
// multiplexer picks the result of the selected conversion:
//   posit -> FP32      P8_FP32, P160_FP32, P161_FP32
//   FP32  -> posit     FP32_P8, FP32_P160, FP32_P161
//   posit -> fixed     posit<8,0> to Q8.8 (16 bit), posit<16,0> to Q16.16
//                      (32 bit), posit<16,1> to Q32.32 (64 bit)
//   fixed -> posit     the reverse three
//   posit -> posit     all six pairs among posit<8,0>, <16,0>, <16,1>
// The six FP32 converters and the output multiplexer are the unit's published
// structure; the fixed-point and posit-to-posit converters complete the
// instruction set. Result formatting in the 64-bit register is this design's
// choice: posit and fixed-point results are sign-extended (they are two's
// complement integers), FP32 results are NaN-boxed (upper 32 bits set) as a
// RISC-V RV64 register holding a single-precision value expects. OP_NONE gives 0.
// Purely combinational: one conversion per cycle, no state.
module light_ppu
  import posit_pkg::*;
(
  input  ppu_op_e      op_i,
  input  logic [63:0]  operand_i,
  output logic [63:0]  result_o
);

  logic [7:0]  in8;
  logic [15:0] in16;
  logic [31:0] in32;

  assign in8  = operand_i[7:0];
  assign in16 = operand_i[15:0];
  assign in32 = operand_i[31:0];

  // posit -> FP32
  logic [31:0] s_p8, s_p160, s_p161;
  posit_to_fp32 #(.N(8),  .ES(0)) u_p8_fp32   (.posit_i(in8),  .fp_o(s_p8));
  posit_to_fp32 #(.N(16), .ES(0)) u_p160_fp32 (.posit_i(in16), .fp_o(s_p160));
  posit_to_fp32 #(.N(16), .ES(1)) u_p161_fp32 (.posit_i(in16), .fp_o(s_p161));

  // FP32 -> posit
  logic [7:0]  p8_s;
  logic [15:0] p160_s, p161_s;
  fp32_to_posit #(.N(8),  .ES(0)) u_fp32_p8   (.fp_i(in32), .posit_o(p8_s));
  fp32_to_posit #(.N(16), .ES(0)) u_fp32_p160 (.fp_i(in32), .posit_o(p160_s));
  fp32_to_posit #(.N(16), .ES(1)) u_fp32_p161 (.fp_i(in32), .posit_o(p161_s));

  // posit -> fixed point
  logic [FX_H_W-1:0] h_p8;
  logic [FX_W_W-1:0] w_p160;
  logic [FX_L_W-1:0] l_p161;
  posit_to_fixed #(.N(8),  .ES(0), .FW(FX_H_W), .FF(FX_H_F)) u_p8_h   (.posit_i(in8),  .fixed_o(h_p8));
  posit_to_fixed #(.N(16), .ES(0), .FW(FX_W_W), .FF(FX_W_F)) u_p160_w (.posit_i(in16), .fixed_o(w_p160));
  posit_to_fixed #(.N(16), .ES(1), .FW(FX_L_W), .FF(FX_L_F)) u_p161_l (.posit_i(in16), .fixed_o(l_p161));

  // fixed point -> posit
  logic [7:0]  p8_h;
  logic [15:0] p160_w, p161_l;
  fixed_to_posit #(.N(8),  .ES(0), .FW(FX_H_W), .FF(FX_H_F)) u_h_p8   (.fixed_i(operand_i[FX_H_W-1:0]), .posit_o(p8_h));
  fixed_to_posit #(.N(16), .ES(0), .FW(FX_W_W), .FF(FX_W_F)) u_w_p160 (.fixed_i(operand_i[FX_W_W-1:0]), .posit_o(p160_w));
  fixed_to_posit #(.N(16), .ES(1), .FW(FX_L_W), .FF(FX_L_F)) u_l_p161 (.fixed_i(operand_i[FX_L_W-1:0]), .posit_o(p161_l));

  // posit -> posit
  logic [7:0]  p8_p160, p8_p161;
  logic [15:0] p160_p8, p161_p160, p161_p8, p160_p161;
  posit_to_posit #(.NI(16), .ESI(0), .NO(8),  .ESO(0)) u_p160_p8   (.posit_i(in16), .posit_o(p8_p160));
  posit_to_posit #(.NI(8),  .ESI(0), .NO(16), .ESO(0)) u_p8_p160   (.posit_i(in8),  .posit_o(p160_p8));
  posit_to_posit #(.NI(16), .ESI(0), .NO(16), .ESO(1)) u_p160_p161 (.posit_i(in16), .posit_o(p161_p160));
  posit_to_posit #(.NI(8),  .ESI(0), .NO(16), .ESO(1)) u_p8_p161   (.posit_i(in8),  .posit_o(p161_p8));
  posit_to_posit #(.NI(16), .ESI(1), .NO(8),  .ESO(0)) u_p161_p8   (.posit_i(in16), .posit_o(p8_p161));
  posit_to_posit #(.NI(16), .ESI(1), .NO(16), .ESO(0)) u_p161_p160 (.posit_i(in16), .posit_o(p160_p161));

  // opcode multiplexer
  always_comb begin
    unique case (op_i)
      OP_S_P8:        result_o = {32'hFFFF_FFFF, s_p8};
      OP_S_P16_0:     result_o = {32'hFFFF_FFFF, s_p160};
      OP_S_P16_1:     result_o = {32'hFFFF_FFFF, s_p161};
      OP_P8_S:        result_o = 64'($signed(p8_s));
      OP_P16_0_S:     result_o = 64'($signed(p160_s));
      OP_P16_1_S:     result_o = 64'($signed(p161_s));
      OP_H_P8:        result_o = 64'($signed(h_p8));
      OP_W_P16_0:     result_o = 64'($signed(w_p160));
      OP_L_P16_1:     result_o = l_p161;
      OP_P8_H:        result_o = 64'($signed(p8_h));
      OP_P16_0_W:     result_o = 64'($signed(p160_w));
      OP_P16_1_L:     result_o = 64'($signed(p161_l));
      OP_P8_P16_0:    result_o = 64'($signed(p8_p160));
      OP_P16_0_P8:    result_o = 64'($signed(p160_p8));
      OP_P16_1_P16_0: result_o = 64'($signed(p161_p160));
      OP_P16_1_P8:    result_o = 64'($signed(p161_p8));
      OP_P8_P16_1:    result_o = 64'($signed(p8_p161));
      OP_P16_0_P16_1: result_o = 64'($signed(p160_p161));
      default:        result_o = '0;
    endcase
  end

endmodule

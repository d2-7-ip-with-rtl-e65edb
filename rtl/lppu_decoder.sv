// lppu_decoder: decodes the light PPU instructions of the RISC-V custom-0 space.
//
// All instructions are R-type words with major opcode 0001011 (0x0b). funct7
// 1100000 marks conversions out of a posit and 1101000 conversions into a posit;
// the rs2 field is not a register but selects the posit width (00010 for 8 bits,
// 00011 for 16 bits) and funct3 selects the other format and the posit exponent
// size. The table below reproduces the encodings of the extension; any other word
// decodes to OP_NONE. rd and rs1 are passed on unchanged. Combinational.
module lppu_decoder
  import posit_pkg::*;
(
  input  logic [31:0] instr_i,
  output ppu_op_e     op_o,
  output logic        valid_o,   // instruction belongs to the light PPU
  output logic [4:0]  rs1_o,
  output logic [4:0]  rd_o
);

  logic [6:0] funct7, opcode;
  logic [4:0] rs2;
  logic [2:0] funct3;

  always_comb begin
    funct7 = instr_i[31:25];
    rs2    = instr_i[24:20];
    funct3 = instr_i[14:12];
    opcode = instr_i[6:0];
    rs1_o  = instr_i[19:15];
    rd_o   = instr_i[11:7];
    op_o   = OP_NONE;
    if (opcode == OPC_CUSTOM0) begin
      unique case ({funct7, rs2, funct3})
        {F7_FROM_POSIT, RS2_P8,  3'b000}: op_o = OP_S_P8;
        {F7_FROM_POSIT, RS2_P16, 3'b000}: op_o = OP_S_P16_0;
        {F7_FROM_POSIT, RS2_P16, 3'b010}: op_o = OP_S_P16_1;
        {F7_TO_POSIT,   RS2_P8,  3'b000}: op_o = OP_P8_S;
        {F7_TO_POSIT,   RS2_P16, 3'b000}: op_o = OP_P16_0_S;
        {F7_TO_POSIT,   RS2_P16, 3'b010}: op_o = OP_P16_1_S;
        {F7_FROM_POSIT, RS2_P8,  3'b001}: op_o = OP_H_P8;
        {F7_FROM_POSIT, RS2_P16, 3'b001}: op_o = OP_W_P16_0;
        {F7_FROM_POSIT, RS2_P16, 3'b011}: op_o = OP_L_P16_1;
        {F7_TO_POSIT,   RS2_P8,  3'b001}: op_o = OP_P8_H;
        {F7_TO_POSIT,   RS2_P16, 3'b001}: op_o = OP_P16_0_W;
        {F7_TO_POSIT,   RS2_P16, 3'b011}: op_o = OP_P16_1_L;
        {F7_FROM_POSIT, RS2_P8,  3'b100}: op_o = OP_P8_P16_0;
        {F7_FROM_POSIT, RS2_P16, 3'b100}: op_o = OP_P16_0_P8;
        {F7_TO_POSIT,   RS2_P16, 3'b111}: op_o = OP_P16_1_P16_0;
        {F7_TO_POSIT,   RS2_P8,  3'b101}: op_o = OP_P16_1_P8;
        {F7_FROM_POSIT, RS2_P16, 3'b110}: op_o = OP_P8_P16_1;
        {F7_TO_POSIT,   RS2_P16, 3'b101}: op_o = OP_P16_0_P16_1;
        default:                          op_o = OP_NONE;
      endcase
    end
    valid_o = (op_o != OP_NONE);
  end

endmodule

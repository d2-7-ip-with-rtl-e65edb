// lppu_fu: the light PPU as a functional unit of a RISC-V execute stage.
//
// It sits beside the integer ALU (and the FPU, where the core has one) and takes
// the instructions of the posit conversion extension. Interface, all signals
// sampled on the rising clock edge:
//   issue     valid_i, instr_i (the 32-bit instruction word), rs1_i (operand
//             value read from the register file) and trans_id_i (a tag the core
//             uses to match the result, passed through);
//   accept    is_ppu_o tells, combinationally, whether instr_i belongs to this
//             unit, so the issue logic can steer it here;
//   writeback one cycle after an accepted issue: result_valid_o, result_o,
//             rd_o (destination register) and trans_id_o.
// The conversion itself is combinational (light_ppu); one register stage holds
// the result, so the latency is one cycle and one instruction can issue every
// cycle. Words that are not light PPU instructions are ignored. The handshake,
// the tag and the register stage are this design's choices. Reset is
// asynchronous, active low, and clears the valid flag.
module lppu_fu
  import posit_pkg::*;
#(
  parameter int unsigned TRANS_ID_W = 3
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic                  valid_i,
  input  logic [31:0]           instr_i,
  input  logic [63:0]           rs1_i,
  input  logic [TRANS_ID_W-1:0] trans_id_i,
  output logic                  is_ppu_o,
  output logic                  result_valid_o,
  output logic [63:0]           result_o,
  output logic [4:0]            rd_o,
  output logic [TRANS_ID_W-1:0] trans_id_o
);

  ppu_op_e     op;
  logic        is_ppu;
  logic [4:0]  rs1_idx, rd_idx;
  logic [63:0] result;

  lppu_decoder u_dec (
    .instr_i(instr_i),
    .op_o   (op),
    .valid_o(is_ppu),
    .rs1_o  (rs1_idx),
    .rd_o   (rd_idx)
  );

  light_ppu u_ppu (
    .op_i     (op),
    .operand_i(rs1_i),
    .result_o (result)
  );

  assign is_ppu_o = is_ppu;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      result_valid_o <= 1'b0;
      result_o       <= '0;
      rd_o           <= '0;
      trans_id_o     <= '0;
    end else begin
      result_valid_o <= valid_i && is_ppu;
      if (valid_i && is_ppu) begin
        result_o   <= result;
        rd_o       <= rd_idx;
        trans_id_o <= trans_id_i;
      end
    end
  end

  // a result only appears for an accepted instruction
  a_result_follows_issue: assert property (@(posedge clk_i) disable iff (!rst_ni)
    result_valid_o |-> $past(valid_i && is_ppu));

endmodule

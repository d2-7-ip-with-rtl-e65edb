// tb_lppu_decoder: checks the instruction decoder against the encoding table of
// the extension, written out here as 32-bit words, with random rs1 and rd
// fields. Words that differ in the major opcode, funct7, the rs2 width field or
// an unused funct3 value, and random words, must not decode.
module tb_lppu_decoder;
  import posit_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] instr;
  ppu_op_e     op;
  logic        valid;
  logic [4:0]  rs1, rd;
  lppu_decoder dut (.instr_i(instr), .op_o(op), .valid_o(valid), .rs1_o(rs1), .rd_o(rd));

  typedef struct { string name; logic [31:0] word; ppu_op_e op; } entry_t;
  entry_t table_q[$];

  // funct7 | rs2 | rs1 | funct3 | rd | opcode, with rs1 = rd = 0
  function automatic logic [31:0] enc(input logic [6:0] f7, input logic [4:0] r2, input logic [2:0] f3);
    return {f7, r2, 5'd0, f3, 5'd0, 7'b0001011};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    bit hit;
    int bitpos;
    table_q.push_back('{"FCVT.S.P8",        enc(7'b1100000, 5'b00010, 3'b000), OP_S_P8});
    table_q.push_back('{"FCVT.S.P16.0",     enc(7'b1100000, 5'b00011, 3'b000), OP_S_P16_0});
    table_q.push_back('{"FCVT.S.P16.1",     enc(7'b1100000, 5'b00011, 3'b010), OP_S_P16_1});
    table_q.push_back('{"FCVT.P8.S",        enc(7'b1101000, 5'b00010, 3'b000), OP_P8_S});
    table_q.push_back('{"FCVT.P16.0.S",     enc(7'b1101000, 5'b00011, 3'b000), OP_P16_0_S});
    table_q.push_back('{"FCVT.P16.1.S",     enc(7'b1101000, 5'b00011, 3'b010), OP_P16_1_S});
    table_q.push_back('{"FXCVT.H.P8",       enc(7'b1100000, 5'b00010, 3'b001), OP_H_P8});
    table_q.push_back('{"FXCVT.W.P16.0",    enc(7'b1100000, 5'b00011, 3'b001), OP_W_P16_0});
    table_q.push_back('{"FXCVT.L.P16.1",    enc(7'b1100000, 5'b00011, 3'b011), OP_L_P16_1});
    table_q.push_back('{"FXCVT.P8.H",       enc(7'b1101000, 5'b00010, 3'b001), OP_P8_H});
    table_q.push_back('{"FXCVT.P16.0.W",    enc(7'b1101000, 5'b00011, 3'b001), OP_P16_0_W});
    table_q.push_back('{"FXCVT.P16.1.L",    enc(7'b1101000, 5'b00011, 3'b011), OP_P16_1_L});
    table_q.push_back('{"FCVT.P8.P16.0",    enc(7'b1100000, 5'b00010, 3'b100), OP_P8_P16_0});
    table_q.push_back('{"FCVT.P16.0.P8",    enc(7'b1100000, 5'b00011, 3'b100), OP_P16_0_P8});
    table_q.push_back('{"FCVT.P16.1.P16.0", enc(7'b1101000, 5'b00011, 3'b111), OP_P16_1_P16_0});
    table_q.push_back('{"FCVT.P16.1.P8",    enc(7'b1101000, 5'b00010, 3'b101), OP_P16_1_P8});
    table_q.push_back('{"FCVT.P8.P16.1",    enc(7'b1100000, 5'b00011, 3'b110), OP_P8_P16_1});
    table_q.push_back('{"FCVT.P16.0.P16.1", enc(7'b1101000, 5'b00011, 3'b101), OP_P16_0_P16_1});

    foreach (table_q[i]) begin
      for (int n = 0; n < 20; n++) begin
        x = table_q[i].word;
        x[19:15] = 5'($urandom);
        x[11:7]  = 5'($urandom);
        instr = x;
        #1;
        check(valid && op == table_q[i].op, $sformatf("%s: op %s", table_q[i].name, op.name()));
        check(rs1 == x[19:15] && rd == x[11:7], $sformatf("%s: register fields", table_q[i].name));
        // single-bit changes outside rs1/rd must not decode to the same operation
        bitpos = int'($urandom % 7);
        x[bitpos] = ~x[bitpos];              // opcode
        instr = x; #1;
        check(!valid && op == OP_NONE, $sformatf("%s with bad opcode decoded", table_q[i].name));
      end
      x = table_q[i].word; x[27] ^= 1'b1;    // funct7 change
      instr = x; #1;
      check(!valid, $sformatf("%s with bad funct7 decoded", table_q[i].name));
      x = table_q[i].word; x[24] ^= 1'b1;    // rs2 width field change
      instr = x; #1;
      check(!valid, $sformatf("%s with bad rs2 field decoded", table_q[i].name));
    end
    // random words: valid only if they match a table entry
    for (int n = 0; n < 20000; n++) begin
      x = $urandom;
      if (n % 2 == 0) x[6:0] = 7'b0001011;
      if (n % 4 == 0) x[31:25] = (n % 8 == 0) ? 7'b1100000 : 7'b1101000;
      if (n % 4 == 0) x[24:20] = {4'b0001, 1'($urandom)};
      instr = x;
      #1;
      hit = 0;
      foreach (table_q[i]) begin
        if ({x[31:20], x[14:12], x[6:0]} == {table_q[i].word[31:20], table_q[i].word[14:12], table_q[i].word[6:0]}) begin
          hit = 1;
          check(op == table_q[i].op, $sformatf("random %h op %s exp %s", x, op.name(), table_q[i].op.name()));
        end
      end
      check(valid == hit, $sformatf("random %h valid %0b exp %0b", x, valid, hit));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_light_ppu: drives every operation of the combinational light PPU with
// random operands suited to it and compares the 64-bit result, including its
// sign extension or NaN-boxing, with the bit-serial reference. OP_NONE must give
// zero.
module tb_light_ppu;
  import posit_pkg::*;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ppu_op_e     op;
  logic [63:0] a, r;
  light_ppu dut (.op_i(op), .operand_i(a), .result_o(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    ppu_op_e o;
    o = o.first();
    forever begin
      for (int n = 0; n < 2000; n++) begin
        op = o;
        a  = ppu_operand(o);
        if (n == 0) a = 0;
        if (n == 1) a = 64'h80;               // P8 NaR
        if (n == 2) a = 64'h8000;             // P16 NaR
        if (n == 3) a = 64'h7F80_0000;        // +inf
        #1;
        e = ppu_expected(o, a);
        check(r == e, $sformatf("%s a=%h got %h exp %h", o.name(), a, r, e));
      end
      if (o == o.last()) break;
      o = o.next();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

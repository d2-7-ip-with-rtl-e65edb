// tb_posit_to_fp32: exhaustive check of the posit-to-binary32 converter for
// posit<8,0>, posit<16,0> and posit<16,1>. Every posit value is exact in
// binary32, so the expected word is the bit-serial reference value re-encoded;
// zero must give +0.0 and NaR the quiet NaN 0x7FC00000.
module tb_posit_to_fp32;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  p8;   logic [31:0] f8;
  logic [15:0] p16;  logic [31:0] f160, f161;
  posit_to_fp32 #(.N(8),  .ES(0)) dut8   (.posit_i(p8),  .fp_o(f8));
  posit_to_fp32 #(.N(16), .ES(0)) dut160 (.posit_i(p16), .fp_o(f160));
  posit_to_fp32 #(.N(16), .ES(1)) dut161 (.posit_i(p16), .fp_o(f161));
  logic [31:0] f162;
  posit_to_fp32 #(.N(16), .ES(2)) dut162 (.posit_i(p16), .fp_o(f162));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] expected(input logic [15:0] p, input int n, input int es);
    bit nar;
    real v;
    v = posit_value(64'(p), n, es, nar);
    if (nar) return 32'h7FC0_0000;
    return fp32_bits(v);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int v = 0; v < 256; v++) begin
      p8 = 8'(v);
      #1;
      e = expected(16'(v), 8, 0);
      check(f8 == e, $sformatf("P8 %h got %h exp %h", v, f8, e));
    end
    for (int v = 0; v < 65536; v++) begin
      p16 = 16'(v);
      #1;
      e = expected(16'(v), 16, 0);
      check(f160 == e, $sformatf("P16,0 %h got %h exp %h", v, f160, e));
      e = expected(16'(v), 16, 1);
      check(f161 == e, $sformatf("P16,1 %h got %h exp %h", v, f161, e));
    end
    // worked example of the posit format: 0100001000000000 as posit<16,2> is
    // sign 0, regime 10 (k = 0), exponent 00, fraction 01000000000 = 1.25
    p16 = 16'h4200;
    #1;
    check(f162 == 32'h3FA0_0000, $sformatf("posit<16,2> 0x4200 must be 1.25, got %h", f162));
    check(f160 == 32'h3F88_0000, $sformatf("posit<16,0> 0x4200 must be 1.0625, got %h", f160));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

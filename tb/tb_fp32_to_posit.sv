// tb_fp32_to_posit: checks the binary32-to-posit converter for posit<8,0>,
// posit<16,0> and posit<16,1>. Every posit value is sent through as a float and
// must come back as the same word; random floats over a wide exponent range must
// give the posit nearest toward zero (saturating at maxpos / minpos), found by a
// binary search over the bit-serial reference. Zeros, subnormals, infinities and
// NaNs are checked separately.
module tb_fp32_to_posit;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] f;
  logic [7:0]  p8;
  logic [15:0] p160, p161;
  fp32_to_posit #(.N(8),  .ES(0)) dut8   (.fp_i(f), .posit_o(p8));
  fp32_to_posit #(.N(16), .ES(0)) dut160 (.fp_i(f), .posit_o(p160));
  fp32_to_posit #(.N(16), .ES(1)) dut161 (.fp_i(f), .posit_o(p161));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic check_all(input logic [31:0] x);
    bit sp;
    real v;
    logic [63:0] e8, e160, e161;
    f = x;
    #1;
    v = fp32_value(x, sp);
    if (sp) begin
      e8 = 64'h80; e160 = 64'h8000; e161 = 64'h8000;
    end else if (x[30:23] == 0) begin
      e8 = 0; e160 = 0; e161 = 0;
    end else begin
      e8 = posit_trunc(v, 8, 0); e160 = posit_trunc(v, 16, 0); e161 = posit_trunc(v, 16, 1);
    end
    check(p8   == e8[7:0],   $sformatf("P8   %h got %h exp %h", x, p8, e8[7:0]));
    check(p160 == e160[15:0], $sformatf("P160 %h got %h exp %h", x, p160, e160[15:0]));
    check(p161 == e161[15:0], $sformatf("P161 %h got %h exp %h", x, p161, e161[15:0]));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit nar;
    logic [31:0] x;
    // round trips of every posit value
    for (int v = 1; v < 65536; v++) begin
      if (v == 32768) continue;
      f = fp32_bits(posit_value(64'(v), 16, 0, nar));
      #1;
      check(p160 == 16'(v), $sformatf("round trip P16,0 %h got %h", v, p160));
      f = fp32_bits(posit_value(64'(v), 16, 1, nar));
      #1;
      check(p161 == 16'(v), $sformatf("round trip P16,1 %h got %h", v, p161));
    end
    for (int v = 1; v < 256; v++) begin
      if (v == 128) continue;
      f = fp32_bits(posit_value(64'(v), 8, 0, nar));
      #1;
      check(p8 == 8'(v), $sformatf("round trip P8 %h got %h", v, p8));
    end
    // specials
    check_all(32'h0000_0000); check_all(32'h8000_0000);   // +-0
    check_all(32'h0000_0001); check_all(32'h807F_FFFF);   // subnormals
    check_all(32'h7F80_0000); check_all(32'hFF80_0000);   // +-inf
    check_all(32'h7FC0_0000); check_all(32'h7F80_0001);   // NaNs
    check_all(32'h7F7F_FFFF); check_all(32'h0080_0000);   // largest / smallest normal
    // random floats, exponents within +-64 of 1.0 plus a few anywhere
    for (int n = 0; n < 20000; n++) begin
      x = $urandom;
      if (n % 8 != 0) x[30:23] = 8'(127 - 64 + ($urandom % 129));
      check_all(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

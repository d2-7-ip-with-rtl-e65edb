// tb_fixed_to_posit: checks the fixed-point-to-posit converters: Q8.8 to
// posit<8,0>, Q16.16 to posit<16,0> and Q32.32 to posit<16,1>. Every posit value,
// written in fixed point, must come back as the same word; random fixed-point
// values of all magnitudes must give the posit nearest toward zero (saturating),
// found by a binary search over the bit-serial reference.
module tb_fixed_to_posit;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] h;  logic [7:0]  p8;
  logic [31:0] w;  logic [15:0] p160;
  logic [63:0] l;  logic [15:0] p161;
  fixed_to_posit #(.N(8),  .ES(0), .FW(16), .FF(8))  dut_h (.fixed_i(h), .posit_o(p8));
  fixed_to_posit #(.N(16), .ES(0), .FW(32), .FF(16)) dut_w (.fixed_i(w), .posit_o(p160));
  fixed_to_posit #(.N(16), .ES(1), .FW(64), .FF(32)) dut_l (.fixed_i(l), .posit_o(p161));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // random value of a random magnitude, at most 50 significant bits so that the
  // double used by the reference holds it exactly
  function automatic logic [63:0] rand_fixed(input int fw);
    logic [63:0] x;
    int top;
    x = {$urandom, $urandom} >> ($urandom % 64);
    for (top = 63; top > 0 && !x[top]; top--) ;
    if (top > 50) x = x & ~((64'd1 << (top - 50)) - 1);
    if (fw < 64) x = x & ((64'd1 << fw) - 1);
    return x;
  endfunction

  function automatic real sval(input logic [63:0] x, input int fw, input int ff);
    longint s;
    s = (fw == 64) ? longint'(x) : (longint'(x << (64 - fw)) >>> (64 - fw));
    return real'(s) / (2.0 ** ff);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit nar;
    logic [63:0] x, e;
    // round trips
    for (int v = 0; v < 65536; v++) begin
      if (v == 32768) continue;
      w = 32'(longint'(posit_value(64'(v), 16, 0, nar) * (2.0 ** 16)));
      l = 64'(longint'(posit_value(64'(v), 16, 1, nar) * (2.0 ** 32)));
      #1;
      check(p160 == 16'(v), $sformatf("round trip P16,0 %h got %h", v, p160));
      check(p161 == 16'(v), $sformatf("round trip P16,1 %h got %h", v, p161));
    end
    for (int v = 0; v < 256; v++) begin
      if (v == 128) continue;
      h = 16'(longint'(posit_value(64'(v), 8, 0, nar) * (2.0 ** 8)));
      #1;
      check(p8 == 8'(v), $sformatf("round trip P8 %h got %h", v, p8));
    end
    // random values
    for (int n = 0; n < 20000; n++) begin
      x = rand_fixed(16); h = x[15:0];
      x = rand_fixed(32); w = x[31:0];
      x = rand_fixed(64); l = x;
      if (n == 1) begin h = 16'h8000; w = 32'h8000_0000; l = 64'h8000_0000_0000_0000; end
      #1;
      e = posit_trunc(sval(64'(h), 16, 8), 8, 0);
      check(p8 == e[7:0], $sformatf("Q8.8 %h got %h exp %h", h, p8, e[7:0]));
      e = posit_trunc(sval(64'(w), 32, 16), 16, 0);
      check(p160 == e[15:0], $sformatf("Q16.16 %h got %h exp %h", w, p160, e[15:0]));
      e = posit_trunc(sval(l, 64, 32), 16, 1);
      check(p161 == e[15:0], $sformatf("Q32.32 %h got %h exp %h", l, p161, e[15:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_posit_to_fixed: exhaustive check of the posit-to-fixed-point converters
// the unit uses: posit<8,0> to Q8.8 (16 bit), posit<16,0> to Q16.16 (32 bit) and
// posit<16,1> to Q32.32 (64 bit). Each posit value times 2^fraction-bits is an
// exact integer; NaR must give the most negative word. For |x| <= 1 with ES = 0
// the result must also equal the posit shifted left by two places.
module tb_posit_to_fixed;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  p8;   logic [15:0] h;
  logic [15:0] p16;  logic [31:0] w;  logic [63:0] l;
  posit_to_fixed #(.N(8),  .ES(0), .FW(16), .FF(8))  dut_h (.posit_i(p8),  .fixed_o(h));
  posit_to_fixed #(.N(16), .ES(0), .FW(32), .FF(16)) dut_w (.posit_i(p16), .fixed_o(w));
  posit_to_fixed #(.N(16), .ES(1), .FW(64), .FF(32)) dut_l (.posit_i(p16), .fixed_o(l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic longint expected(input logic [15:0] p, input int n, input int es,
                                      input int fw, input int ff);
    bit nar;
    real v;
    v = posit_value(64'(p), n, es, nar);
    if (nar) return -(longint'(1) <<< (fw - 1));
    return longint'(v * (2.0 ** ff));
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int v = 0; v < 256; v++) begin
      p8 = 8'(v);
      #1;
      e = expected(16'(v), 8, 0, 16, 8);
      check(longint'($signed(h)) == e, $sformatf("P8->Q8.8 %h got %h exp %h", v, h, e));
      if (v <= 8'h40) check(h == 16'(v << 2), $sformatf("P8 shift rule %h", v));
    end
    for (int v = 0; v < 65536; v++) begin
      p16 = 16'(v);
      #1;
      e = expected(16'(v), 16, 0, 32, 16);
      check(longint'($signed(w)) == e, $sformatf("P16,0->Q16.16 %h got %h exp %h", v, w, e));
      if (v <= 16'h4000) check(w == 32'(v << 2), $sformatf("P16,0 shift rule %h", v));
      e = expected(16'(v), 16, 1, 64, 32);
      check($signed(l) == e, $sformatf("P16,1->Q32.32 %h got %h exp %h", v, l, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

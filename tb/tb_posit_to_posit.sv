// tb_posit_to_posit: exhaustive check of the six conversions among posit<8,0>,
// posit<16,0> and posit<16,1>. The expected word is the posit of the output
// format nearest toward zero to the input's value (saturating at maxpos /
// minpos); zero and NaR map to zero and NaR.
module tb_posit_to_posit;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8;
  logic [15:0] a16;
  logic [7:0]  o8_160, o8_161;
  logic [15:0] o160_8, o161_8, o161_160, o160_161;
  posit_to_posit #(.NI(16), .ESI(0), .NO(8),  .ESO(0)) d0 (.posit_i(a16), .posit_o(o8_160));
  posit_to_posit #(.NI(16), .ESI(1), .NO(8),  .ESO(0)) d1 (.posit_i(a16), .posit_o(o8_161));
  posit_to_posit #(.NI(8),  .ESI(0), .NO(16), .ESO(0)) d2 (.posit_i(a8),  .posit_o(o160_8));
  posit_to_posit #(.NI(8),  .ESI(0), .NO(16), .ESO(1)) d3 (.posit_i(a8),  .posit_o(o161_8));
  posit_to_posit #(.NI(16), .ESI(0), .NO(16), .ESO(1)) d4 (.posit_i(a16), .posit_o(o161_160));
  posit_to_posit #(.NI(16), .ESI(1), .NO(16), .ESO(0)) d5 (.posit_i(a16), .posit_o(o160_161));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] conv(input logic [15:0] p, input int ni, input int esi,
                                       input int no, input int eso);
    bit nar;
    real v;
    logic [63:0] r;
    v = posit_value(64'(p), ni, esi, nar);
    if (nar) return 16'(64'd1 << (no - 1));
    r = posit_trunc(v, no, eso);
    return r[15:0];
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e;
    a8 = 0;
    for (int v = 0; v < 65536; v++) begin
      a16 = 16'(v);
      if (v < 256) a8 = 8'(v);
      #1;
      e = conv(16'(v), 16, 0, 8, 0);
      check(o8_160 == e[7:0], $sformatf("P16,0->P8 %h got %h exp %h", v, o8_160, e[7:0]));
      e = conv(16'(v), 16, 1, 8, 0);
      check(o8_161 == e[7:0], $sformatf("P16,1->P8 %h got %h exp %h", v, o8_161, e[7:0]));
      e = conv(16'(v), 16, 0, 16, 1);
      check(o161_160 == e, $sformatf("P16,0->P16,1 %h got %h exp %h", v, o161_160, e));
      e = conv(16'(v), 16, 1, 16, 0);
      check(o160_161 == e, $sformatf("P16,1->P16,0 %h got %h exp %h", v, o160_161, e));
      if (v < 256) begin
        e = conv(16'(v), 8, 0, 16, 0);
        check(o160_8 == e, $sformatf("P8->P16,0 %h got %h exp %h", v, o160_8, e));
        e = conv(16'(v), 8, 0, 16, 1);
        check(o161_8 == e, $sformatf("P8->P16,1 %h got %h exp %h", v, o161_8, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

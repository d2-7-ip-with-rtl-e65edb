// tb_posit_regime_encode: checks the regime field and regime length for every
// legal regime value of 16-bit and 8-bit posits. The expected word is built bit
// by bit from the run-length rule: k >= 0 gives k+1 ones and a zero, k < 0 gives
// -k zeros and a one, after a zero sign bit.
module tb_posit_regime_encode;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [9:0] k16, k8;
  logic [15:0] r16;  logic [4:0] l16;
  logic [7:0]  r8;   logic [3:0] l8;
  posit_regime_encode #(.N(16)) dut16 (.k_i(k16), .regime_o(r16), .len_o(l16));
  posit_regime_encode #(.N(8))  dut8  (.k_i(k8),  .regime_o(r8),  .len_o(l8));

  // expected regime word and length (with terminating bit, capped at n-1)
  function automatic void expect_regime(input int k, input int n,
                                        output logic [15:0] w, output int len);
    int pos, run;
    bit b;
    w   = '0;
    b   = (k >= 0);
    run = b ? k + 1 : -k;
    pos = n - 2;
    for (int i = 0; i < run && pos >= 0; i++) begin w[pos] = b; pos--; end
    if (pos >= 0) w[pos] = !b;
    len = run + 1;
    if (len > n - 1) len = n - 1;
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
    logic [15:0] w;
    int len;
    k8 = 0;
    for (int k = -14; k <= 14; k++) begin
      k16 = 10'(k);
      #1;
      expect_regime(k, 16, w, len);
      check(r16 == w, $sformatf("N=16 k=%0d got %h exp %h", k, r16, w));
      check(int'(l16) == len, $sformatf("N=16 k=%0d len %0d exp %0d", k, l16, len));
    end
    for (int k = -6; k <= 6; k++) begin
      k8 = 10'(k);
      #1;
      expect_regime(k, 8, w, len);
      check(r8 == w[7:0], $sformatf("N=8 k=%0d got %h exp %h", k, r8, w[7:0]));
      check(int'(l8) == len, $sformatf("N=8 k=%0d len %0d exp %0d", k, l8, len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_posit_regime_decode: exhaustive check over all positive 16-bit and 8-bit
// posit words. The expected run length and regime value come from counting equal
// bits after the sign bit.
module tb_posit_regime_decode;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a16;  logic signed [9:0] k16;  logic [3:0] l16;
  logic [7:0]  a8;   logic signed [9:0] k8;   logic [2:0] l8;
  posit_regime_decode #(.N(16)) dut16 (.abs_i(a16), .k_o(k16), .len_o(l16));
  posit_regime_decode #(.N(8))  dut8  (.abs_i(a8),  .k_o(k8),  .len_o(l8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic void count_run(input logic [15:0] a, input int n, output int run, output int k);
    bit b;
    int i;
    b = a[n-2];
    run = 0;
    i = n - 2;
    while (i >= 0 && a[i] == b) begin run++; i--; end
    k = b ? run - 1 : -run;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, k;
    a8 = 1;
    for (int v = 1; v < (1 << 15); v++) begin
      a16 = 16'(v);
      #1;
      count_run(a16, 16, run, k);
      check(int'(l16) == run, $sformatf("N=16 %h len %0d exp %0d", v, l16, run));
      check(int'(k16) == k,   $sformatf("N=16 %h k %0d exp %0d", v, k16, k));
    end
    for (int v = 1; v < (1 << 7); v++) begin
      a8 = 8'(v);
      #1;
      count_run(16'(v), 8, run, k);
      check(int'(l8) == run, $sformatf("N=8 %h len %0d exp %0d", v, l8, run));
      check(int'(k8) == k,   $sformatf("N=8 %h k %0d exp %0d", v, k8, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_posit_ffs: exhaustive check of the find-first-set block for a 15-bit input
// (the body of a 16-bit posit) and a random check at 64 bits. The expected index
// is found by scanning down from the top bit.
module tb_posit_ffs;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [14:0] in15;  logic [3:0] idx15;  logic f15;
  logic [63:0] in64;  logic [5:0] idx64;  logic f64;
  posit_ffs #(.W(15)) dut15 (.in_i(in15), .idx_o(idx15), .found_o(f15));
  posit_ffs #(.W(64)) dut64 (.in_i(in64), .idx_o(idx64), .found_o(f64));

  function automatic int top_bit(input logic [63:0] v, input int w);
    for (int i = w - 1; i >= 0; i--) if (v[i]) return i;
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    for (int v = 0; v < (1 << 15); v++) begin
      in15 = 15'(v);
      #1;
      t = top_bit(64'(v), 15);
      check(f15 == (t >= 0), $sformatf("found15 %h", v));
      if (t >= 0) check(int'(idx15) == t, $sformatf("idx15 %h got %0d exp %0d", v, idx15, t));
    end
    for (int n = 0; n < 5000; n++) begin
      in64 = {$urandom, $urandom} >> ($urandom % 64);
      if (n == 0) in64 = '0;
      #1;
      t = top_bit(in64, 64);
      check(f64 == (t >= 0), "found64");
      if (t >= 0) check(int'(idx64) == t, $sformatf("idx64 %h", in64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

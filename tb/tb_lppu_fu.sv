// tb_lppu_fu: end-to-end test of the light PPU functional unit at its default
// parameters. A random instruction stream mixes every conversion of the
// extension with ordinary RISC-V words that the unit must ignore, with idle
// cycles and back-to-back issue, and a reset in the middle. A scoreboard checks
// that each accepted instruction produces exactly one result one cycle later,
// with the right value, destination register and tag, and that nothing else
// produces a result. It also counts the unit's mechanisms (each operation,
// saturation to maxpos / minpos, NaR in and out, ignored words, back-to-back
// issue, the reset) and fails if any never happened.
module tb_lppu_fu;
  import posit_pkg::*;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        valid;
  logic [31:0] instr;
  logic [63:0] rs1;
  logic [2:0]  tid;
  logic        is_ppu, rvalid;
  logic [63:0] result;
  logic [4:0]  rd;
  logic [2:0]  tid_o;

  always #5 clk = ~clk;

  lppu_fu dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .instr_i(instr), .rs1_i(rs1),
    .trans_id_i(tid), .is_ppu_o(is_ppu), .result_valid_o(rvalid), .result_o(result),
    .rd_o(rd), .trans_id_o(tid_o)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  localparam int NUM_OPS = 19;
  int op_count[NUM_OPS];
  int n_sat_max = 0, n_sat_min = 0, n_nar_in = 0, n_nar_out = 0, n_ignored = 0;
  int n_b2b = 0, n_idle = 0, n_reset = 0, n_results = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ppu_op_e     o;
    bit          exp_valid, last_acc;
    logic [63:0] exp_res;
    logic [4:0]  exp_rd;
    logic [2:0]  exp_tid;
    logic [4:0]  rdi;
    logic [15:0] pw;
    valid = 0; instr = 0; rs1 = 0; tid = 0;
    exp_valid = 0; last_acc = 0; exp_res = 0; exp_rd = 0; exp_tid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      // outputs now show the issue driven one cycle ago: one-cycle latency
      check(rvalid == exp_valid, $sformatf("result valid %0b exp %0b (cycle %0d)", rvalid, exp_valid, n));
      if (exp_valid && rvalid) begin
        n_results++;
        check(result == exp_res, $sformatf("%s result %h exp %h", o.name(), result, exp_res));
        check(rd == exp_rd && tid_o == exp_tid, "rd / trans_id");
      end
      if (n == 20000) begin
        // reset with a result pending: it must be dropped
        rst_n = 0; valid = 0; n_reset++;
        #1 check(!rvalid, "result valid during reset");
        @(negedge clk);
        rst_n = 1;
        exp_valid = 0; last_acc = 0;
        continue;
      end
      // drive the next issue slot
      o     = ppu_op_e'($urandom % NUM_OPS);
      rdi   = 5'($urandom);
      valid = ($urandom % 5 != 0);
      instr = ppu_instr(o, 5'($urandom), rdi);
      if (o == OP_NONE && ($urandom % 2)) instr = $urandom;   // any other word
      if (o == OP_NONE && instr[6:0] == 7'b0001011) instr[6:0] = 7'b0110011;
      rs1   = ppu_operand(o);
      if ($urandom % 16 == 0) rs1 = ($urandom % 2) ? 64'h80 : 64'h8000;      // NaR patterns
      tid   = 3'($urandom);
      #1;
      check(is_ppu == (o != OP_NONE), $sformatf("is_ppu for %s", o.name()));
      exp_valid = valid && (o != OP_NONE);
      if (exp_valid) begin
        exp_res = ppu_expected(o, rs1);
        exp_rd  = rdi;
        exp_tid = tid;
        op_count[int'(o)]++;
        if (last_acc) n_b2b++;
        if (o inside {OP_P8_S, OP_P16_0_S, OP_P16_1_S, OP_P8_H, OP_P16_0_W, OP_P16_1_L,
                      OP_P8_P16_0, OP_P8_P16_1, OP_P16_0_P16_1}) begin
          pw = exp_res[15:0];
          if (o inside {OP_P8_S, OP_P8_H, OP_P8_P16_0, OP_P8_P16_1}) pw = {8'h0, exp_res[7:0]};
          if (pw == 16'h7FFF || pw == 16'h007F || pw == 16'h8001 || pw == 16'h0081) n_sat_max++;
          if (pw == 16'h0001 || pw == 16'hFFFF || pw == 16'h00FF) n_sat_min++;
          if (pw == 16'h8000 || pw == 16'h0080) n_nar_out++;
        end
        if (rs1[15:0] == 16'h8000 || rs1[7:0] == 8'h80) n_nar_in++;
      end else if (valid) n_ignored++;
      else n_idle++;
      last_acc = exp_valid;
    end
    @(negedge clk);
    check(rvalid == exp_valid, "last result valid");
    if (exp_valid) check(result == exp_res, "last result");
    // every mechanism must have happened
    for (int i = 1; i < NUM_OPS; i++) begin
      check(op_count[i] > 0, $sformatf("operation %s never issued", ppu_op_e'(i)));
    end
    check(n_sat_max > 0, "no saturation to maxpos");
    check(n_sat_min > 0, "no saturation to minpos");
    check(n_nar_in > 0,  "no NaR operand");
    check(n_nar_out > 0, "no NaR result");
    check(n_ignored > 0, "no ignored instruction");
    check(n_b2b > 0,     "no back-to-back issue");
    check(n_idle > 0,    "no idle cycle");
    check(n_reset > 0,   "no reset during operation");
    $display("results=%0d back_to_back=%0d ignored=%0d idle=%0d sat_max=%0d sat_min=%0d nar_in=%0d nar_out=%0d",
             n_results, n_b2b, n_ignored, n_idle, n_sat_max, n_sat_min, n_nar_in, n_nar_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

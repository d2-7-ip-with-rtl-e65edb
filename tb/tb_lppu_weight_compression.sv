// tb_lppu_weight_compression: the weight-compression use of the light PPU.
//
// A synthetic layer of 2048 FP32 weights (roughly Gaussian, spread 0.1, the
// shape of trained convolutional-network weights) is compressed with
// FCVT.P8.S, FCVT.P16.0.S and FCVT.P16.1.S, issued back to back one per cycle,
// and then decompressed with FCVT.S.P8, FCVT.S.P16.0 and FCVT.S.P16.1. The test
// checks every compressed and decompressed word against the reference, that the
// unit keeps one result per cycle with a one-cycle latency for the whole stream,
// and reports the storage saved (4x for 8-bit posits, 2x for 16-bit posits) and
// the worst relative error of the round trip for each format.
module tb_lppu_weight_compression;
  import posit_pkg::*;
  import posit_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NW = 2048;

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

  logic [31:0] weights [NW];
  logic [63:0] packed_w [NW];
  logic [63:0] unpacked [NW];

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

  // stream NW instructions of one operation back to back; out[i] gets result i
  task automatic stream(input ppu_op_e op, input logic [63:0] src [NW], output logic [63:0] dst [NW],
                        output int cycles);
    int got;
    got = 0;
    cycles = 0;
    for (int i = 0; i <= NW; i++) begin
      @(negedge clk);
      if (rvalid) begin
        check(int'(tid_o) == ((got) % 8), "tag order");
        dst[got] = result;
        got++;
      end
      if (i < NW) begin
        valid = 1'b1;
        instr = ppu_instr(op, 5'd10, 5'd11);
        rs1   = src[i];
        tid   = 3'(i % 8);
      end else valid = 1'b0;
      cycles++;
    end
    check(got == NW, $sformatf("%s: %0d results for %0d issues in %0d cycles", op.name(), got, NW, cycles));
  endtask

  task automatic run_format(input ppu_op_e comp, input ppu_op_e decomp, input int bits,
                            input real minpos, input string name);
    logic [63:0] src [NW];
    int cyc_c, cyc_d;
    real maxrel, w, d, rel, aw, ad, se, sw;
    bit sp;
    for (int i = 0; i < NW; i++) src[i] = {32'hFFFF_FFFF, weights[i]};
    stream(comp, src, packed_w, cyc_c);
    for (int i = 0; i < NW; i++)
      check(packed_w[i] == ppu_expected(comp, src[i]), $sformatf("%s compress %0d", name, i));
    stream(decomp, packed_w, unpacked, cyc_d);
    maxrel = 0.0; se = 0.0; sw = 0.0;
    for (int i = 0; i < NW; i++) begin
      check(unpacked[i] == ppu_expected(decomp, packed_w[i]), $sformatf("%s decompress %0d", name, i));
      w = fp32_value(weights[i], sp);
      d = fp32_value(unpacked[i][31:0], sp);
      aw = (w >= 0) ? w : -w;
      ad = (d >= 0) ? d : -d;
      // magnitudes shrink (toward zero) unless below minpos, where they saturate up
      check((aw >= minpos) ? (ad <= aw) : (ad == minpos || w == 0.0),
            $sformatf("%s: round trip %0d w=%g d=%g", name, i, w, d));
      se += (w - d) * (w - d);
      sw += w * w;
      if (aw >= minpos) begin
        rel = (w - d) / w;
        if (rel < 0) rel = -rel;
        if (rel > maxrel) maxrel = rel;
      end
    end
    // one result per cycle: NW issues finish in NW+1 cycles
    check(cyc_c == NW + 1 && cyc_d == NW + 1, $sformatf("%s throughput", name));
    $display("%s: %0d weights, %0d -> %0d bytes (%0dx), compress %0d cycles, decompress %0d cycles, relative RMS error %g, worst relative error above minpos %g",
             name, NW, NW * 4, NW * bits / 8, 32 / bits, cyc_c, cyc_d, $sqrt(se / sw), maxrel);
  endtask

  initial begin
    int acc;
    valid = 0; instr = 0; rs1 = 0; tid = 0;
    // weights k / 2^20 with k roughly Gaussian, exact in binary32
    for (int i = 0; i < NW; i++) begin
      acc = 0;
      for (int j = 0; j < 4; j++) acc += int'($urandom % 104858) - 52429;
      weights[i] = (acc == 0) ? 32'h0 : fp32_bits(real'(acc) / (2.0 ** 20));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_format(OP_P8_S,    OP_S_P8,    8,  2.0 ** -6,  "posit(8,0)");
    run_format(OP_P16_0_S, OP_S_P16_0, 16, 2.0 ** -14, "posit(16,0)");
    run_format(OP_P16_1_S, OP_S_P16_1, 16, 2.0 ** -28, "posit(16,1)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

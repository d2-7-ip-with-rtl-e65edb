// posit_ref_pkg: bit-serial reference models for the light PPU testbenches.
//
// These functions follow the posit definition directly, one bit at a time, with
// real arithmetic, and share no code with the RTL. Posit<16,*> and posit<8,*>
// values, and every binary32 value, are exact in a double, so comparisons made
// with reals are exact.
package posit_ref_pkg;

  // Value of the posit word p (N bits, ES exponent bits); nar set for NaR.
  function automatic real posit_value(input logic [63:0] p, input int n, input int es,
                                      output bit nar);
    logic [63:0] mask, a;
    int idx, run, k, e, scale;
    bit b;
    real f, w;
    mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
    a    = p & mask;
    nar  = 0;
    if (a == 0) return 0.0;
    if (a == (64'd1 << (n - 1))) begin nar = 1; return 0.0; end
    if (a[n-1]) a = ((~a) + 1) & mask;
    idx = n - 2;
    b   = a[idx];
    run = 0;
    while (idx >= 0 && a[idx] == b) begin run++; idx--; end
    idx--;                                  // terminating bit
    k = b ? run - 1 : -run;
    e = 0;
    for (int i = 0; i < es; i++) begin
      e = e * 2;
      if (idx >= 0) begin e += a[idx]; idx--; end
    end
    f = 1.0; w = 0.5;
    while (idx >= 0) begin
      if (a[idx]) f += w;
      w = w / 2.0; idx--;
    end
    scale = k * (1 << es) + e;
    f = f * (2.0 ** scale);
    return p[n-1] ? -f : f;
  endfunction

  function automatic real fp32_value(input logic [31:0] x, output bit special);
    int be;
    real m;
    be = int'(x[30:23]);
    special = (be == 255);
    if (be == 0) m = real'(x[22:0]) / (2.0 ** 23) * (2.0 ** -126);   // subnormal / zero
    else         m = (1.0 + real'(x[22:0]) / (2.0 ** 23)) * (2.0 ** (be - 127));
    return x[31] ? -m : m;
  endfunction

  // Posit nearest to x toward zero, saturating to maxpos / minpos; 0 for 0.
  function automatic logic [63:0] posit_trunc(input real x, input int n, input int es);
    logic [63:0] lo, hi, mid, mask, r;
    real ax, v;
    bit nar;
    mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
    if (x == 0.0) return 0;
    ax = (x < 0) ? -x : x;
    lo = 1;                                 // minpos
    hi = (64'd1 << (n - 1)) - 1;            // maxpos
    if (posit_value(hi, n, es, nar) <= ax) r = hi;
    else if (posit_value(lo, n, es, nar) >= ax) r = lo;
    else begin
      // invariant: value(lo) <= ax < value(hi)
      while (hi - lo > 1) begin
        mid = (lo + hi) / 2;
        v = posit_value(mid, n, es, nar);
        if (v <= ax) lo = mid; else hi = mid;
      end
      r = lo;
    end
    return (x < 0) ? (((~r) + 1) & mask) : r;
  endfunction

  // binary32 word of a nonzero real that is exact in binary32 (normal range)
  function automatic logic [31:0] fp32_bits(input real x);
    real m;
    int  ex;
    logic [31:0] r;
    if (x == 0.0) return 32'h0;
    m  = (x < 0) ? -x : x;
    ex = 0;
    while (m >= 2.0) begin m = m / 2.0; ex++; end
    while (m < 1.0)  begin m = m * 2.0; ex--; end
    r[31]    = (x < 0);
    r[30:23] = 8'(ex + 127);
    r[22:0]  = 23'(longint'((m - 1.0) * (2.0 ** 23)));
    return r;
  endfunction

  // ---- whole-operation reference of the light PPU ------------------------------

  function automatic logic [63:0] sext(input logic [63:0] x, input int w);
    return (w == 64) ? x : 64'(longint'(x << (64 - w)) >>> (64 - w));
  endfunction

  function automatic logic [63:0] ref_to_fp32(input logic [63:0] p, input int n, input int es);
    bit nar;
    real v;
    v = posit_value(p, n, es, nar);
    return {32'hFFFF_FFFF, nar ? 32'h7FC0_0000 : fp32_bits(v)};
  endfunction

  function automatic logic [63:0] ref_from_fp32(input logic [31:0] x, input int n, input int es);
    bit sp;
    real v;
    v = fp32_value(x, sp);
    if (sp) return sext(64'd1 << (n - 1), n);
    if (x[30:23] == 0) return 0;
    return sext(posit_trunc(v, n, es), n);
  endfunction

  function automatic logic [63:0] ref_to_fixed(input logic [63:0] p, input int n, input int es,
                                               input int fw, input int ff);
    bit nar;
    real v;
    v = posit_value(p, n, es, nar);
    if (nar) return sext(64'd1 << (fw - 1), fw);
    return 64'(longint'(v * (2.0 ** ff)));
  endfunction

  function automatic logic [63:0] ref_from_fixed(input logic [63:0] x, input int fw, input int ff,
                                                 input int n, input int es);
    real v;
    v = real'(longint'(sext(x, fw))) / (2.0 ** ff);
    return sext(posit_trunc(v, n, es), n);
  endfunction

  function automatic logic [63:0] ref_posit_posit(input logic [63:0] p, input int ni, input int esi,
                                                  input int no, input int eso);
    bit nar;
    real v;
    v = posit_value(p, ni, esi, nar);
    if (nar) return sext(64'd1 << (no - 1), no);
    return sext(posit_trunc(v, no, eso), no);
  endfunction

  function automatic logic [63:0] ppu_expected(input posit_pkg::ppu_op_e op, input logic [63:0] a);
    case (op)
      posit_pkg::OP_S_P8:        return ref_to_fp32(a & 64'hFF, 8, 0);
      posit_pkg::OP_S_P16_0:     return ref_to_fp32(a & 64'hFFFF, 16, 0);
      posit_pkg::OP_S_P16_1:     return ref_to_fp32(a & 64'hFFFF, 16, 1);
      posit_pkg::OP_P8_S:        return ref_from_fp32(a[31:0], 8, 0);
      posit_pkg::OP_P16_0_S:     return ref_from_fp32(a[31:0], 16, 0);
      posit_pkg::OP_P16_1_S:     return ref_from_fp32(a[31:0], 16, 1);
      posit_pkg::OP_H_P8:        return ref_to_fixed(a & 64'hFF, 8, 0, 16, 8);
      posit_pkg::OP_W_P16_0:     return ref_to_fixed(a & 64'hFFFF, 16, 0, 32, 16);
      posit_pkg::OP_L_P16_1:     return ref_to_fixed(a & 64'hFFFF, 16, 1, 64, 32);
      posit_pkg::OP_P8_H:        return ref_from_fixed(a & 64'hFFFF, 16, 8, 8, 0);
      posit_pkg::OP_P16_0_W:     return ref_from_fixed(a & 64'hFFFF_FFFF, 32, 16, 16, 0);
      posit_pkg::OP_P16_1_L:     return ref_from_fixed(a, 64, 32, 16, 1);
      posit_pkg::OP_P8_P16_0:    return ref_posit_posit(a & 64'hFFFF, 16, 0, 8, 0);
      posit_pkg::OP_P16_0_P8:    return ref_posit_posit(a & 64'hFF, 8, 0, 16, 0);
      posit_pkg::OP_P16_1_P16_0: return ref_posit_posit(a & 64'hFFFF, 16, 0, 16, 1);
      posit_pkg::OP_P16_1_P8:    return ref_posit_posit(a & 64'hFF, 8, 0, 16, 1);
      posit_pkg::OP_P8_P16_1:    return ref_posit_posit(a & 64'hFFFF, 16, 1, 8, 0);
      posit_pkg::OP_P16_0_P16_1: return ref_posit_posit(a & 64'hFFFF, 16, 1, 16, 0);
      default:                   return 0;
    endcase
  endfunction

  // instruction word of an operation (encoding table of the extension)
  function automatic logic [31:0] ppu_instr(input posit_pkg::ppu_op_e op, input logic [4:0] rs1,
                                            input logic [4:0] rd);
    logic [6:0] f7;
    logic [4:0] r2;
    logic [2:0] f3;
    case (op)
      posit_pkg::OP_S_P8:        begin f7 = 7'b1100000; r2 = 5'b00010; f3 = 3'b000; end
      posit_pkg::OP_S_P16_0:     begin f7 = 7'b1100000; r2 = 5'b00011; f3 = 3'b000; end
      posit_pkg::OP_S_P16_1:     begin f7 = 7'b1100000; r2 = 5'b00011; f3 = 3'b010; end
      posit_pkg::OP_P8_S:        begin f7 = 7'b1101000; r2 = 5'b00010; f3 = 3'b000; end
      posit_pkg::OP_P16_0_S:     begin f7 = 7'b1101000; r2 = 5'b00011; f3 = 3'b000; end
      posit_pkg::OP_P16_1_S:     begin f7 = 7'b1101000; r2 = 5'b00011; f3 = 3'b010; end
      posit_pkg::OP_H_P8:        begin f7 = 7'b1100000; r2 = 5'b00010; f3 = 3'b001; end
      posit_pkg::OP_W_P16_0:     begin f7 = 7'b1100000; r2 = 5'b00011; f3 = 3'b001; end
      posit_pkg::OP_L_P16_1:     begin f7 = 7'b1100000; r2 = 5'b00011; f3 = 3'b011; end
      posit_pkg::OP_P8_H:        begin f7 = 7'b1101000; r2 = 5'b00010; f3 = 3'b001; end
      posit_pkg::OP_P16_0_W:     begin f7 = 7'b1101000; r2 = 5'b00011; f3 = 3'b001; end
      posit_pkg::OP_P16_1_L:     begin f7 = 7'b1101000; r2 = 5'b00011; f3 = 3'b011; end
      posit_pkg::OP_P8_P16_0:    begin f7 = 7'b1100000; r2 = 5'b00010; f3 = 3'b100; end
      posit_pkg::OP_P16_0_P8:    begin f7 = 7'b1100000; r2 = 5'b00011; f3 = 3'b100; end
      posit_pkg::OP_P16_1_P16_0: begin f7 = 7'b1101000; r2 = 5'b00011; f3 = 3'b111; end
      posit_pkg::OP_P16_1_P8:    begin f7 = 7'b1101000; r2 = 5'b00010; f3 = 3'b101; end
      posit_pkg::OP_P8_P16_1:    begin f7 = 7'b1100000; r2 = 5'b00011; f3 = 3'b110; end
      posit_pkg::OP_P16_0_P16_1: begin f7 = 7'b1101000; r2 = 5'b00011; f3 = 3'b101; end
      default:                   return {25'd0, 7'b0110011};   // an ordinary ADD
    endcase
    return {f7, r2, rs1, f3, rd, 7'b0001011};
  endfunction

  // random operand suited to the operation: floats with exponents near 1.0,
  // 64-bit fixed-point values with at most 50 significant bits (exact in a double)
  function automatic logic [63:0] ppu_operand(input posit_pkg::ppu_op_e op);
    logic [63:0] x;
    int top;
    x = {$urandom, $urandom};
    if (op inside {posit_pkg::OP_P8_S, posit_pkg::OP_P16_0_S, posit_pkg::OP_P16_1_S}
        && ($urandom % 8 != 0))
      x[30:23] = 8'(127 - 64 + ($urandom % 129));
    if (op == posit_pkg::OP_P16_1_L) begin
      x = x >> ($urandom % 64);
      for (top = 63; top > 0 && !x[top]; top--) ;
      if (top > 50) x = x & ~((64'd1 << (top - 50)) - 1);
    end
    if (op inside {posit_pkg::OP_P8_H, posit_pkg::OP_P16_0_W})
      x = x >> ($urandom % 48);
    return x;
  endfunction

endpackage

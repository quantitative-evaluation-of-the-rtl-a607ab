// fp_ref_pkg: reference IEEE 754 single-precision arithmetic for testbenches.
//
// The reference converts single-precision operands exactly to double
// precision, operates in double precision and rounds the result back to single
// precision (to nearest, ties to even, subnormals included). For one addition
// or multiplication of two single-precision numbers this double rounding gives
// the correctly rounded single-precision result, because the double format has
// more than twice the significand bits plus two. It shares no code with the
// hardware units. Every NaN is reported as the canonical quiet NaN 7FC00000,
// the encoding the hardware produces.
package fp_ref_pkg;

  function automatic real sp_to_real(logic [31:0] v);
    logic [63:0] d;
    logic [7:0]  e;
    logic [22:0] f;
    int          sh;
    e = v[30:23];
    f = v[22:0];
    if (e == 8'hFF) begin
      d = {v[31], 11'h7FF, (f != 0) ? 52'h8_0000_0000_0000 : 52'd0};
    end else if (e == 8'd0 && f == 23'd0) begin
      d = {v[31], 63'd0};
    end else if (e == 8'd0) begin
      // Subnormal: value f * 2^-149, renormalise.
      sh = 0;
      while (f[22] == 1'b0) begin
        f  = f << 1;
        sh = sh + 1;
      end
      f  = f << 1;  // drop the leading one
      d  = {v[31], 11'(1023 - 127 - sh), f, 29'd0};
    end else begin
      d = {v[31], 11'(int'(e) - 127 + 1023), f, 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_sp(real r);
    logic [63:0] d;
    logic [52:0] sig;
    int          es, shift;
    logic [52:0] keep;
    logic        g, st, inc;
    logic [30:0] packed_r;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF)
      return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 31'h7F80_0000};
    if (d[62:0] == 63'd0)
      return {d[63], 31'd0};
    sig = {1'b1, d[51:0]};
    es  = int'(d[62:52]) - 1023 + 127;
    shift = (es >= 1) ? 29 : 29 + 1 - es;
    if (shift > 60) begin
      keep = 0; g = 1'b0; st = 1'b1;
    end else begin
      keep = sig >> shift;
      g    = sig[shift-1];
      st   = (sig & ((53'd1 << (shift - 1)) - 53'd1)) != 0;
    end
    if (es >= 255) return {d[63], 31'h7F80_0000};
    inc = g & (st | keep[0]);
    packed_r = {((es >= 1) ? 8'(es) : 8'd0), keep[22:0]} + {30'd0, inc};
    return {d[63], packed_r};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return real_to_sp(sp_to_real(a) + sp_to_real(b));
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return real_to_sp(sp_to_real(a) * sp_to_real(b));
  endfunction

  // Random operand mixing ordinary values with the special classes.
  function automatic logic [31:0] rand_fp(int unsigned sel, int unsigned r1, int unsigned r2);
    case (sel % 16)
      0:       return {r1[31], 31'd0};                          // signed zero
      1:       return {r1[31], 8'd0, r2[22:0]};                 // subnormal
      2:       return {r1[31], 8'hFF, 23'd0};                   // infinity
      3:       return {r1[31], 8'hFF, r2[22:0] | 23'd1};        // NaN
      4:       return {r1[31], 8'(1 + r1[3:0]), r2[22:0]};      // tiny normal
      5:       return {r1[31], 8'(240 + r1[3:0]), r2[22:0]};    // huge normal
      default: return {r1[31], 8'(110 + (r1[10:4] % 36)), r2[22:0]};  // ordinary
    endcase
  endfunction

  function automatic logic same_fp(logic [31:0] x, logic [31:0] y);
    return x == y;
  endfunction

endpackage

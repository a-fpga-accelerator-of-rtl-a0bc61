// a3c_pkg: shared types, network geometry and IEEE-754 single-precision
// arithmetic for the A3C accelerator.
//
// All datapaths carry FP32 words, as the accelerator is specified for 32-bit
// floating point. The arithmetic below is written as automatic functions so
// every processing engine can instantiate the operators it needs as plain
// combinational logic:
//   fp_add / fp_mul / fp_div  round to nearest even; subnormals flush to zero
//   fp_rsqrt                  1/sqrt(x) through an integer square root
//   fp_exp                    2^k * 2^f, f in [-0.5,0.5] by a degree-8 series
//   fp_ln                     k*ln2 + 2*atanh((m-1)/(m+1)), m in [0.707,1.414)
// NaN is not produced or handled; overflow saturates to infinity.
//
// Network geometry (the 4-layer MLP of the Atari-RAM agent): 128 -> 256 ->
// 128 -> 64 -> (4 policy logits + 1 value). The value output is stored as a
// fifth row of the last layer, so actor and critic share one weight matrix.
// Parameters are laid out layer after layer, each layer as its weight matrix
// in row-major order (row = output neuron) followed by its biases.
package a3c_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_TWO  = 32'h4000_0000;
  localparam fp32_t FP_LN2  = 32'h3F31_7218;  // 0.693147
  localparam fp32_t FP_LOG2E = 32'h3FB8_AA3B; // 1.442695

  // ---------------- network geometry ----------------
  localparam int NUM_LAYERS = 4;
  localparam int STATE_DIM  = 128;
  localparam int NUM_ACT    = 4;
  localparam int OUT_ROWS   = NUM_ACT + 1;     // 4 policy logits + value

  function automatic int layer_in(input int l);   // l = 0..3
    case (l)
      0: return 128;
      1: return 256;
      2: return 128;
      default: return 64;
    endcase
  endfunction

  function automatic int layer_out(input int l);
    case (l)
      0: return 256;
      1: return 128;
      2: return 64;
      default: return OUT_ROWS;
    endcase
  endfunction

  // first parameter address of layer l (weights, then biases)
  function automatic int w_base(input int l);
    int b = 0;
    for (int i = 0; i < NUM_LAYERS; i++)
      if (i < l) b += layer_in(i) * layer_out(i) + layer_out(i);
    return b;
  endfunction

  function automatic int b_base(input int l);
    return w_base(l) + layer_in(l) * layer_out(l);
  endfunction

  localparam int NUM_PARAMS = 128*256 + 256 + 256*128 + 128 + 128*64 + 64 + 64*5 + 5; // 74501

  // activation store of one inference step: input, h1, h2, h3, outputs
  function automatic int act_base(input int l);   // l = 0 (state) .. 4 (outputs)
    case (l)
      0: return 0;
      1: return 128;
      2: return 384;
      3: return 512;
      default: return 576;
    endcase
  endfunction
  localparam int ACT_WORDS = 576 + OUT_ROWS;       // 581 words per step

  // sign-bit store of one step: h1, h2, h3 (ReLU layers only)
  function automatic int sgn_base(input int l);   // l = 0..2 (output of layer l)
    case (l)
      0: return 0;
      1: return 256;
      default: return 384;
    endcase
  endfunction
  localparam int SGN_BITS = 448;

  // address types: parameter memory and per-agent activation memory
  localparam int MAX_STEPS = 8;                    // steps stored per agent
  typedef logic [16:0] paddr_t;
  typedef logic [15:0] aaddr_t;
  typedef logic [12:0] saddr_t;                    // sign-bit address per agent

  // ---------------- FP32 arithmetic ----------------
  // Round and pack: value = m * 2^(e - 127 - 46); m == 0 gives zero.
  function automatic fp32_t fp_pack(input logic s, input int e, input logic [47:0] m);
    int p;
    logic [47:0] n;
    logic sticky;
    logic [24:0] r;
    logic guard, st;
    if (m == 0) return FP_ZERO;
    p = 0;
    for (int i = 0; i < 48; i++) if (m[i]) p = i;
    sticky = 1'b0;
    if (p > 46) begin
      sticky = m[0];
      n = m >> 1;
      e = e + 1;
    end else begin
      n = m << (46 - p);
      e = e - (46 - p);
    end
    guard = n[22];
    st    = (|n[21:0]) | sticky;
    r = {1'b0, n[46:23]};
    if (guard && (st || r[0])) r = r + 25'd1;
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return FP_ZERO;
    return {s, e[7:0], r[22:0]};
  endfunction

  function automatic logic fp_is_zero(input fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  function automatic fp32_t fp_neg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic [47:0] p;
    if (fp_is_zero(a) || fp_is_zero(b)) return FP_ZERO;
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    return fp_pack(a[31] ^ b[31], int'(a[30:23]) + int'(b[30:23]) - 127, p);
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t x, y;
    int d;
    logic [47:0] mx, my, m;
    logic st;
    if (fp_is_zero(a)) return fp_is_zero(b) ? FP_ZERO : b;
    if (fp_is_zero(b)) return a;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    d  = int'(x[30:23]) - int'(y[30:23]);
    mx = {24'd0, 1'b1, x[22:0]} << 23;
    my = {24'd0, 1'b1, y[22:0]} << 23;
    if (d > 47) begin
      st = 1'b1;
      my = 48'd0;
    end else begin
      st = 1'b0;
      for (int i = 0; i < 48; i++) if (i < d && my[i]) st = 1'b1;
      my = my >> d;
    end
    // the sticky bit sits below the rounding position and only breaks ties
    if (x[31] == y[31]) m = mx + my;
    else                m = mx - my - {47'd0, st};
    m = m | {47'd0, st};
    return fp_pack(x[31], int'(x[30:23]), m);
  endfunction

  function automatic fp32_t fp_sub(input fp32_t a, input fp32_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  function automatic fp32_t fp_div(input fp32_t a, input fp32_t b);
    logic [48:0] num, q;
    logic [23:0] den;
    logic [47:0] m;
    if (fp_is_zero(a)) return FP_ZERO;
    if (fp_is_zero(b)) return {a[31] ^ b[31], 8'hFF, 23'd0};
    num = {25'd0, 1'b1, a[22:0]} << 25;
    den = {1'b1, b[22:0]};
    q   = num / {25'd0, den};
    m   = {q[26:0], 21'd0} | {47'd0, (num % {25'd0, den}) != 0};
    return fp_pack(a[31] ^ b[31], int'(a[30:23]) - int'(b[30:23]) + 127, m);
  endfunction

  function automatic fp32_t fp_sqrt(input fp32_t a);
    int ue;
    logic [53:0] v, rem;
    logic [26:0] r;
    logic [53:0] t;
    if (fp_is_zero(a) || a[31]) return FP_ZERO;
    ue = int'(a[30:23]) - 127;
    v  = {30'd0, 1'b1, a[22:0]};
    if (ue % 2 != 0) begin
      v  = v << 1;
      ue = ue - 1;
    end
    v   = v << 29;
    r   = 27'd0;
    rem = v;
    for (int i = 26; i >= 0; i--) begin
      t = {27'd0, r | (27'd1 << i)};
      if (t * t <= v) r = r | (27'd1 << i);
    end
    rem = v - {27'd0, r} * {27'd0, r};
    return fp_pack(1'b0, ue / 2 + 127, {1'b0, r, 20'd0} | {47'd0, rem != 0});
  endfunction

  function automatic fp32_t fp_rsqrt(input fp32_t a);
    return fp_div(FP_ONE, fp_sqrt(a));
  endfunction

  function automatic fp32_t fp_from_int(input int v);
    logic s;
    logic [47:0] m;
    s = v < 0;
    m = {16'd0, s ? 32'(-v) : 32'(v)};
    return fp_pack(s, 127 + 46, m);
  endfunction

  // round to the nearest integer, for |a| < 2^9
  function automatic int fp_round_int(input fp32_t a);
    int ue;
    logic [40:0] t;
    int r;
    if (fp_is_zero(a)) return 0;
    ue = int'(a[30:23]) - 127;
    if (ue > 9) ue = 9;
    t = {17'd0, 1'b1, a[22:0]};
    if (ue >= 0) t = t << ue;
    else if (ue > -25) t = t >> (-ue);
    else t = 41'd0;
    r = int'((t + 41'(1 << 22)) >> 23);
    return a[31] ? -r : r;
  endfunction

  function automatic fp32_t fp_exp(input fp32_t a);
    fp32_t y, f, p;
    int k, e;
    // coefficients (ln2)^i / i!, i = 8 down to 0
    fp32_t c [9];
    c[0] = 32'h3F80_0000; c[1] = 32'h3F31_7218; c[2] = 32'h3E75_FDF0;
    c[3] = 32'h3D63_5847; c[4] = 32'h3C1D_955B; c[5] = 32'h3AAE_C3FF;
    c[6] = 32'h3921_8163; c[7] = 32'h377F_FE5F; c[8] = 32'h35B1_C20F;
    y = fp_mul(a, FP_LOG2E);
    if (!fp_is_zero(y) && y[30:23] >= 8'd134) // |y| >= 128
      return y[31] ? FP_ZERO : {1'b0, 8'hFF, 23'd0};
    k = fp_round_int(y);
    f = fp_sub(y, fp_from_int(k));
    p = c[8];
    for (int i = 7; i >= 0; i--) p = fp_add(fp_mul(p, f), c[i]);
    e = int'(p[30:23]) + k;
    if (e <= 0) return FP_ZERO;
    if (e >= 255) return {1'b0, 8'hFF, 23'd0};
    return {p[31], e[7:0], p[22:0]};
  endfunction

  // natural logarithm of a positive number (zero or negative gives -inf)
  function automatic fp32_t fp_ln(input fp32_t a);
    int ue;
    fp32_t m, s, s2, p, r;
    if (fp_is_zero(a) || a[31]) return {1'b1, 8'hFF, 23'd0};
    ue = int'(a[30:23]) - 127;
    m  = {1'b0, 8'd127, a[22:0]};
    if (a[22:0] > 23'h3504F3) begin   // mantissa above sqrt(2)
      m  = {1'b0, 8'd126, a[22:0]};
      ue = ue + 1;
    end
    s  = fp_div(fp_sub(m, FP_ONE), fp_add(m, FP_ONE));
    s2 = fp_mul(s, s);
    // 2*(s + s^3/3 + s^5/5 + s^7/7 + s^9/9)
    p  = 32'h3DE3_8E39;                               // 1/9
    p  = fp_add(fp_mul(p, s2), 32'h3E12_4925);        // 1/7
    p  = fp_add(fp_mul(p, s2), 32'h3E4C_CCCD);        // 1/5
    p  = fp_add(fp_mul(p, s2), 32'h3EAA_AAAB);        // 1/3
    p  = fp_add(fp_mul(p, s2), FP_ONE);
    r  = fp_mul(fp_mul(p, s), FP_TWO);
    return fp_add(r, fp_mul(fp_from_int(ue), FP_LN2));
  endfunction

  // ReLU and its sign capture
  function automatic logic fp_pos(input fp32_t a);
    return !a[31] && !fp_is_zero(a);
  endfunction

endpackage

// gl_pkg: types, instruction encoding and single-precision arithmetic shared by
// the graphics pipeline.
//
// Instruction word (32 bits): bit 31 = type, bits 30:8 = data, bits 7:0 = opcode.
// When type is set, data is the number of 32-bit argument words that follow the
// instruction word in the instruction cache. The opcode values are the ones of the
// pipeline's instruction set (17 OpenGL calls).
//
// All pipeline arithmetic is IEEE-754 single precision. The functions below are
// combinational models of the floating point units: round to nearest even,
// denormal inputs and results flushed to zero, overflow to infinity, no NaN
// propagation beyond passing an infinite/NaN operand through. This reduced
// exception handling is this design's choice; the original pipeline used
// generated vendor units.
package gl_pkg;

  typedef logic [31:0] float_t;

  localparam float_t FP_ZERO = 32'h0000_0000;
  localparam float_t FP_ONE  = 32'h3f80_0000;
  localparam float_t FP_HALF = 32'h3f00_0000;
  localparam float_t FP_63   = 32'h427c_0000;  // 63.0, full scale of a 6-bit channel
  localparam float_t FP_FLUSH = 32'hffff_ffff; // coordinate value that marks a flush

  typedef enum logic [7:0] {
    OP_NOP          = 8'h00,
    OP_BEGIN        = 8'h01,
    OP_END          = 8'h02,
    OP_VERTEX       = 8'h03,
    OP_COLOR        = 8'h04,
    OP_FLUSH        = 8'h05,
    OP_MATRIX_MODE  = 8'h10,
    OP_MULT_MATRIX  = 8'h11,
    OP_LOAD_IDENTITY= 8'h12,
    OP_LOAD_MATRIX  = 8'h13,
    OP_PUSH_MATRIX  = 8'h14,
    OP_POP_MATRIX   = 8'h15,
    OP_ROTATE       = 8'h16,
    OP_SCALE        = 8'h17,
    OP_TRANSLATE    = 8'h18,
    OP_VIEWPORT     = 8'h19,
    OP_FRUSTUM      = 8'h1a,
    OP_ORTHO        = 8'h1b
  } opcode_e;

  typedef struct packed {
    logic        is_type;  // argument words follow
    logic [22:0] data;     // argument count, or immediate
    logic [7:0]  opcode;
  } instr_t;

  // one vertex or one colour: three floats, x in the top word
  typedef struct packed {
    float_t x;
    float_t y;
    float_t z;
  } vec3_t;

  // 96-bit rasterizer output word
  typedef struct packed {
    logic [6:0]  pad_hi;   // 95:89
    logic [8:0]  y;        // 88:80
    logic [5:0]  pad_y;    // 79:74
    logic [9:0]  x;        // 73:64
    logic [7:0]  pad_c;    // 63:56
    logic [5:0]  red;      // 55:50
    logic [1:0]  pad_r;    // 49:48
    logic [5:0]  green;    // 47:42
    logic [1:0]  pad_g;    // 41:40
    logic [5:0]  blue;     // 39:34
    logic [1:0]  pad_b;    // 33:32
    float_t      z;        // 31:0
  } pixel_t;

  // four floats (a matrix row or column, or a homogeneous vector); element [i] is
  // row/column entry i
  typedef float_t [3:0] vec4_t;
  // 4x4 matrix, m[row][col]
  typedef vec4_t [3:0] mat4_t;

  function automatic mat4_t mat_identity();
    mat4_t m;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) m[r][c] = (r == c) ? FP_ONE : FP_ZERO;
    return m;
  endfunction

  // a pixel word of all ones is the flush token sent to the frame buffer writer
  localparam logic [95:0] PIXEL_FLUSH = '1;

  function automatic logic fp_is_zero(float_t a);
    return a[30:23] == 8'd0;
  endfunction

  // strictly negative (zero of either sign is not negative)
  function automatic logic fp_is_neg(float_t a);
    return a[31] && !fp_is_zero(a);
  endfunction

  // round a normalised 24-bit mantissa with guard/sticky, then pack
  function automatic float_t fp_pack(logic s, int e, logic [23:0] m, logic g, logic st);
    logic [24:0] r;
    int          ee;
    ee = e;
    r  = {1'b0, m} + ((g && (st || m[0])) ? 25'd1 : 25'd0);
    if (r[24]) begin
      r  = r >> 1;
      ee = ee + 1;
    end
    if (ee <= 0)   return {s, 31'd0};
    if (ee >= 255) return {s, 8'hff, 23'd0};
    return {s, ee[7:0], r[22:0]};
  endfunction

  function automatic float_t fp_add(float_t a, float_t b);
    float_t      t;
    logic [26:0] xa, xb;
    logic [27:0] s;
    logic        st;
    int          d, e, sh;
    if (a[30:23] == 8'hff) return a;
    if (b[30:23] == 8'hff) return b;
    if (fp_is_zero(b)) return fp_is_zero(a) ? (a & b) : a;
    if (fp_is_zero(a)) return b;
    if (a[30:0] < b[30:0]) begin
      t = a; a = b; b = t;
    end
    d  = int'(a[30:23]) - int'(b[30:23]);
    xa = {1'b1, a[22:0], 3'b000};
    if (d >= 27) begin
      xb = 27'd1;
    end else begin
      xb = {1'b1, b[22:0], 3'b000} >> d;
      st = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < d && ((27'h1 << i) & {1'b1, b[22:0], 3'b000}) != 0) st = 1'b1;
      xb[0] = xb[0] | st;
    end
    s = (a[31] == b[31]) ? ({1'b0, xa} + {1'b0, xb}) : ({1'b0, xa} - {1'b0, xb});
    if (s == 0) return FP_ZERO;
    e = int'(a[30:23]);
    if (s[27]) begin
      s = {1'b0, s[27:2], s[1] | s[0]};
      e = e + 1;
    end else begin
      sh = 0;
      for (int i = 26; i >= 0; i--)
        if (s[i] && sh == 0) sh = 27 - i;  // position of the leading one
      sh = sh - 1;
      s = s << sh;
      e = e - sh;
    end
    return fp_pack(a[31], e, s[26:3], s[2], s[1] | s[0]);
  endfunction

  function automatic float_t fp_sub(float_t a, float_t b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  function automatic float_t fp_mul(float_t a, float_t b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) return {s, 8'hff, 23'd0};
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    return fp_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic float_t fp_div(float_t a, float_t b);
    logic        s;
    logic [49:0] n, q, r;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hff || fp_is_zero(b)) return {s, 8'hff, 23'd0};
    if (fp_is_zero(a) || b[30:23] == 8'hff) return {s, 31'd0};
    n = {1'b1, a[22:0], 26'd0};
    q = n / {26'd0, 1'b1, b[22:0]};
    r = n % {26'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[26]) return fp_pack(s, e, q[26:3], q[2], (|q[1:0]) || (r != 0));
    return fp_pack(s, e - 1, q[25:2], q[1], q[0] || (r != 0));
  endfunction

  // signed 32-bit integer to float
  function automatic float_t fp_from_int(logic signed [31:0] v);
    logic [31:0] mag, nrm;
    int          p;
    if (v == 0) return FP_ZERO;
    mag = v[31] ? (~v + 32'd1) : v;
    p = 0;
    for (int i = 0; i < 32; i++) if (mag[i]) p = i;
    nrm = mag << (31 - p);
    return fp_pack(v[31], 127 + p, nrm[31:8], nrm[7], |nrm[6:0]);
  endfunction

  // float to signed integer: mode 0 truncates, 1 rounds down, 2 rounds up.
  // Magnitudes of 2^31 and above saturate.
  function automatic logic signed [31:0] fp_to_int(float_t a, logic [1:0] mode);
    logic [79:0]        fx;
    logic [32:0]        ip;
    logic               fnz;
    logic signed [32:0] r;
    int                 k;
    if (fp_is_zero(a)) return 32'sd0;
    k = int'(a[30:23]) - 127;
    if (k >= 31) return a[31] ? 32'sh8000_0000 : 32'sh7fff_ffff;
    if (k < -24) begin
      ip  = 33'd0;
      fnz = 1'b1;
    end else begin
      fx  = {56'd0, 1'b1, a[22:0]} << (k + 24);
      ip  = fx[79:47];
      fnz = |fx[46:0];
    end
    r = a[31] ? -$signed(ip) : $signed(ip);
    if (mode == 2'd1 && a[31] && fnz)  r = r - 33'sd1;
    if (mode == 2'd2 && !a[31] && fnz) r = r + 33'sd1;
    return r[31:0];
  endfunction

endpackage

// fpu_pkg: types, constants and shared functions of the single-precision FPU.
//
// All units work on IEEE 754 binary32 values. Following the area-driven choices of
// the design, denormal operands are treated as zero on input and results that
// would be denormal are flushed to a signed zero (raising underflow and inexact).
// Each arithmetic unit is written as one combinational block followed by a chain
// of output registers, so a synthesis tool with retiming can move the registers
// into the logic; the latency is therefore a parameter of every unit.
//
// Rounding is either round-to-nearest-even (RNE) or truncation (round toward
// zero), chosen per unit by a parameter, because the design studies both as
// build-time options rather than as a run-time mode. RNE is the default.
//
// The exception flags are the five IEEE flags. Division by zero is kept in the
// flag vector for completeness but no unit in this FPU raises it.
package fpu_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned MAN_W  = 23;
  localparam int unsigned BIAS   = 127;
  localparam int unsigned ACC_NUM_DEFAULT = 4;   // accumulators in the proposed FPU
  localparam int unsigned TAG_W_DEFAULT   = 5;   // 32 general purpose registers

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp32_t;

  // Invalid, divide-by-zero, overflow, underflow, inexact.
  typedef struct packed {
    logic nv;
    logic dz;
    logic of;
    logic uf;
    logic nx;
  } fflags_t;

  typedef struct packed {
    fp32_t   val;
    fflags_t flags;
  } fp_res_t;

  // Operand class after flushing denormals to zero.
  typedef struct packed {
    logic zero;
    logic inf;
    logic nan;
    logic snan;
  } fp_class_t;

  // Operations accepted by the FPU issue port.
  typedef enum logic [3:0] {
    OP_ADD     = 4'd0,   // a + b
    OP_SUB     = 4'd1,   // a - b
    OP_MUL     = 4'd2,   // a * b
    OP_FMADD   = 4'd3,   // a * b + c, c and result in the register file
    OP_FMACC   = 4'd4,   // acc[dst] = a * b + acc[src]
    OP_CMP     = 4'd5,   // {gt, eq, lt} of a against b
    OP_ABS     = 4'd6,   // |a|
    OP_F2I     = 4'd7,   // float to signed integer, truncating
    OP_I2F     = 4'd8,   // signed integer to float, RNE
    OP_MTACC   = 4'd9,   // acc[dst] = a
    OP_MFACC   = 4'd10,  // result = acc[src]
    OP_RDFLAGS = 4'd11   // result = exception status, then clear it
  } fpu_op_t;

  localparam fp32_t QNAN     = 32'h7FC0_0000;
  localparam fp32_t MAX_FIN  = 32'h7F7F_FFFF;

  function automatic fp_class_t classify(fp32_t x);
    fp_class_t c;
    c.zero = (x.exp == '0);                       // zero or flushed denormal
    c.inf  = (x.exp == '1) && (x.man == '0);
    c.nan  = (x.exp == '1) && (x.man != '0);
    c.snan = c.nan && !x.man[MAN_W-1];
    return c;
  endfunction

  // A NaN operand is passed on with its quiet bit set.
  function automatic fp32_t quieten(fp32_t x);
    fp32_t q = x;
    q.man[MAN_W-1] = 1'b1;
    return q;
  endfunction

  // Position of the most significant one of a 64-bit word, counted from bit 63
  // (64 when the word is zero). Callers left-align narrower values.
  function automatic logic [6:0] lzc64(logic [63:0] x);
    logic [6:0] n;
    n = 7'd64;
    for (int i = 0; i < 64; i++)
      if (x[i]) n = 7'(63 - i);
    return n;
  endfunction

  // Round and pack a finite nonzero result.
  //   e    biased exponent of the value 1.m[22:0], may be out of range
  //   m    24-bit significand with m[23] = 1
  //   g    first bit below m[0]; s: OR of all lower bits
  // Overflow gives infinity under RNE and the largest finite value under
  // truncation. A result whose rounded exponent is below 1 is flushed to zero.
  function automatic fp_res_t round_pack(logic sign, logic signed [11:0] e,
                                         logic [23:0] m, logic g, logic s, logic rne);
    fp_res_t          r;
    logic             up;
    logic [24:0]      mr;
    logic signed [11:0] er;
    r       = '0;
    up      = rne && g && (s || m[0]);
    mr      = {1'b0, m} + 25'(up);
    er      = e;
    if (mr[24]) begin
      er = e + 12'sd1;
      mr = {1'b0, mr[24:1]};
    end
    r.flags.nx = g | s;
    if (er >= 12'sd255) begin
      r.val      = rne ? fp32_t'({sign, 8'hFF, 23'd0}) : fp32_t'({sign, MAX_FIN[30:0]});
      r.flags.of = 1'b1;
      r.flags.nx = 1'b1;
    end else if (er <= 12'sd0) begin
      r.val      = fp32_t'({sign, 31'd0});
      r.flags.uf = 1'b1;
      r.flags.nx = 1'b1;
    end else begin
      r.val = fp32_t'({sign, er[7:0], mr[22:0]});
    end
    return r;
  endfunction

endpackage

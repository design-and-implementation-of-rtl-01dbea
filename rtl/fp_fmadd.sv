// fp_fmadd: fused multiply-add unit, result = a * b + c with a single rounding.
//
// The unit is a multiplier phase of MUL_STAGES cycles followed by an adder phase
// of ADD_STAGES cycles, so an operation issued in cycle t leaves in cycle
// t + MUL_STAGES + ADD_STAGES (4 by default). The multiplier phase forms the
// exact 48-bit significand product and the exponent sum; nothing is rounded.
// The adder phase reads the addend c, aligns the smaller of (product, c) to the
// larger with guard, round and sticky bits over a 51-bit window, adds or
// subtracts (only the smaller operand is complemented), normalises with a
// leading-zero count and rounds once.
//
// The addend is chosen at the start of the adder phase, from one of:
//   * the c operand given at issue (accumulator held in the register file),
//   * the accumulator file entry acc_src (acc_rd_idx/acc_rd_data), or
//   * the unit's own output register, when the operation leaving the unit in
//     that cycle writes the accumulator being read (bypass).
// The accumulator file is written from the output register at the end of the
// output cycle, so without the bypass a dependent operation would have to wait
// one cycle more. With the bypass, an accumulation that depends on the previous
// one may issue ADD_STAGES cycles after it (3 by default): the back-to-back
// latency depends only on the adder phase.
//
// acc_hazard tells the issue logic which accumulators are written by operations
// that are still too young to be bypassed to an operation issued now (RAW);
// acc_inflight marks every accumulator with a write anywhere in the unit.
//
// Special cases: NaN operands are returned quietened with priority a, b, c;
// invalid for a signalling NaN, for zero times infinity and for infinities of
// opposite sign meeting in the addition. Denormals are flushed as elsewhere.
//
// The k + n split, the bypass from the adder output and the separate
// accumulator file follow the proposed FPU (4 stages, 3-cycle back-to-back
// latency, four accumulators). How the four stages split into 1 + 3 and the
// 51-bit alignment window are this design's own choices.
module fp_fmadd
  import fpu_pkg::*;
#(
  parameter int unsigned MUL_STAGES = 1,
  parameter int unsigned ADD_STAGES = 3,
  parameter int unsigned ACC_NUM    = ACC_NUM_DEFAULT,
  parameter bit          RNE        = 1'b1,
  parameter int unsigned TAG_W      = TAG_W_DEFAULT,
  localparam int unsigned ACC_W     = (ACC_NUM > 1) ? $clog2(ACC_NUM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // issue
  input  logic               in_valid,
  input  fp32_t              a,
  input  fp32_t              b,
  input  fp32_t              c,          // addend when c_from_acc = 0
  input  logic               c_from_acc,
  input  logic [ACC_W-1:0]   acc_src,
  input  logic               acc_wr,     // result goes to acc_dst
  input  logic [ACC_W-1:0]   acc_dst,
  input  logic [TAG_W-1:0]   in_tag,
  // accumulator file read port (combinational)
  output logic [ACC_W-1:0]   acc_rd_idx,
  input  fp32_t              acc_rd_data,
  // result
  output logic               out_valid,
  output fp32_t              result,
  output fflags_t            flags,
  output logic               out_acc_wr,
  output logic [ACC_W-1:0]   out_acc_dst,
  output logic [TAG_W-1:0]   out_tag,
  // hazard information for the issue logic
  output logic [ACC_NUM-1:0] acc_hazard,
  output logic [ACC_NUM-1:0] acc_inflight,
  output logic               bypass_used
);

  // -------------------------------------------------------------------------
  // Multiplier phase: exact product
  // -------------------------------------------------------------------------
  typedef struct packed {
    logic               sp;        // product sign
    logic signed [11:0] ep;        // biased exponent of the normalised product
    logic [47:0]        pn;        // product significand, bit 47 set
    logic               p_zero;
    logic               p_inf;
    logic               p_nan;     // a or b NaN, or zero times infinity
    fp32_t              p_nan_val;
    logic               p_nv;
    fp32_t              c;
    logic               c_from_acc;
    logic [ACC_W-1:0]   acc_src;
    logic               acc_wr;
    logic [ACC_W-1:0]   acc_dst;
    logic [TAG_W-1:0]   tag;
  } mstage_t;

  mstage_t m0, mk;
  logic    mk_valid;

  always_comb begin : mul_phase
    fp_class_t          ca, cb;
    logic [47:0]        p;
    logic signed [11:0] e;
    ca = classify(a);
    cb = classify(b);
    p  = {1'b1, a.man} * {1'b1, b.man};
    e  = $signed({4'd0, a.exp}) + $signed({4'd0, b.exp}) - 12'sd127;
    m0            = '0;
    m0.sp         = a.sign ^ b.sign;
    m0.pn         = p[47] ? p : {p[46:0], 1'b0};
    m0.ep         = p[47] ? e + 12'sd1 : e;
    m0.p_zero     = ca.zero | cb.zero;
    m0.p_inf      = ca.inf | cb.inf;
    m0.p_nan      = ca.nan | cb.nan | (ca.inf & cb.zero) | (ca.zero & cb.inf);
    m0.p_nan_val  = ca.nan ? quieten(a) : cb.nan ? quieten(b) : QNAN;
    m0.p_nv       = ca.snan | cb.snan | (!ca.nan && !cb.nan &&
                    ((ca.inf & cb.zero) | (ca.zero & cb.inf)));
    m0.c          = c;
    m0.c_from_acc = c_from_acc;
    m0.acc_src    = acc_src;
    m0.acc_wr     = acc_wr;
    m0.acc_dst    = acc_dst;
    m0.tag        = in_tag;
  end

  fp_pipe #(.WIDTH($bits(mstage_t)), .DEPTH(MUL_STAGES)) u_mul_pipe (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  (m0),
    .out_valid(mk_valid),
    .out_data (mk)
  );

  // -------------------------------------------------------------------------
  // Addend selection: operand, accumulator file or bypass from the output
  // -------------------------------------------------------------------------
  fp32_t cs;
  logic  byp;

  assign acc_rd_idx = mk.acc_src;
  assign byp        = mk_valid && mk.c_from_acc && out_valid && out_acc_wr &&
                      (out_acc_dst == mk.acc_src);
  assign cs         = !mk.c_from_acc ? mk.c : byp ? result : acc_rd_data;
  assign bypass_used = byp;

  // -------------------------------------------------------------------------
  // Adder phase: align, add, normalise, round once
  // -------------------------------------------------------------------------
  typedef struct packed {
    fp_res_t          r;
    logic             acc_wr;
    logic [ACC_W-1:0] acc_dst;
    logic [TAG_W-1:0] tag;
  } astage_t;

  astage_t a0, an;

  always_comb begin : add_phase
    fp_class_t          cc;
    logic               sc, eff_sub, swap, sx;
    logic [47:0]        cn, xm, ym;
    logic signed [11:0] ec, ex, ey, d, e;
    logic [97:0]        yshift;
    logic [50:0]        xal, yal;
    logic [51:0]        sum;
    logic [6:0]         lz;
    logic [50:0]        norm;

    cc      = classify(cs);
    sc      = cs.sign;
    cn      = cc.zero ? 48'd0 : {1'b1, cs.man, 24'd0};
    ec      = $signed({4'd0, cs.exp});
    eff_sub = mk.sp ^ sc;

    swap = !cc.zero && ((ec > mk.ep) || ((ec == mk.ep) && (cn > mk.pn)));
    sx   = swap ? sc : mk.sp;
    ex   = swap ? ec : mk.ep;
    ey   = swap ? mk.ep : ec;
    xm   = swap ? cn : mk.pn;
    ym   = swap ? mk.pn : cn;
    d    = ex - ey;

    yshift = '0;
    if (ym == '0) begin
      yal = '0;
    end else if (d < 12'sd51) begin
      yshift = {ym, 50'd0} >> d;
      yal    = {yshift[97:48], |yshift[47:0]};
    end else begin
      yal = 51'd1;
    end
    xal = {xm, 3'b000};
    sum = eff_sub ? {1'b0, 51'(xal + ~yal + 51'd1)} : ({1'b0, xal} + {1'b0, yal});

    lz   = '0;
    norm = '0;
    e    = '0;
    if (sum[51]) begin
      norm = {sum[51:2], sum[1] | sum[0]};
      e    = ex + 12'sd1;
    end else begin
      lz   = lzc64({sum[50:0], 13'd0});
      norm = sum[50:0] << lz;
      e    = ex - $signed({5'd0, lz});
    end

    a0         = '0;
    a0.acc_wr  = mk.acc_wr;
    a0.acc_dst = mk.acc_dst;
    a0.tag     = mk.tag;
    if (mk.p_nan) begin
      a0.r.val      = mk.p_nan_val;
      a0.r.flags.nv = mk.p_nv | cc.snan;
    end else if (cc.nan) begin
      a0.r.val      = quieten(cs);
      a0.r.flags.nv = cc.snan;
    end else if (mk.p_inf && cc.inf && eff_sub) begin
      a0.r.val      = QNAN;
      a0.r.flags.nv = 1'b1;
    end else if (mk.p_inf) begin
      a0.r.val = fp32_t'({mk.sp, 8'hFF, 23'd0});
    end else if (cc.inf) begin
      a0.r.val = cs;
    end else if (mk.p_zero && cc.zero) begin
      a0.r.val = fp32_t'({mk.sp & sc, 31'd0});
    end else if (mk.p_zero) begin
      a0.r.val = cs;
    end else if (sum == '0) begin
      a0.r.val = '0;                                   // exact cancellation
    end else begin
      a0.r = round_pack(sx, e, norm[50:27], norm[26], |norm[25:0], RNE);
    end
  end

  fp_pipe #(.WIDTH($bits(astage_t)), .DEPTH(ADD_STAGES)) u_add_pipe (
    .clk, .rst_n,
    .in_valid (mk_valid),
    .in_data  (a0),
    .out_valid(out_valid),
    .out_data (an)
  );

  assign result      = an.r.val;
  assign flags       = an.r.flags;
  assign out_acc_wr  = an.acc_wr;
  assign out_acc_dst = an.acc_dst;
  assign out_tag     = an.tag;

  // -------------------------------------------------------------------------
  // Accumulator write tracking. Position j holds the operation issued j cycles
  // ago. An operation at position j leaves the unit after MUL_STAGES+ADD_STAGES-j
  // more cycles; it can reach a new operation's addend read (MUL_STAGES cycles
  // after issue) through the bypass or the file only if j >= ADD_STAGES.
  // -------------------------------------------------------------------------
  localparam int unsigned DEPTH = MUL_STAGES + ADD_STAGES;

  logic [DEPTH:1]            trk_wr;
  logic [DEPTH:1][ACC_W-1:0] trk_dst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trk_wr  <= '0;
      trk_dst <= '0;
    end else begin
      trk_wr[1]  <= in_valid & acc_wr;
      trk_dst[1] <= acc_dst;
      for (int j = 2; j <= DEPTH; j++) begin
        trk_wr[j]  <= trk_wr[j-1];
        trk_dst[j] <= trk_dst[j-1];
      end
    end
  end

  always_comb begin
    acc_hazard   = '0;
    acc_inflight = '0;
    for (int j = 1; j <= DEPTH; j++) begin
      if (trk_wr[j]) begin
        acc_inflight[trk_dst[j]] = 1'b1;
        if (j < ADD_STAGES) acc_hazard[trk_dst[j]] = 1'b1;
      end
    end
  end

  initial assert (MUL_STAGES >= 1 && ADD_STAGES >= 1)
    else $fatal(1, "fp_fmadd: both phases need at least one stage");

endmodule

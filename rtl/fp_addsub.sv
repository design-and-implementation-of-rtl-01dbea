// fp_addsub: single-path binary32 adder/subtracter.
//
// The datapath follows the classic single-path algorithm: unpack the operands
// (flushing denormals to zero and folding the subtract opcode into the sign of
// b), swap them so that the larger magnitude is first, align the smaller one by
// the exponent difference while collecting guard, round and sticky bits, add or
// subtract the 27-bit aligned significands, normalise with a leading-zero count
// (or one right shift after a carry), round, and renormalise. Because the
// operands are ordered by magnitude, the difference is never negative: only the
// smaller significand is complemented and the carry-in completes its two's
// complement, so no result negation is needed.
//
// Special cases: a NaN operand is returned quietened (a before b), raising
// invalid if it was signalling; inf - inf gives the default quiet NaN and
// invalid; an exact zero sum is +0 unless both addends are -0.
//
// Interface: in_valid/a/b/sub/tag enter in one cycle; out_valid/result/flags/tag
// appear LATENCY cycles later (default 3, the latency chosen for the FPU). A new
// operation may enter every cycle. The dual-path (near/far) alternative that the
// design also evaluated is not used: the single path was the smaller design.
// The algorithm, the operand swap, flush-to-zero and the latency follow the
// proposed FPU; keeping separate guard, round and sticky bits, the NaN rules and
// the overflow result under truncation are this design's own choices.
module fp_addsub
  import fpu_pkg::*;
#(
  parameter int unsigned LATENCY = 3,
  parameter bit          RNE     = 1'b1,
  parameter int unsigned TAG_W   = TAG_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            a,
  input  fp32_t            b,
  input  logic             sub,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            result,
  output fflags_t          flags,
  output logic [TAG_W-1:0] out_tag
);

  fp_res_t r;

  always_comb begin : datapath
    fp_class_t          ca, cb;
    logic               sa, sb, eff_sub, swap;
    logic [23:0]        ma, mb, mx, my;
    logic [7:0]         ea, eb, ex, ey;
    logic               sx;
    logic [8:0]         d;
    logic [49:0]        yshift;
    logic [26:0]        xal, yal;
    logic               sticky;
    logic [27:0]        sum;
    logic [6:0]         lz;
    logic [26:0]        norm;
    logic signed [11:0] e;

    ca = classify(a);
    cb = classify(b);
    sa = a.sign;
    sb = b.sign ^ sub;
    ea = a.exp;
    eb = b.exp;
    ma = {1'b1, a.man};
    mb = {1'b1, b.man};
    eff_sub = sa ^ sb;
    r = '0;

    // Order by magnitude so that the result sign is that of the first operand.
    swap = {eb, mb} > {ea, ma};
    sx = swap ? sb : sa;
    ex = swap ? eb : ea;
    ey = swap ? ea : eb;
    mx = swap ? mb : ma;
    my = swap ? ma : mb;

    // Alignment: shift the smaller significand right, keep G and R, OR the rest.
    d      = {1'b0, ex} - {1'b0, ey};
    yshift = '0;
    sticky = 1'b0;
    if (d < 9'd27) begin
      yshift = {my, 26'd0} >> d;
      sticky = |yshift[22:0];
      yal    = {yshift[49:24], yshift[23] | sticky};
    end else begin
      yal    = 27'd1;                                  // all bits become sticky
    end
    xal = {mx, 3'b000};

    // One's complement of the smaller operand plus a carry-in; the carry out of
    // a subtraction is dropped (the difference is never negative).
    sum = eff_sub ? {1'b0, 27'(xal + ~yal + 27'd1)} : ({1'b0, xal} + {1'b0, yal});

    norm = '0;
    lz   = '0;
    e    = '0;
    if (sum[27]) begin
      e    = $signed({4'd0, ex}) + 12'sd1;
      norm = {sum[27:2], sum[1] | sum[0]};
    end else begin
      lz   = lzc64({sum[26:0], 37'd0});
      norm = sum[26:0] << lz;
      e    = $signed({4'd0, ex}) - $signed({5'd0, lz});
    end

    if (ca.nan || cb.nan) begin
      r.val      = ca.nan ? quieten(a) : quieten(b);
      r.flags.nv = ca.snan | cb.snan;
    end else if (ca.inf && cb.inf) begin
      r.val      = eff_sub ? QNAN : fp32_t'({sa, 8'hFF, 23'd0});
      r.flags.nv = eff_sub;
    end else if (ca.inf) begin
      r.val = fp32_t'({sa, 8'hFF, 23'd0});
    end else if (cb.inf) begin
      r.val = fp32_t'({sb, 8'hFF, 23'd0});
    end else if (ca.zero && cb.zero) begin
      r.val = fp32_t'({sa & sb, 31'd0});
    end else if (cb.zero) begin
      r.val = a;
    end else if (ca.zero) begin
      r.val = fp32_t'({sb, b.exp, b.man});
    end else if (sum == '0) begin
      r.val = '0;                                        // exact cancellation
    end else begin
      r = round_pack(sx, e, norm[26:3], norm[2], |norm[1:0], RNE);
    end
  end

  logic [TAG_W+$bits(fp_res_t)-1:0] pipe_out;

  fp_pipe #(.WIDTH(TAG_W + $bits(fp_res_t)), .DEPTH(LATENCY)) u_pipe (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  ({in_tag, r}),
    .out_valid(out_valid),
    .out_data (pipe_out)
  );

  assign {out_tag, result, flags} = pipe_out;

endmodule

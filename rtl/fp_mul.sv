// fp_mul: binary32 multiplier.
//
// Two parallel paths: the 8-bit biased exponents are added and the bias is
// subtracted, while the two 24-bit significands (hidden one restored) are
// multiplied into a 48-bit product whose two top bits are the integer part.
// The sign is the XOR of the operand signs. Because denormals are flushed to
// zero on input, the product is always in [1, 4), so normalisation is at most
// one right shift (a multiplexer), after which the product is rounded and
// results below the normal range are flushed to zero with underflow.
//
// Special cases: a NaN operand is returned quietened (a before b), invalid if
// signalling; zero times infinity gives the default quiet NaN and invalid.
//
// Interface: operands enter with in_valid; the result, flags and tag leave
// LATENCY cycles later (default 3). Fully pipelined, one operation per cycle.
// The significand multiplier is written as a plain '*' so that synthesis can
// pick the multiplier architecture (for example a Booth-encoded array).
// The datapath steps, flush-to-zero and the latency follow the proposed FPU;
// the NaN and overflow rules are this design's own choices.
module fp_mul
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
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            result,
  output fflags_t          flags,
  output logic [TAG_W-1:0] out_tag
);

  fp_res_t r;

  always_comb begin : datapath
    fp_class_t          ca, cb;
    logic               s;
    logic [47:0]        p;
    logic signed [11:0] e;

    ca = classify(a);
    cb = classify(b);
    s  = a.sign ^ b.sign;
    p  = {1'b1, a.man} * {1'b1, b.man};
    e  = $signed({4'd0, a.exp}) + $signed({4'd0, b.exp}) - 12'sd127;
    r  = '0;

    if (ca.nan || cb.nan) begin
      r.val      = ca.nan ? quieten(a) : quieten(b);
      r.flags.nv = ca.snan | cb.snan;
    end else if ((ca.inf && cb.zero) || (ca.zero && cb.inf)) begin
      r.val      = QNAN;
      r.flags.nv = 1'b1;
    end else if (ca.inf || cb.inf) begin
      r.val = fp32_t'({s, 8'hFF, 23'd0});
    end else if (ca.zero || cb.zero) begin
      r.val = fp32_t'({s, 31'd0});
    end else if (p[47]) begin
      r = round_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0], RNE);
    end else begin
      r = round_pack(s, e, p[46:23], p[22], |p[21:0], RNE);
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

// fp_cmp: binary32 comparator with a one-cycle latency.
//
// Because binary32 values are sign-magnitude with a biased exponent, the 31-bit
// magnitudes {exp, man} order like unsigned integers. One unsigned comparator
// gives "less than" and "equal" of the magnitudes; when both operands are
// negative the "less than" sense is inverted, and when the signs differ the
// negative operand is the smaller one. To save area only LT and EQ are formed;
// GT is the NOR of the two. Zeros of either sign (and flushed denormals) are
// equal. A NaN operand makes LT and EQ false and raises invalid, so GT reads
// true for an unordered pair: software must look at the invalid flag. Comparing
// two infinities of the same sign gives EQ and also raises invalid.
//
// Interface: a, b and tag enter with in_valid; lt/eq/gt, flags and tag are
// registered and valid one cycle later, so the result can be bypassed to the
// integer pipe in the next cycle to resolve a branch.
//
// The comparator structure, the zero and infinity rules and the one-cycle
// latency follow the proposed FPU; the behaviour of GT for NaN operands and the
// treatment of denormals are this design's own reading.
module fp_cmp
  import fpu_pkg::*;
#(
  parameter int unsigned TAG_W = TAG_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            a,
  input  fp32_t            b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             lt,
  output logic             eq,
  output logic             gt,
  output fflags_t          flags,
  output logic [TAG_W-1:0] out_tag
);

  logic    lt_d, eq_d;
  fflags_t fl_d;

  always_comb begin
    fp_class_t   ca, cb;
    logic [30:0] ma, mb;
    logic        mlt, meq;
    ca   = classify(a);
    cb   = classify(b);
    ma   = ca.zero ? 31'd0 : {a.exp, a.man};
    mb   = cb.zero ? 31'd0 : {b.exp, b.man};
    mlt  = ma < mb;
    meq  = ma == mb;
    fl_d = '0;
    lt_d = 1'b0;
    eq_d = 1'b0;
    if (ca.nan || cb.nan) begin
      fl_d.nv = 1'b1;
    end else if (ca.zero && cb.zero) begin
      eq_d = 1'b1;
    end else if (a.sign != b.sign) begin
      lt_d = a.sign;                       // the negative one is smaller
    end else begin
      eq_d = meq;
      lt_d = a.sign ? (!mlt && !meq) : mlt;
      fl_d.nv = ca.inf && cb.inf;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    lt      <= lt_d;
    eq      <= eq_d;
    flags   <= fl_d;
    out_tag <= in_tag;
  end

  assign gt = ~(lt | eq);

endmodule

// fp_f2i: binary32 to signed 32-bit integer conversion, truncating, one cycle.
//
// The operand is unpacked, its hidden one restored and eight zeros appended, so
// the significand M fills 32 bits with its leading one at bit 31. M is then
// shifted right by d = 158 - E places. d <= 0 means a magnitude of at least 2^31,
// which does not fit: the result is 0 and invalid is raised (also for -2^31, for
// infinities and for NaNs). d >= 32 means a magnitude below one, which truncates
// to 0. Negative values are returned in two's complement. Inexact is raised
// when nonzero bits are shifted out.
//
// Interface: a and tag enter with in_valid; the integer, flags and tag are
// registered and valid one cycle later.
//
// The shift rule, the invalid cases and truncation follow the proposed FPU;
// raising inexact is this design's addition.
module fp_f2i
  import fpu_pkg::*;
#(
  parameter int unsigned TAG_W = TAG_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            a,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      result,
  output fflags_t          flags,
  output logic [TAG_W-1:0] out_tag
);

  logic [31:0] r_d;
  fflags_t     fl_d;

  always_comb begin
    fp_class_t         ca;
    logic signed [9:0] d;
    logic [31:0]       m, q;
    logic [63:0]       wide;
    ca   = classify(a);
    m    = {1'b1, a.man, 8'd0};
    d    = 10'sd158 - $signed({2'd0, a.exp});
    r_d  = '0;
    fl_d = '0;
    wide = '0;
    q    = '0;
    if (ca.nan || d <= 10'sd0) begin
      fl_d.nv = 1'b1;
    end else if (ca.zero) begin
      r_d = '0;
    end else if (d >= 10'sd32) begin
      fl_d.nx = 1'b1;
    end else begin
      wide    = {m, 32'd0} >> d[4:0];
      q       = wide[63:32];
      fl_d.nx = |wide[31:0];
      r_d     = a.sign ? (~q + 32'd1) : q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    result  <= r_d;
    flags   <= fl_d;
    out_tag <= in_tag;
  end

endmodule

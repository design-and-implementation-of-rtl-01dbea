// fp_abs: binary32 absolute value with a one-cycle latency.
//
// In sign-magnitude format the absolute value is the operand with its sign bit
// cleared. The exception check covers the remaining cases: a NaN is passed on
// quietened, raising invalid if it was signalling, and a denormal operand is
// flushed to +0 like everywhere else in this FPU. Infinities and normal numbers
// only lose their sign.
//
// Interface: a and tag enter with in_valid; result, flags and tag are
// registered and valid one cycle later.
//
// Clearing the sign and the one-cycle latency follow the proposed FPU; which
// exceptions the check covers (NaN quietening, denormal flush) is this design's
// own choice. The overflow, underflow, inexact and divide flags are always 0.
module fp_abs
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
  output fp32_t            result,
  output fflags_t          flags,
  output logic [TAG_W-1:0] out_tag
);

  fp32_t   r_d;
  fflags_t fl_d;

  always_comb begin
    fp_class_t ca;
    ca   = classify(a);
    fl_d = '0;
    if (ca.nan) begin
      r_d     = quieten(a);
      fl_d.nv = ca.snan;
    end else if (ca.zero) begin
      r_d = '0;
    end else begin
      r_d = fp32_t'({1'b0, a.exp, a.man});
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

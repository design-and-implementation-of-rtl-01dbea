// fp_i2f: signed 32-bit integer to binary32 conversion with RNE rounding.
//
// The integer is turned into sign and magnitude, its leading ones are located
// with a leading-zero count d, and the magnitude is shifted left by d so that
// its most significant one sits at bit 31. The top 24 bits become the
// significand and the eight bits below supply the guard and sticky bits for
// round-to-nearest-even. The exponent is 158 - d, incremented when rounding
// carries out of the significand. Zero converts to +0. Inexact is raised when
// low bits are lost.
//
// Interface: x and tag enter with in_valid; result, flags and tag leave LATENCY
// cycles later. Conversions are rare, so the latency defaults to that of the
// adder and multiplier (3), which keeps the writeback schedule simple.
//
// The steps and the latency follow the proposed FPU. It speaks of dropping
// seven low bits; eight bits must go to leave 24 of 32, and that is what is done.
module fp_i2f
  import fpu_pkg::*;
#(
  parameter int unsigned LATENCY = 3,
  parameter bit          RNE     = 1'b1,
  parameter int unsigned TAG_W   = TAG_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      x,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            result,
  output fflags_t          flags,
  output logic [TAG_W-1:0] out_tag
);

  fp_res_t r;

  always_comb begin
    logic        s;
    logic [31:0] mag, norm;
    logic [6:0]  lz;
    s    = x[31];
    mag  = s ? (~x + 32'd1) : x;
    lz   = lzc64({mag, 32'd0});
    norm = mag << lz[4:0];
    r    = '0;
    if (mag != '0)
      r = round_pack(s, 12'sd158 - $signed({5'd0, lz}), norm[31:8], norm[7], |norm[6:0], RNE);
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

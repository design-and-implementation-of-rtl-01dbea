// tb_fp_mul: self-checking testbench of the multiplier.
//
// An RNE instance and a truncating instance receive the same operands: directed
// cases (exact products, ties, overflow, underflow, zero times infinity, NaNs)
// and then random operands biased towards the special classes. Results and
// flags are compared with an exact wide-integer reference, and every result
// must leave exactly LAT cycles after it entered.
module tb_fp_mul;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 3;
  localparam int unsigned N_RANDOM = 100000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0;
  logic [31:0] a = 0, b = 0, x, y;
  logic [4:0]  tag = 0;
  logic        v_rne, v_rtz;
  fp32_t       r_rne, r_rtz;
  fflags_t     f_rne, f_rtz;
  logic [4:0]  t_rne, t_rtz;

  fp_mul #(.LATENCY(LAT), .RNE(1'b1)) dut_rne (.clk, .rst_n, .in_valid, .a, .b,
    .in_tag(tag), .out_valid(v_rne), .result(r_rne), .flags(f_rne), .out_tag(t_rne));
  fp_mul #(.LATENCY(LAT), .RNE(1'b0)) dut_rtz (.clk, .rst_n, .in_valid, .a, .b,
    .in_tag(tag), .out_valid(v_rtz), .result(r_rtz), .flags(f_rtz), .out_tag(t_rtz));

  typedef struct { logic [31:0] a, b; ref_res_t e_rne, e_rtz; int cyc; logic [4:0] tag; } exp_t;
  exp_t exp_q[$];
  exp_t e;
  int checks = 0, failures = 0, cycle = 0;

  // Cycle count on the falling edge: an operation set up after edge k is
  // sampled at edge k+1; its result is seen by the checker LAT+1 edges later.
  always @(negedge clk) cycle <= cycle + 1;

  task automatic issue(logic [31:0] p, logic [31:0] q);
    exp_t n;
    a <= p; b <= q; in_valid <= 1; tag <= tag + 1;
    n.a = p; n.b = q; n.cyc = cycle; n.tag = tag + 1;
    n.e_rne = ref_mul(p, q, 1'b1);
    n.e_rtz = ref_mul(p, q, 1'b0);
    exp_q.push_back(n);
    @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && v_rne) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (r_rne !== e.e_rne.val || f_rne !== e.e_rne.flags || r_rtz !== e.e_rtz.val ||
          f_rtz !== e.e_rtz.flags || !v_rtz || t_rne !== e.tag || cycle - e.cyc != LAT + 1) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h * %h: rne %h/%b exp %h/%b, rtz %h/%b exp %h/%b, lat %0d",
                   e.a, e.b, r_rne, f_rne, e.e_rne.val, e.e_rne.flags,
                   r_rtz, f_rtz, e.e_rtz.val, e.e_rtz.flags, cycle - e.cyc - 1);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'h4040_0000, 32'h4000_0000);   // 3 * 2 = 6
    issue(32'h3FC0_0000, 32'h3FC0_0000);   // 1.5 * 1.5: product >= 2, right shift
    issue(32'h3F80_0001, 32'h3F80_0001);   // rounding
    issue(32'h7F00_0000, 32'h4000_0000);   // 2^127 * 2 overflow
    issue(32'h0080_0000, 32'h3F00_0000);   // 2^-126 * 0.5 underflow
    issue(32'h7F80_0000, 32'h0000_0000);   // inf * 0 invalid
    issue(32'hFF80_0000, 32'h3F80_0000);   // -inf * 1
    issue(32'h0000_0001, 32'h4000_0000);   // denormal reads as zero
    issue(32'h7F80_0001, 32'h7FC0_0000);   // sNaN first
    for (int i = 0; i < N_RANDOM; i++) begin
      x = rand_fp(); y = rand_fp();
      if ($urandom_range(0, 3) == 0) y[30:23] = 8'd254 - x[30:23] + 8'($urandom_range(0, 4));
      issue(x, y);
    end
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing outputs: %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RANDOM * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

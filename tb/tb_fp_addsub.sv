// tb_fp_addsub: self-checking testbench of the adder/subtracter.
//
// Two instances run side by side, one rounding to nearest even and one
// truncating. Directed cases (exact sums, ties, cancellation, overflow,
// underflow, specials) are followed by random operands biased towards the
// special classes. Each result is compared, with its flags, against an exact
// wide-integer reference, and must appear exactly LATENCY cycles after issue.
module tb_fp_addsub;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 3;
  localparam int unsigned N_RANDOM = 100000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, sub = 0;
  logic [31:0] a = 0, b = 0;
  logic [4:0]  tag = 0;
  logic        v_rne, v_rtz;
  fp32_t       r_rne, r_rtz;
  fflags_t     f_rne, f_rtz;
  logic [4:0]  t_rne, t_rtz;

  fp_addsub #(.LATENCY(LAT), .RNE(1'b1)) dut_rne (.clk, .rst_n, .in_valid, .a, .b, .sub,
    .in_tag(tag), .out_valid(v_rne), .result(r_rne), .flags(f_rne), .out_tag(t_rne));
  fp_addsub #(.LATENCY(LAT), .RNE(1'b0)) dut_rtz (.clk, .rst_n, .in_valid, .a, .b, .sub,
    .in_tag(tag), .out_valid(v_rtz), .result(r_rtz), .flags(f_rtz), .out_tag(t_rtz));

  typedef struct { logic [31:0] a, b; logic sub; ref_res_t e_rne, e_rtz; int cyc; logic [4:0] tag; } exp_t;
  exp_t exp_q[$];
  int checks = 0, failures = 0, cycle = 0;

  // Cycle count kept on the falling edge, away from the sampling edge. An
  // operation set up after edge k is sampled at edge k+1 and its result,
  // registered LAT edges later, is seen by the checker one edge after that.
  always @(negedge clk) cycle <= cycle + 1;

  task automatic issue(logic [31:0] x, logic [31:0] y, logic s);
    exp_t e;
    a <= x; b <= y; sub <= s; in_valid <= 1; tag <= tag + 1;
    e.a = x; e.b = y; e.sub = s; e.cyc = cycle; e.tag = tag + 1;
    e.e_rne = ref_add(x, y, s, 1'b1);
    e.e_rtz = ref_add(x, y, s, 1'b0);
    exp_q.push_back(e);
    @(posedge clk);
  endtask

  // Output checker
  always @(posedge clk) if (rst_n && v_rne) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (r_rne !== e.e_rne.val || f_rne !== e.e_rne.flags || r_rtz !== e.e_rtz.val ||
          f_rtz !== e.e_rtz.flags || !v_rtz || t_rne !== e.tag || cycle - e.cyc != LAT + 1) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h %s %h: rne %h/%b exp %h/%b, rtz %h/%b exp %h/%b, lat %0d",
                   e.a, e.sub ? "-" : "+", e.b, r_rne, f_rne, e.e_rne.val, e.e_rne.flags,
                   r_rtz, f_rtz, e.e_rtz.val, e.e_rtz.flags, cycle - e.cyc - 1);
      end
    end
  end

  logic [31:0] x, y;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'h3F80_0000, 32'h3F80_0000, 0);   // 1 + 1 = 2
    issue(32'h3F80_0000, 32'h3F80_0000, 1);   // 1 - 1 = +0
    issue(32'h3F80_0000, 32'h3380_0000, 0);   // 1 + 2^-24: tie, stays 1
    issue(32'h3F80_0001, 32'h3380_0000, 0);   // tie to even upwards
    issue(32'h3F80_0000, 32'h3F7F_FFFF, 1);   // massive cancellation
    issue(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0);   // overflow
    issue(32'h0080_0000, 32'h0080_0001, 1);   // underflow to zero
    issue(32'h7F80_0000, 32'h7F80_0000, 1);   // inf - inf: invalid
    issue(32'h7F80_0001, 32'h3F80_0000, 0);   // sNaN
    issue(32'h8000_0000, 32'h0000_0000, 1);   // -0 - 0 = -0
    issue(32'h4B80_0000, 32'hBF80_0000, 0);   // 2^24 - 1
    issue(32'hC120_0000, 32'h4120_0000, 0);   // -10 + 10 = +0
    for (int i = 0; i < N_RANDOM; i++) begin
      x = rand_fp(); y = rand_fp();
      if ($urandom_range(0, 3) == 0) y[30:23] = x[30:23] + 8'($urandom_range(0, 2)) - 8'd1;
      issue(x, y, 1'($urandom));
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

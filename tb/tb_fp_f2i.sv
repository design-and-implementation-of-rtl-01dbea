// tb_fp_f2i: self-checking testbench of the float-to-integer converter.
//
// Directed values (fractions, exact integers, the 2^31 boundary, infinities,
// NaNs, denormals) and random operands over the whole exponent range are
// converted; the truncated integer and the invalid/inexact flags are compared
// with the exact reference, and each result must appear one cycle after entry.
module tb_fp_f2i;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N_RANDOM = 50000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0;
  logic [31:0] a = 0, w;
  logic [4:0]  tag = 0;
  logic        v;
  logic [31:0] r;
  fflags_t     f;
  logic [4:0]  t;

  fp_f2i dut (.clk, .rst_n, .in_valid, .a, .in_tag(tag), .out_valid(v), .result(r),
              .flags(f), .out_tag(t));

  typedef struct { logic [31:0] a; ref_res_t e; int cyc; logic [4:0] tag; } exp_t;
  exp_t exp_q[$];
  exp_t e;
  int checks = 0, failures = 0, cycle = 0;

  always @(negedge clk) cycle <= cycle + 1;

  task automatic issue(logic [31:0] p);
    exp_t n;
    a <= p; in_valid <= 1; tag <= tag + 1;
    n.a = p; n.cyc = cycle; n.tag = tag + 1; n.e = ref_f2i(p);
    exp_q.push_back(n);
    @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && v) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (r !== e.e.val || f !== e.e.flags || t !== e.tag || cycle - e.cyc != 2) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h: got %h/%b exp %h/%b, lat %0d", e.a, r, f, e.e.val, e.e.flags,
                   cycle - e.cyc - 1);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'h3F80_0000); issue(32'hBF80_0000); issue(32'h3F7F_FFFF); issue(32'h4F00_0000);
    issue(32'hCF00_0000); issue(32'h4EFF_FFFF); issue(32'hCEFF_FFFF); issue(32'h7F80_0000);
    issue(32'h7FC0_0000); issue(32'h0000_0001); issue(32'hC0A0_0000); issue(32'h4B7F_FFFF);
    for (int i = 0; i < N_RANDOM; i++) begin
      w = rand_fp();
      if ($urandom_range(0, 1) == 1) w[30:23] = 8'($urandom_range(120, 160));
      issue(w);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
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

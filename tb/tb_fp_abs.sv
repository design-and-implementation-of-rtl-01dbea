// tb_fp_abs: self-checking testbench of the absolute-value unit.
//
// Random operands of every class: normal values must lose their sign, zeros
// and denormals give +0, infinities give +inf, NaNs come back quietened with
// their sign kept and invalid raised only for a signalling NaN. The expected
// value is formed by an independent rule table; the result must appear one
// cycle after entry.
module tb_fp_abs;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N_RANDOM = 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0;
  logic [31:0] a = 0, w;
  logic [4:0]  tag = 0;
  logic        v;
  fp32_t       r;
  fflags_t     f;
  logic [4:0]  t;

  fp_abs dut (.clk, .rst_n, .in_valid, .a, .in_tag(tag), .out_valid(v), .result(r),
              .flags(f), .out_tag(t));

  typedef struct { logic [31:0] a; ref_res_t e; int cyc; logic [4:0] tag; } exp_t;
  exp_t exp_q[$];
  exp_t e;
  int checks = 0, failures = 0, cycle = 0;

  always @(negedge clk) cycle <= cycle + 1;

  function automatic ref_res_t ref_abs(logic [31:0] p);
    ref_res_t o;
    o = '0;
    if (is_nan(p))       begin o.val = q(p); o.flags[4] = is_snan(p); end
    else if (is_zero(p)) o.val = 32'd0;
    else                 o.val = {1'b0, p[30:0]};
    return o;
  endfunction

  task automatic issue(logic [31:0] p);
    exp_t n;
    a <= p; in_valid <= 1; tag <= tag + 1;
    n.a = p; n.cyc = cycle; n.tag = tag + 1; n.e = ref_abs(p);
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
          $display("FAIL %h: got %h/%b exp %h/%b", e.a, r, f, e.e.val, e.e.flags);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'hBF80_0000); issue(32'h8000_0000); issue(32'hFF80_0001); issue(32'hFFC0_0000);
    for (int i = 0; i < N_RANDOM; i++) begin
      w = rand_fp();
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

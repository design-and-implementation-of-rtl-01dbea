// tb_fp_cmp: self-checking testbench of the comparator.
//
// Random operand pairs, many of them equal, sign-swapped, both zero or of the
// special classes, are compared. The expected LT/EQ/GT and invalid flag come
// from exact values in the reference (GT defined as NOR of LT and EQ, NaNs
// unordered, equal infinities raising invalid). Results must appear one cycle
// after entry.
module tb_fp_cmp;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N_RANDOM = 50000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0;
  logic [31:0] a = 0, b = 0, x, y;
  logic [4:0]  tag = 0;
  logic        v, lt, eq, gt;
  fflags_t     f;
  logic [4:0]  t;

  fp_cmp dut (.clk, .rst_n, .in_valid, .a, .b, .in_tag(tag), .out_valid(v), .lt, .eq, .gt,
              .flags(f), .out_tag(t));

  typedef struct { logic [31:0] a, b; logic [3:0] e; int cyc; logic [4:0] tag; } exp_t;
  exp_t exp_q[$];
  exp_t e;
  int checks = 0, failures = 0, cycle = 0;

  always @(negedge clk) cycle <= cycle + 1;

  task automatic issue(logic [31:0] p, logic [31:0] r);
    exp_t n;
    a <= p; b <= r; in_valid <= 1; tag <= tag + 1;
    n.a = p; n.b = r; n.cyc = cycle; n.tag = tag + 1; n.e = ref_cmp(p, r);
    exp_q.push_back(n);
    @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && v) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if ({f.nv, gt, eq, lt} !== e.e || f.nx || f.of || f.uf || f.dz || t !== e.tag ||
          cycle - e.cyc != 2) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h ? %h: got nv/gt/eq/lt %b exp %b", e.a, e.b, {f.nv, gt, eq, lt}, e.e);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'h3F80_0000, 32'h4000_0000); issue(32'hBF80_0000, 32'hC000_0000);
    issue(32'h8000_0000, 32'h0000_0000); issue(32'h7F80_0000, 32'h7F80_0000);
    issue(32'h7FC0_0000, 32'h3F80_0000); issue(32'hBF80_0000, 32'h3F80_0000);
    for (int i = 0; i < N_RANDOM; i++) begin
      x = rand_fp(); y = rand_fp();
      case ($urandom_range(0, 5))
        0: y = x;
        1: y = x ^ 32'h8000_0000;
        2: y = x + 32'($urandom_range(0, 2)) - 32'd1;
        default: ;
      endcase
      issue(x, y);
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

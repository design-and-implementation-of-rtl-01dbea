// tb_fp_fmadd_configs: the fused multiply-add unit in the other pipeline splits
// that were explored for it, each with the accumulator count that keeps one
// accumulation per cycle:
//   4 stages, back-to-back 2 (2 multiply + 2 add), 2 accumulators;
//   6 stages, back-to-back 4 (2 + 4), 4 accumulators;
//   6 stages, back-to-back 5 (1 + 5), 8 accumulators.
// The default 4-stage, back-to-back 3 unit is covered by tb_fp_fmadd. Each
// configuration is driven and checked by an fmadd_cfg_check instance running
// concurrently; the totals are reported at the end.
module tb_fp_fmadd_configs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int   checks, failures;

  fmadd_cfg_check #(.K(2), .N(2), .NACC(2)) u_b2b2 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  fmadd_cfg_check #(.K(2), .N(4), .NACC(4)) u_b2b4 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  fmadd_cfg_check #(.K(1), .N(5), .NACC(8)) u_b2b5 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule

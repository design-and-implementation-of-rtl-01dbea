// tb_fp_i2f: self-checking testbench of the integer-to-float converter.
//
// Directed integers (0, +-1, powers of two, the extremes, values that round to
// even or carry into the next binade) and random integers of every magnitude
// are converted by an RNE and a truncating instance. Results and flags are
// compared with the exact reference and each must leave LAT cycles after entry.
module tb_fp_i2f;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LAT = 3;
  localparam int unsigned N_RANDOM = 50000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0;
  logic [31:0] x = 0, w;
  logic [4:0]  tag = 0;
  logic        v_rne, v_rtz;
  fp32_t       r_rne, r_rtz;
  fflags_t     f_rne, f_rtz;
  logic [4:0]  t_rne, t_rtz;

  fp_i2f #(.LATENCY(LAT), .RNE(1'b1)) dut_rne (.clk, .rst_n, .in_valid, .x,
    .in_tag(tag), .out_valid(v_rne), .result(r_rne), .flags(f_rne), .out_tag(t_rne));
  fp_i2f #(.LATENCY(LAT), .RNE(1'b0)) dut_rtz (.clk, .rst_n, .in_valid, .x,
    .in_tag(tag), .out_valid(v_rtz), .result(r_rtz), .flags(f_rtz), .out_tag(t_rtz));

  typedef struct { logic [31:0] x; ref_res_t e_rne, e_rtz; int cyc; logic [4:0] tag; } exp_t;
  exp_t exp_q[$];
  exp_t e;
  int checks = 0, failures = 0, cycle = 0;

  always @(negedge clk) cycle <= cycle + 1;

  task automatic issue(logic [31:0] p);
    exp_t n;
    x <= p; in_valid <= 1; tag <= tag + 1;
    n.x = p; n.cyc = cycle; n.tag = tag + 1;
    n.e_rne = ref_i2f(p, 1'b1);
    n.e_rtz = ref_i2f(p, 1'b0);
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
          $display("FAIL %h: rne %h/%b exp %h/%b, rtz %h/%b exp %h/%b, lat %0d", e.x,
                   r_rne, f_rne, e.e_rne.val, e.e_rne.flags, r_rtz, f_rtz,
                   e.e_rtz.val, e.e_rtz.flags, cycle - e.cyc - 1);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    issue(32'd0); issue(32'd1); issue(32'hFFFF_FFFF); issue(32'h8000_0000);
    issue(32'h7FFF_FFFF); issue(32'h0100_0001); issue(32'h0100_0003); issue(32'h00FF_FFFF);
    issue(32'h7FFF_FFC0); issue(32'hFEFF_FFFF);
    for (int i = 0; i < N_RANDOM; i++) begin
      w = $urandom;
      w = w >> $urandom_range(0, 31);
      if ($urandom_range(0, 1) == 1) w = ~w + 32'd1;
      issue(w);
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

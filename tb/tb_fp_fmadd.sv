// tb_fp_fmadd: self-checking testbench of the fused multiply-add unit.
//
// Two instances, RNE and truncating, each with a behavioural accumulator file
// in the testbench that is written from the unit's output at the end of the
// output cycle (as in the FPU). Three phases:
//   1. a * b + c with c from the issue port, random operands, one per cycle;
//   2. four accumulators interleaved, one accumulation per cycle (each addend
//      comes from the file, four cycles after its producer);
//   3. one accumulator chain issued every ADD_STAGES cycles, so each addend
//      must come through the output bypass, then random accumulator choices
//      where the testbench issues only when its own distance count allows and
//      checks that the unit's acc_hazard output agrees.
// Every result is checked against the exact reference, including its cycle.
module tb_fp_fmadd;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned K = 1, N = 3, LAT = K + N, NACC = 4;
  localparam int unsigned N_RANDOM = 30000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, c_from_acc = 0, acc_wr = 0;
  logic [31:0] a = 0, b = 0, c = 0, x, y, z;
  logic [1:0]  acc_src = 0, acc_dst = 0;
  logic [4:0]  tag = 0;

  logic        ov[2], owr[2], byp[2];
  fp32_t       res[2], rd_data[2];
  fflags_t     fl[2];
  logic [1:0]  odst[2], rd_idx[2];
  logic [4:0]  otag[2];
  logic [3:0]  hz[2], infl[2];
  logic [31:0] accf[2][NACC];     // behavioural accumulator files

  for (genvar g = 0; g < 2; g++) begin : g_dut
    fp_fmadd #(.MUL_STAGES(K), .ADD_STAGES(N), .ACC_NUM(NACC), .RNE(g == 0)) dut (
      .clk, .rst_n, .in_valid, .a, .b, .c, .c_from_acc, .acc_src, .acc_wr, .acc_dst,
      .in_tag(tag), .acc_rd_idx(rd_idx[g]), .acc_rd_data(rd_data[g]),
      .out_valid(ov[g]), .result(res[g]), .flags(fl[g]), .out_acc_wr(owr[g]),
      .out_acc_dst(odst[g]), .out_tag(otag[g]), .acc_hazard(hz[g]), .acc_inflight(infl[g]),
      .bypass_used(byp[g]));
    assign rd_data[g] = accf[g][rd_idx[g]];
    always @(posedge clk) if (ov[g] && owr[g]) accf[g][odst[g]] <= res[g];
  end

  typedef struct { logic [31:0] a, b, c; ref_res_t e[2]; int cyc; logic [4:0] tag; logic wr; } exp_t;
  exp_t exp_q[$];
  exp_t e;
  logic [31:0] acc_model[2][NACC];
  int   last_issue[NACC];
  int checks = 0, failures = 0, cycle = 0, bypasses = 0, hazards_seen = 0;

  always @(negedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (byp[0]) bypasses++;

  task automatic idle();
    in_valid <= 0;
    @(posedge clk);
  endtask

  // c_acc = 1: addend from accumulator src, result to accumulator dst.
  task automatic issue(logic [31:0] p, logic [31:0] q, logic [31:0] r, logic c_acc,
                       logic [1:0] src, logic [1:0] dst);
    exp_t n;
    a <= p; b <= q; c <= r; c_from_acc <= c_acc; acc_wr <= c_acc;
    acc_src <= src; acc_dst <= dst; in_valid <= 1; tag <= tag + 1;
    n.a = p; n.b = q; n.cyc = cycle; n.tag = tag + 1; n.wr = c_acc;
    for (int g = 0; g < 2; g++) begin
      n.c    = c_acc ? acc_model[g][src] : r;
      n.e[g] = ref_fma(p, q, c_acc ? acc_model[g][src] : r, g == 0);
      if (c_acc) acc_model[g][dst] = n.e[g].val;
    end
    if (c_acc) last_issue[dst] = cycle;
    exp_q.push_back(n);
    @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && ov[0]) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (res[0] !== e.e[0].val || fl[0] !== e.e[0].flags || res[1] !== e.e[1].val ||
          fl[1] !== e.e[1].flags || !ov[1] || otag[0] !== e.tag || owr[0] !== e.wr ||
          cycle - e.cyc != LAT + 1) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h * %h + %h: rne %h/%b exp %h/%b, rtz %h/%b exp %h/%b, lat %0d",
                   e.a, e.b, e.c, res[0], fl[0], e.e[0].val, e.e[0].flags,
                   res[1], fl[1], e.e[1].val, e.e[1].flags, cycle - e.cyc - 1);
      end
    end
  end

  function automatic logic [31:0] near_one();
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'($urandom_range(124, 129));
    return r;
  endfunction

  int src_i;

  initial begin
    for (int g = 0; g < 2; g++)
      for (int k = 0; k < NACC; k++) begin accf[g][k] = '0; acc_model[g][k] = '0; end
    for (int k = 0; k < NACC; k++) last_issue[k] = -100;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Phase 1: addend from the issue port.
    issue(32'h3F80_0000, 32'h4000_0000, 32'h3F80_0000, 0, 0, 0);   // 1*2+1 = 3
    issue(32'h3F80_0001, 32'h3F7F_FFFE, 32'hBF80_0000, 0, 0, 0);   // cancellation, exact product needed
    issue(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000, 0, 0, 0);   // inf*0 + qNaN
    issue(32'h7F80_0000, 32'h3F80_0000, 32'hFF80_0000, 0, 0, 0);   // inf - inf
    issue(32'h7F7F_FFFF, 32'h4000_0000, 32'hFF7F_FFFF, 0, 0, 0);   // product beyond range, sum in range
    issue(32'h0080_0000, 32'h3F00_0000, 32'h0080_0000, 0, 0, 0);   // tiny product plus tiny addend
    for (int i = 0; i < N_RANDOM; i++) begin
      x = rand_fp(); y = rand_fp(); z = rand_fp();
      if ($urandom_range(0, 2) == 0) z[30:23] = 8'(int'(x[30:23]) + int'(y[30:23]) - 127 + $urandom_range(0, 4) - 2);
      issue(x, y, z, 0, 0, 0);
    end
    // Phase 2: four interleaved accumulators, one accumulation per cycle.
    for (int i = 0; i < 4000; i++)
      issue(near_one(), near_one(), 0, 1, 2'(i % NACC), 2'(i % NACC));
    // Phase 3a: one chain, each step issued N cycles after the previous one.
    for (int i = 0; i < 500; i++) begin
      issue(near_one(), near_one(), 0, 1, 2'd1, 2'd1);
      repeat (N - 1) idle();
    end
    // Phase 3b: random accumulators; hazard output must match the distance.
    for (int i = 0; i < 8000; i++) begin
      src_i = $urandom_range(0, NACC - 1);
      #1;                               // let the edge's register updates settle
      checks++;
      if (hz[0][src_i] !== (cycle - last_issue[src_i] < int'(N))) begin
        failures++;
        $display("FAIL hazard acc %0d distance %0d flag %b", src_i, cycle - last_issue[src_i], hz[0][src_i]);
      end
      if (hz[0][src_i]) begin
        hazards_seen++;
        idle();
      end else begin
        x = ($urandom_range(0, 9) == 0) ? rand_fp() : near_one();
        issue(x, near_one(), 0, 1, 2'(src_i), 2'(src_i));
      end
    end
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing outputs: %0d", exp_q.size()); end
    checks++;
    if (bypasses < 500 || hazards_seen == 0) begin
      failures++;
      $display("FAIL bypasses %0d hazards %0d", bypasses, hazards_seen);
    end
    $display("bypasses %0d hazards %0d", bypasses, hazards_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RANDOM + 30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

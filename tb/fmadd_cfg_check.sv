// fmadd_cfg_check: drives and checks one fp_fmadd configuration; used by
// tb_fp_fmadd_configs to cover the pipeline splits the design was explored at.
//
// For a unit with K multiply stages, N add stages and NACC accumulators it
// runs, after reset:
//   1. NACC accumulators interleaved, one accumulation per cycle; with
//      NACC >= N no issue may ever be refused (acc_hazard must stay clear);
//   2. one chain issued every N cycles, so every addend must come through the
//      output bypass (checked by counting bypass_used);
//   3. random accumulators, issuing only when the testbench's own distance
//      count allows, checking that acc_hazard agrees with that count.
// Results are compared with the exact reference and must leave K + N cycles
// after issue. The accumulator file is a behavioural array written from the
// unit's output at the end of the output cycle, as in the FPU. checks and
// failures are totals; done rises when the sequence is over.
module fmadd_cfg_check
  import fpu_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int unsigned K      = 1,
  parameter int unsigned N      = 3,
  parameter int unsigned NACC   = 4,
  parameter int unsigned N_OPS  = 3000,
  localparam int unsigned AW    = (NACC > 1) ? $clog2(NACC) : 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned LAT = K + N;

  logic          in_valid = 0, c_from_acc = 0, acc_wr = 0;
  logic [31:0]   a = 0, b = 0, x;
  logic [AW-1:0] acc_src = 0, acc_dst = 0, rd_idx, odst;
  logic [4:0]    tag = 0, otag;
  logic          ov, owr, byp;
  fp32_t         res, rd_data;
  fflags_t       fl;
  logic [NACC-1:0] hz, infl;
  logic [31:0]   accf [NACC];
  logic [31:0]   acc_model [NACC];
  int            last_issue [NACC];
  int            cycle = 0, bypasses = 0, hazards_seen = 0, src_i;

  fp_fmadd #(.MUL_STAGES(K), .ADD_STAGES(N), .ACC_NUM(NACC), .RNE(1'b1)) dut (
    .clk, .rst_n, .in_valid, .a, .b, .c(32'd0), .c_from_acc, .acc_src, .acc_wr, .acc_dst,
    .in_tag(tag), .acc_rd_idx(rd_idx), .acc_rd_data(rd_data),
    .out_valid(ov), .result(res), .flags(fl), .out_acc_wr(owr),
    .out_acc_dst(odst), .out_tag(otag), .acc_hazard(hz), .acc_inflight(infl),
    .bypass_used(byp));

  assign rd_data = accf[rd_idx];
  always @(posedge clk) if (ov && owr) accf[odst] <= res;
  always @(negedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (byp) bypasses++;

  typedef struct { logic [31:0] a, b, c; ref_res_t e; int cyc; logic [4:0] tag; } exp_t;
  exp_t exp_q[$];
  exp_t e;

  task automatic idle();
    in_valid <= 0;
    @(posedge clk);
  endtask

  task automatic issue(logic [31:0] p, logic [31:0] q, int src, int dst);
    exp_t n;
    a <= p; b <= q; c_from_acc <= 1; acc_wr <= 1;
    acc_src <= AW'(src); acc_dst <= AW'(dst); in_valid <= 1; tag <= tag + 1;
    n.a = p; n.b = q; n.c = acc_model[src]; n.cyc = cycle; n.tag = tag + 1;
    n.e = ref_fma(p, q, acc_model[src], 1'b1);
    acc_model[dst] = n.e.val;
    last_issue[dst] = cycle;
    exp_q.push_back(n);
    @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && ov) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("K%0d N%0d: unexpected output", K, N); end
    else begin
      e = exp_q.pop_front();
      if (res !== e.e.val || fl !== e.e.flags || otag !== e.tag || cycle - e.cyc != LAT + 1) begin
        failures++;
        if (failures < 10)
          $display("K%0d N%0d FAIL %h * %h + %h: %h/%b exp %h/%b, lat %0d", K, N, e.a, e.b, e.c,
                   res, fl, e.e.val, e.e.flags, cycle - e.cyc - 1);
      end
    end
  end

  function automatic logic [31:0] near_one();
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'($urandom_range(124, 129));
    return r;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int k = 0; k < NACC; k++) begin accf[k] = '0; acc_model[k] = '0; last_issue[k] = -100; end
    @(posedge rst_n);
    @(posedge clk);
    // 1. interleaved accumulators at one per cycle
    for (int i = 0; i < N_OPS; i++) begin
      #1;
      checks++;
      if (hz[i % NACC]) begin
        failures++;
        if (failures < 10) $display("K%0d N%0d: interleaved accumulation refused", K, N);
      end
      issue(near_one(), near_one(), i % NACC, i % NACC);
    end
    // 2. one chain at the back-to-back distance
    for (int i = 0; i < N_OPS / 4; i++) begin
      issue(near_one(), near_one(), 0, 0);
      repeat (N - 1) idle();
    end
    idle();
    checks++;
    if (bypasses < N_OPS / 4 - 1) begin
      failures++; $display("K%0d N%0d: bypass used %0d times", K, N, bypasses);
    end
    // 3. random accumulators, hazard output against the distance count
    for (int i = 0; i < N_OPS; i++) begin
      src_i = $urandom_range(0, NACC - 1);
      #1;
      checks++;
      if (hz[src_i] !== (cycle - last_issue[src_i] < int'(N))) begin
        failures++;
        if (failures < 10)
          $display("K%0d N%0d: hazard acc %0d distance %0d flag %b", K, N, src_i,
                   cycle - last_issue[src_i], hz[src_i]);
      end
      if (hz[src_i]) begin
        hazards_seen++;
        idle();
      end else begin
        x = ($urandom_range(0, 9) == 0) ? rand_fp() : near_one();
        issue(x, near_one(), src_i, src_i);
      end
    end
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || hazards_seen == 0) begin
      failures++; $display("K%0d N%0d: %0d missing, %0d hazards", K, N, exp_q.size(), hazards_seen);
    end
    done = 1;
  end
endmodule

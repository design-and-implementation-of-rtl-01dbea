// fpu_top: single-precision floating point unit for a small in-order core.
//
// The FPU takes one operation per cycle from the core's issue port and returns
// results on one writeback port to the core's register file. Inside are:
//   fp_addsub  add/subtract             ADD_LAT cycles (3)
//   fp_mul     multiply                 MUL_LAT cycles (3)
//   fp_i2f     integer to float         I2F_LAT cycles (3, same as add/mul)
//   fp_fmadd   fused multiply-add       FMA_MUL_STAGES + FMA_ADD_STAGES (1 + 3)
//   fp_cmp     compare, {gt,eq,lt}      1 cycle
//   fp_abs     absolute value           1 cycle
//   fp_f2i     float to integer         1 cycle
//   fp_acc_file  ACC_NUM accumulators (4) for the multiply-accumulate form
//   fp_status_reg  sticky IEEE exception flags
// Move-to/from-accumulator and read-flags operations complete in the top itself
// (move-to at the issue edge, the other two with a 1-cycle result).
//
// Two multiply-add forms share fp_fmadd. OP_FMADD takes its addend from the
// issue port (the core's register file) and writes the register file. OP_FMACC
// reads accumulator acc_src and writes acc_dst, so it needs no third register
// read port and can dual-issue with anything in the core; its result does not
// use the writeback port.
//
// issue_ready is low (the core must hold the operation) when:
//   * the writeback slot the operation would need, its latency from now, is
//     already taken by an earlier operation of another latency (port conflict);
//   * an FMACC reads an accumulator written by an accumulation issued less than
//     FMA_ADD_STAGES cycles before (the bypass from the multiply-add output
//     covers exactly that distance, giving a back-to-back latency of 3);
//   * a move touches an accumulator that an accumulation in flight will write;
//   * a read of the flags would miss the flags of an operation still in flight.
// An operation is accepted in a cycle where issue_valid and issue_ready are
// both high. Results appear on wb_valid/wb_data/wb_dst; wb_flags are the
// exception flags of that result (already merged into the status register).
// acc_bypass marks the cycles in which the accumulator bypass is used, for
// performance counting.
//
// Integer operands and results (F2I, I2F) travel on the same 32-bit buses. A
// compare returns {29'b0, gt, eq, lt}. The composition, latencies and the
// number of accumulators follow the proposed FPU; the issue-port handshake,
// the single writeback port with its slot reservation and the operation
// encoding are this design's own choices.
// Lint notes rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the assertion.
module fpu_top
  import fpu_pkg::*;
#(
  parameter int unsigned ADD_LAT        = 3,
  parameter int unsigned MUL_LAT        = 3,
  parameter int unsigned I2F_LAT        = 3,
  parameter int unsigned FMA_MUL_STAGES = 1,
  parameter int unsigned FMA_ADD_STAGES = 3,
  parameter int unsigned ACC_NUM        = ACC_NUM_DEFAULT,
  parameter bit          RNE            = 1'b1,
  parameter int unsigned TAG_W          = TAG_W_DEFAULT,
  localparam int unsigned ACC_W         = (ACC_NUM > 1) ? $clog2(ACC_NUM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // issue port
  input  logic             issue_valid,
  output logic             issue_ready,
  input  fpu_op_t          issue_op,
  input  logic [31:0]      issue_a,
  input  logic [31:0]      issue_b,
  input  logic [31:0]      issue_c,
  input  logic [TAG_W-1:0] issue_dst,
  input  logic [ACC_W-1:0] issue_acc_src,
  input  logic [ACC_W-1:0] issue_acc_dst,
  // writeback port
  output logic             wb_valid,
  output logic [31:0]      wb_data,
  output logic [TAG_W-1:0] wb_dst,
  output fflags_t          wb_flags,
  // current exception status (also readable with OP_RDFLAGS)
  output fflags_t          status,
  // high in a cycle where an accumulation takes its addend from the bypass
  output logic             acc_bypass
);

  localparam int unsigned FMA_LAT = FMA_MUL_STAGES + FMA_ADD_STAGES;
  localparam int unsigned MAX_LAT = (FMA_LAT > ADD_LAT && FMA_LAT > MUL_LAT && FMA_LAT > I2F_LAT)
                                    ? FMA_LAT
                                    : (ADD_LAT > MUL_LAT && ADD_LAT > I2F_LAT) ? ADD_LAT
                                    : (MUL_LAT > I2F_LAT) ? MUL_LAT : I2F_LAT;

  // -------------------------------------------------------------------------
  // Issue: latency of each operation and hazard checks
  // -------------------------------------------------------------------------
  logic                fire;
  logic                uses_wb;
  int unsigned         lat;
  logic [MAX_LAT:1]    wb_occ;        // slot k: a result leaves k cycles from now
  logic [ACC_NUM-1:0]  acc_hazard, acc_inflight;
  logic                stall_wb, stall_acc_raw, stall_acc_move, stall_flags;

  always_comb begin
    uses_wb = 1'b1;
    lat     = 1;
    unique case (issue_op)
      OP_ADD, OP_SUB: lat = ADD_LAT;
      OP_MUL:         lat = MUL_LAT;
      OP_I2F:         lat = I2F_LAT;
      OP_FMADD:       lat = FMA_LAT;
      OP_FMACC,
      OP_MTACC:       uses_wb = 1'b0;
      default:        lat = 1;
    endcase
  end

  assign stall_wb       = issue_valid && uses_wb && wb_occ[lat];
  assign stall_acc_raw  = issue_valid && (issue_op == OP_FMACC) && acc_hazard[issue_acc_src];
  assign stall_acc_move = issue_valid &&
                          (((issue_op == OP_MTACC) && acc_inflight[issue_acc_dst]) ||
                           ((issue_op == OP_MFACC) && acc_inflight[issue_acc_src]));
  assign stall_flags    = issue_valid && (issue_op == OP_RDFLAGS) &&
                          ((|wb_occ) || (|acc_inflight) || wb_valid);

  assign issue_ready = !(stall_wb || stall_acc_raw || stall_acc_move || stall_flags);
  assign fire        = issue_valid && issue_ready;

  // An operation of latency L issued now leaves in L cycles; one cycle later
  // its slot is L-1 cycles away.
  logic [MAX_LAT:1] wb_occ_next;
  always_comb begin
    wb_occ_next = '0;
    for (int k = 1; k < MAX_LAT; k++)
      wb_occ_next[k] = wb_occ[k+1] || (fire && uses_wb && (lat == k + 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_occ <= '0;
    else        wb_occ <= wb_occ_next;
  end

  // -------------------------------------------------------------------------
  // Units
  // -------------------------------------------------------------------------
  logic             add_v, mul_v, i2f_v, fma_v, cmp_v, abs_v, f2i_v;
  fp32_t            add_r, mul_r, i2f_r, fma_r, abs_r;
  logic [31:0]      f2i_r;
  logic             cmp_lt, cmp_eq, cmp_gt;
  fflags_t          add_f, mul_f, i2f_f, fma_f, cmp_f, abs_f, f2i_f;
  logic [TAG_W-1:0] add_t, mul_t, i2f_t, fma_t, cmp_t, abs_t, f2i_t;
  logic             fma_acc_wr;
  logic [ACC_W-1:0] fma_acc_dst, acc_rd_idx;
  fp32_t            acc_rd_data, acc_mv_data;

  fp_addsub #(.LATENCY(ADD_LAT), .RNE(RNE), .TAG_W(TAG_W)) u_add (
    .clk, .rst_n,
    .in_valid (fire && (issue_op == OP_ADD || issue_op == OP_SUB)),
    .a        (issue_a),
    .b        (issue_b),
    .sub      (issue_op == OP_SUB),
    .in_tag   (issue_dst),
    .out_valid(add_v), .result(add_r), .flags(add_f), .out_tag(add_t)
  );

  fp_mul #(.LATENCY(MUL_LAT), .RNE(RNE), .TAG_W(TAG_W)) u_mul (
    .clk, .rst_n,
    .in_valid (fire && issue_op == OP_MUL),
    .a        (issue_a),
    .b        (issue_b),
    .in_tag   (issue_dst),
    .out_valid(mul_v), .result(mul_r), .flags(mul_f), .out_tag(mul_t)
  );

  fp_i2f #(.LATENCY(I2F_LAT), .RNE(RNE), .TAG_W(TAG_W)) u_i2f (
    .clk, .rst_n,
    .in_valid (fire && issue_op == OP_I2F),
    .x        (issue_a),
    .in_tag   (issue_dst),
    .out_valid(i2f_v), .result(i2f_r), .flags(i2f_f), .out_tag(i2f_t)
  );

  fp_fmadd #(.MUL_STAGES(FMA_MUL_STAGES), .ADD_STAGES(FMA_ADD_STAGES),
             .ACC_NUM(ACC_NUM), .RNE(RNE), .TAG_W(TAG_W)) u_fma (
    .clk, .rst_n,
    .in_valid    (fire && (issue_op == OP_FMADD || issue_op == OP_FMACC)),
    .a           (issue_a),
    .b           (issue_b),
    .c           (issue_c),
    .c_from_acc  (issue_op == OP_FMACC),
    .acc_src     (issue_acc_src),
    .acc_wr      (issue_op == OP_FMACC),
    .acc_dst     (issue_acc_dst),
    .in_tag      (issue_dst),
    .acc_rd_idx  (acc_rd_idx),
    .acc_rd_data (acc_rd_data),
    .out_valid   (fma_v),
    .result      (fma_r),
    .flags       (fma_f),
    .out_acc_wr  (fma_acc_wr),
    .out_acc_dst (fma_acc_dst),
    .out_tag     (fma_t),
    .acc_hazard  (acc_hazard),
    .acc_inflight(acc_inflight),
    .bypass_used (acc_bypass)
  );

  fp_cmp #(.TAG_W(TAG_W)) u_cmp (
    .clk, .rst_n,
    .in_valid (fire && issue_op == OP_CMP),
    .a        (issue_a),
    .b        (issue_b),
    .in_tag   (issue_dst),
    .out_valid(cmp_v), .lt(cmp_lt), .eq(cmp_eq), .gt(cmp_gt), .flags(cmp_f), .out_tag(cmp_t)
  );

  fp_abs #(.TAG_W(TAG_W)) u_abs (
    .clk, .rst_n,
    .in_valid (fire && issue_op == OP_ABS),
    .a        (issue_a),
    .in_tag   (issue_dst),
    .out_valid(abs_v), .result(abs_r), .flags(abs_f), .out_tag(abs_t)
  );

  fp_f2i #(.TAG_W(TAG_W)) u_f2i (
    .clk, .rst_n,
    .in_valid (fire && issue_op == OP_F2I),
    .a        (issue_a),
    .in_tag   (issue_dst),
    .out_valid(f2i_v), .result(f2i_r), .flags(f2i_f), .out_tag(f2i_t)
  );

  fp_acc_file #(.ACC_NUM(ACC_NUM)) u_acc (
    .clk, .rst_n,
    .rd0_idx (acc_rd_idx),
    .rd0_data(acc_rd_data),
    .rd1_idx (issue_acc_src),
    .rd1_data(acc_mv_data),
    .wr0_en  (fma_v && fma_acc_wr),
    .wr0_idx (fma_acc_dst),
    .wr0_data(fma_r),
    .wr1_en  (fire && issue_op == OP_MTACC),
    .wr1_idx (issue_acc_dst),
    .wr1_data(issue_a)
  );

  // Move-from-accumulator and read-flags: one-cycle results formed here.
  logic             misc_v;
  logic [31:0]      misc_r;
  logic [TAG_W-1:0] misc_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) misc_v <= 1'b0;
    else        misc_v <= fire && (issue_op == OP_MFACC || issue_op == OP_RDFLAGS);
  end

  always_ff @(posedge clk) begin
    misc_r <= (issue_op == OP_RDFLAGS) ? {27'd0, status} : acc_mv_data;
    misc_t <= issue_dst;
  end

  // -------------------------------------------------------------------------
  // Writeback and exception status
  // -------------------------------------------------------------------------
  logic fma_wb_v;
  assign fma_wb_v = fma_v && !fma_acc_wr;

  always_comb begin
    wb_valid = add_v | mul_v | i2f_v | fma_wb_v | cmp_v | abs_v | f2i_v | misc_v;
    wb_data  = '0;
    wb_dst   = '0;
    wb_flags = '0;
    if (add_v)    begin wb_data = add_r; wb_dst = add_t; wb_flags = add_f; end
    if (mul_v)    begin wb_data = mul_r; wb_dst = mul_t; wb_flags = mul_f; end
    if (i2f_v)    begin wb_data = i2f_r; wb_dst = i2f_t; wb_flags = i2f_f; end
    if (fma_wb_v) begin wb_data = fma_r; wb_dst = fma_t; wb_flags = fma_f; end
    if (cmp_v)    begin wb_data = {29'd0, cmp_gt, cmp_eq, cmp_lt}; wb_dst = cmp_t; wb_flags = cmp_f; end
    if (abs_v)    begin wb_data = abs_r; wb_dst = abs_t; wb_flags = abs_f; end
    if (f2i_v)    begin wb_data = f2i_r; wb_dst = f2i_t; wb_flags = f2i_f; end
    if (misc_v)   begin wb_data = misc_r; wb_dst = misc_t; wb_flags = '0; end
  end

  // Flags of accumulations that write the accumulator file are merged too.
  fflags_t all_flags;
  assign all_flags = (add_v ? add_f : '0) | (mul_v ? mul_f : '0) | (i2f_v ? i2f_f : '0) |
                     (fma_v ? fma_f : '0) | (cmp_v ? cmp_f : '0) | (abs_v ? abs_f : '0) |
                     (f2i_v ? f2i_f : '0);

  fp_status_reg u_status (
    .clk, .rst_n,
    .set_en   (|{add_v, mul_v, i2f_v, fma_v, cmp_v, abs_v, f2i_v}),
    .set_flags(all_flags),
    .clr      (fire && issue_op == OP_RDFLAGS),
    .status   (status)
  );

  // The reservation scheme guarantees one result per cycle on the port.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({add_v, mul_v, i2f_v, fma_wb_v, cmp_v, abs_v, f2i_v, misc_v}));

endmodule

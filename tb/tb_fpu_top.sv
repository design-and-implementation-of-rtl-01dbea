// tb_fpu_top: end-to-end self-checking testbench of the FPU at its default size.
//
// The testbench plays the core: it presents one operation at a time on the
// issue port and holds it until issue_ready. At the moment an operation is
// accepted it is executed on an architectural model (register results,
// accumulator file and sticky flags updated in program order) and the
// expected writeback is filed under the cycle in which it must appear, so
// every writeback is checked for value, destination, flags and exact latency.
// Accumulations and moves are checked through later move-from-accumulator
// reads, the flags through read-flags operations, which must return the OR of
// all flags raised since the previous read.
//
// Phases:
//   1. directed cases: overflow, underflow, invalid, inexact, a read of the
//      flags that clears them, and each operation type;
//   2. throughput: 64 back-to-back additions and a 64-term dot product spread
//      over the four accumulators must each issue one operation per cycle;
//   3. back-to-back accumulation into one accumulator must issue every
//      FMA_ADD_STAGES (3) cycles, using the bypass;
//   4. a random mix of every operation with random accumulators and gaps.
// Each mechanism (each stall reason, bypass, each flag, the flag clear, each
// operation) is counted; one that never occurs is a failure.
module tb_fpu_top;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N_RANDOM = 20000;
  localparam int unsigned ACC_N    = ACC_NUM_DEFAULT;
  localparam int unsigned FMA_B2B  = 3;     // back-to-back accumulation distance
  localparam int unsigned N_DOT    = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        issue_valid = 0;
  logic        issue_ready;
  fpu_op_t     issue_op = OP_ADD;
  logic [31:0] issue_a = 0, issue_b = 0, issue_c = 0;
  logic [4:0]  issue_dst = 0;
  logic [1:0]  issue_acc_src = 0, issue_acc_dst = 0;
  logic        wb_valid;
  logic [31:0] wb_data;
  logic [4:0]  wb_dst;
  fflags_t     wb_flags, status;
  logic        acc_bypass;

  fpu_top dut (.*);

  // ---------------------------------------------------------------------------
  // Architectural model and expected writebacks
  // ---------------------------------------------------------------------------
  typedef struct { logic [31:0] data; logic [4:0] dst; logic [4:0] flags; fpu_op_t op; } wb_t;

  wb_t         exp_wb [int];
  logic [31:0] acc_m [ACC_N];
  logic [4:0]  flags_m;
  int          pe = 0;            // rising edges since start
  int          checks = 0, failures = 0;
  int          last_fire;

  // mechanism counters
  int n_stall_wb = 0, n_stall_raw = 0, n_stall_move = 0, n_stall_flags = 0;
  int n_bypass = 0, n_of = 0, n_uf = 0, n_nv = 0, n_nx = 0, n_clear = 0;
  int n_op [12];

  always @(posedge clk) pe <= pe + 1;

  function automatic int op_lat(fpu_op_t op);
    case (op)
      OP_ADD, OP_SUB, OP_MUL, OP_I2F: return 3;
      OP_FMADD:                       return 4;
      OP_FMACC, OP_MTACC:             return 0;   // no writeback
      default:                        return 1;
    endcase
  endfunction

  function automatic ref_res_t ref_abs(logic [31:0] p);
    ref_res_t o;
    o = '0;
    if (is_nan(p))       begin o.val = q(p); o.flags[4] = is_snan(p); end
    else if (is_zero(p)) o.val = 32'd0;
    else                 o.val = {1'b0, p[30:0]};
    return o;
  endfunction

  // Execute an accepted operation on the model; returns the expected writeback.
  function automatic wb_t model(fpu_op_t op, logic [31:0] a, logic [31:0] b, logic [31:0] c,
                                logic [4:0] dst, logic [1:0] src, logic [1:0] adst);
    wb_t      w;
    ref_res_t r;
    logic [3:0] k;
    r = '0;
    case (op)
      OP_ADD:   r = ref_add(a, b, 1'b0, 1'b1);
      OP_SUB:   r = ref_add(a, b, 1'b1, 1'b1);
      OP_MUL:   r = ref_mul(a, b, 1'b1);
      OP_FMADD: r = ref_fma(a, b, c, 1'b1);
      OP_FMACC: begin r = ref_fma(a, b, acc_m[src], 1'b1); acc_m[adst] = r.val; end
      OP_CMP:   begin k = ref_cmp(a, b); r.val = {29'd0, k[2:0]}; r.flags = {k[3], 4'd0}; end
      OP_ABS:   r = ref_abs(a);
      OP_F2I:   r = ref_f2i(a);
      OP_I2F:   r = ref_i2f(a, 1'b1);
      OP_MTACC: acc_m[adst] = a;
      OP_MFACC: r.val = acc_m[src];
      OP_RDFLAGS: begin r.val = {27'd0, flags_m}; flags_m = '0; end
      default: ;
    endcase
    flags_m |= r.flags;
    w.data = r.val; w.dst = dst; w.flags = r.flags; w.op = op;
    return w;
  endfunction

  // ---------------------------------------------------------------------------
  // Driver: present at the falling edge, hold until ready
  // ---------------------------------------------------------------------------
  task automatic op(fpu_op_t o, logic [31:0] a, logic [31:0] b = 0, logic [31:0] c = 0,
                    logic [1:0] src = 0, logic [1:0] adst = 0);
    wb_t w;
    logic [4:0] d;
    d = 5'($urandom);
    @(negedge clk);
    issue_valid = 1; issue_op = o; issue_a = a; issue_b = b; issue_c = c;
    issue_dst = d; issue_acc_src = src; issue_acc_dst = adst;
    #1;
    while (!issue_ready) begin
      if (dut.stall_wb)       n_stall_wb++;
      if (dut.stall_acc_raw)  n_stall_raw++;
      if (dut.stall_acc_move) n_stall_move++;
      if (dut.stall_flags)    n_stall_flags++;
      @(negedge clk);
      #1;
    end
    // accepted at the next rising edge, numbered pe + 1
    last_fire = pe + 1;
    n_op[o]++;
    w = model(o, a, b, c, d, src, adst);
    if (op_lat(o) > 0) begin
      if (exp_wb.exists(pe + op_lat(o))) begin
        failures++;
        $display("two results expected in cycle %0d", pe + op_lat(o));
      end
      exp_wb[pe + op_lat(o)] = w;
    end
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      issue_valid = 0;
    end
  endtask

  // ---------------------------------------------------------------------------
  // Monitor: one check per expected writeback, at the cycle it is due
  // ---------------------------------------------------------------------------
  wb_t ew;
  always @(negedge clk) if (rst_n) begin
    if (acc_bypass) n_bypass++;
    if (exp_wb.exists(pe)) begin
      ew = exp_wb[pe];
      exp_wb.delete(pe);
      checks++;
      if (!wb_valid || wb_data !== ew.data || wb_dst !== ew.dst || wb_flags !== ew.flags) begin
        failures++;
        if (failures < 20)
          $display("FAIL cycle %0d %s: got v=%b %h dst %0d fl %b, exp %h dst %0d fl %b", pe,
                   ew.op.name(), wb_valid, wb_data, wb_dst, wb_flags, ew.data, ew.dst, ew.flags);
      end else begin
        if (wb_flags.of) n_of++;
        if (wb_flags.uf) n_uf++;
        if (wb_flags.nv) n_nv++;
        if (wb_flags.nx) n_nx++;
        if (ew.op == OP_RDFLAGS && wb_data != 0) n_clear++;
      end
    end else if (wb_valid) begin
      failures++;
      $display("unexpected writeback in cycle %0d", pe);
    end
  end

  // ---------------------------------------------------------------------------
  // Stimulus
  // ---------------------------------------------------------------------------
  task automatic random_op();
    fpu_op_t o;
    o = fpu_op_t'($urandom_range(0, 11));
    if (o == OP_RDFLAGS && $urandom_range(0, 3) != 0) o = OP_FMACC;
    op(o, (o == OP_I2F || o == OP_F2I && $urandom_range(0, 1) == 1) ? $urandom : rand_fp(),
       rand_fp(), rand_fp(), 2'($urandom), 2'($urandom));
  endtask

  int t0, cyc;
  int fire_times [$];

  initial begin
    flags_m = '0;
    for (int i = 0; i < ACC_N; i++) acc_m[i] = '0;
    for (int i = 0; i < 12; i++) n_op[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // 1. directed cases
    op(OP_MUL, 32'h7F00_0000, 32'h4000_0000);          // overflow -> inf
    op(OP_MUL, 32'h0080_0000, 32'h3F00_0000);          // underflow -> 0
    op(OP_SUB, 32'h7F80_0000, 32'h7F80_0000);          // inf - inf: invalid
    op(OP_ADD, 32'h3F80_0000, 32'h3380_0001);          // inexact
    op(OP_RDFLAGS, 0);                                  // reads and clears
    op(OP_RDFLAGS, 0);                                  // now zero
    op(OP_I2F, 32'd7);
    op(OP_F2I, 32'h40E0_0000);
    op(OP_CMP, 32'h3F80_0000, 32'h4000_0000);
    op(OP_ABS, 32'hC000_0000);
    op(OP_FMADD, 32'h4000_0000, 32'h4040_0000, 32'h3F80_0000);
    op(OP_MTACC, 32'h3F80_0000, 0, 0, 0, 2);
    op(OP_FMACC, 32'h4000_0000, 32'h4000_0000, 0, 2, 2);
    op(OP_MFACC, 0, 0, 0, 2);                          // waits for the accumulation
    op(OP_ADD, 32'h3F80_0000, 32'h3F80_0000);
    op(OP_FMADD, 32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000);   // same slot: waits
    idle(8);

    // 2a. back-to-back additions: one per cycle
    for (int i = 0; i < 64; i++) begin
      op(OP_ADD, rand_fp(), rand_fp());
      if (i == 0) t0 = last_fire;
    end
    checks++;
    if (last_fire - t0 != 63) begin
      failures++; $display("additions took %0d cycles for 64", last_fire - t0 + 1);
    end
    idle(8);

    // 2b. dot product over four accumulators: one accumulation per cycle
    for (int k = 0; k < ACC_N; k++) op(OP_MTACC, 32'd0, 0, 0, 0, 2'(k));
    for (int i = 0; i < N_DOT; i++) begin
      op(OP_FMACC, {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)},
         {1'($urandom), 8'($urandom_range(120, 130)), 23'($urandom)}, 0, 2'(i % ACC_N), 2'(i % ACC_N));
      if (i == 0) t0 = last_fire;
    end
    checks++;
    if (last_fire - t0 != N_DOT - 1) begin
      failures++; $display("dot product took %0d cycles for %0d terms", last_fire - t0 + 1, N_DOT);
    end
    for (int k = 0; k < ACC_N; k++) op(OP_MFACC, 0, 0, 0, 2'(k));
    idle(8);

    // 3. dependent accumulations into one accumulator
    fire_times.delete();
    for (int i = 0; i < 16; i++) begin
      op(OP_FMACC, rand_fp(), 32'h3F80_0000, 0, 1, 1);
      fire_times.push_back(last_fire);
    end
    for (int i = 1; i < 16; i++) begin
      checks++;
      if (fire_times[i] - fire_times[i-1] != FMA_B2B) begin
        failures++;
        $display("dependent accumulation distance %0d", fire_times[i] - fire_times[i-1]);
      end
    end
    op(OP_MFACC, 0, 0, 0, 1);
    idle(8);

    // 4. random mix
    for (int i = 0; i < N_RANDOM; i++) begin
      random_op();
      if ($urandom_range(0, 7) == 0) idle($urandom_range(1, 3));
    end
    for (int k = 0; k < ACC_N; k++) op(OP_MFACC, 0, 0, 0, 2'(k));
    op(OP_RDFLAGS, 0);
    idle(10);

    if (exp_wb.size() != 0) begin failures++; $display("%0d results missing", exp_wb.size()); end

    // every mechanism must have been seen
    checks += 10;
    if (n_stall_wb == 0)    begin failures++; $display("no writeback-port stall"); end
    if (n_stall_raw == 0)   begin failures++; $display("no accumulator RAW stall"); end
    if (n_stall_move == 0)  begin failures++; $display("no accumulator move stall"); end
    if (n_stall_flags == 0) begin failures++; $display("no read-flags stall"); end
    if (n_bypass == 0)      begin failures++; $display("no accumulator bypass"); end
    if (n_of == 0)          begin failures++; $display("no overflow"); end
    if (n_uf == 0)          begin failures++; $display("no underflow"); end
    if (n_nv == 0)          begin failures++; $display("no invalid"); end
    if (n_nx == 0)          begin failures++; $display("no inexact"); end
    if (n_clear == 0)       begin failures++; $display("no flag read/clear"); end
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("operation %0d never issued", i); end
    end
    $display("stalls: wb %0d raw %0d move %0d flags %0d; bypass %0d; of %0d uf %0d nv %0d nx %0d; clears %0d",
             n_stall_wb, n_stall_raw, n_stall_move, n_stall_flags, n_bypass, n_of, n_uf, n_nv,
             n_nx, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RANDOM * 8 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

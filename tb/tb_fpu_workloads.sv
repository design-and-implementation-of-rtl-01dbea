// tb_fpu_workloads: the FPU at default parameters running small versions of the
// kernels it was designed for.
//
// The testbench acts as the core: it issues operations, holds each one until
// issue_ready, keeps a register file written from the writeback port and an
// architectural model of the accumulators and flags. Every writeback is
// checked bit-exactly against the model and at its exact cycle, and every
// kernel result is also compared with a double precision reference within a
// relative tolerance, so a wrong schedule or a wrong formula both fail.
//
// Kernels (sizes scaled down so that the simulation is short):
//   DMM       4x8 by 8x4 matrix multiply, four dot products in parallel on the
//             four accumulators; each row must take 32 issue cycles for 32
//             accumulations (one per cycle);
//   Sobel     3x3 Gx and Gy filters on a 6x6 image, two pixels in parallel
//             (four dot products of nine terms);
//   Convolve  13x13 filter over a 13x16 strip, four output pixels in parallel;
//   SVA       C_i = F0*A_i + F1*B_i with multiply then multiply-add, unrolled
//             by four;
//   MRI-like  sine and cosine by Horner polynomials of multiply-adds,
//             four angles interleaved.
module tb_fpu_workloads;
  import fpu_pkg::*;
  import fp_ref_pkg::*;

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

  typedef struct { logic [31:0] data; logic [4:0] dst; logic [4:0] flags; } wb_t;

  wb_t         exp_wb [int];
  logic [31:0] regs [32];
  logic [31:0] acc_m [4];
  int          pe = 0, checks = 0, failures = 0, last_fire = 0, n_bypass = 0, t0;

  always @(posedge clk) pe <= pe + 1;

  function automatic wb_t model(fpu_op_t op, logic [31:0] a, logic [31:0] b, logic [31:0] c,
                                logic [4:0] dst, logic [1:0] src, logic [1:0] adst);
    wb_t w; ref_res_t r;
    r = '0;
    case (op)
      OP_ADD:   r = ref_add(a, b, 1'b0, 1'b1);
      OP_MUL:   r = ref_mul(a, b, 1'b1);
      OP_FMADD: r = ref_fma(a, b, c, 1'b1);
      OP_FMACC: begin r = ref_fma(a, b, acc_m[src], 1'b1); acc_m[adst] = r.val; end
      OP_MTACC: acc_m[adst] = a;
      OP_MFACC: r.val = acc_m[src];
      default:  begin failures++; $display("operation not used by the kernels"); end
    endcase
    w.data = r.val; w.dst = dst; w.flags = r.flags;
    return w;
  endfunction

  function automatic int lat(fpu_op_t op);
    case (op)
      OP_ADD, OP_MUL:     return 3;
      OP_FMADD:           return 4;
      OP_FMACC, OP_MTACC: return 0;
      default:            return 1;
    endcase
  endfunction

  task automatic op(fpu_op_t o, logic [31:0] a, logic [31:0] b, logic [31:0] c,
                    logic [4:0] d, logic [1:0] src, logic [1:0] adst);
    @(negedge clk);
    issue_valid = 1; issue_op = o; issue_a = a; issue_b = b; issue_c = c;
    issue_dst = d; issue_acc_src = src; issue_acc_dst = adst;
    #1;
    while (!issue_ready) begin @(negedge clk); #1; end
    last_fire = pe + 1;
    if (lat(o) > 0) exp_wb[pe + lat(o)] = model(o, a, b, c, d, src, adst);
    else void'(model(o, a, b, c, d, src, adst));
  endtask

  task automatic drain();
    repeat (8) begin @(negedge clk); issue_valid = 0; end
  endtask

  wb_t ew;
  always @(negedge clk) if (rst_n) begin
    if (acc_bypass) n_bypass++;
    if (exp_wb.exists(pe)) begin
      ew = exp_wb[pe];
      exp_wb.delete(pe);
      checks++;
      if (!wb_valid || wb_data !== ew.data || wb_dst !== ew.dst || wb_flags !== ew.flags) begin
        failures++;
        if (failures < 20) $display("FAIL cycle %0d: got %h exp %h", pe, wb_data, ew.data);
      end
    end else if (wb_valid) begin
      failures++;
      $display("unexpected writeback in cycle %0d", pe);
    end
    if (wb_valid) regs[wb_dst] = wb_data;
  end

  // Conversions between real (binary64) and binary32 bit patterns, truncating;
  // only normal values and zero occur in the kernels.
  function automatic logic [31:0] f(real x);
    logic [63:0] d;
    d = $realtobits(x);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic real r(logic [31:0] v);
    if (v[30:23] == 8'd0) return 0.0;
    return $bitstoreal({v[31], 11'(int'(v[30:23]) - 127 + 1023), v[22:0], 29'd0});
  endfunction

  // |got - want| must be within 1e-5 of the sum of the magnitudes of the terms.
  task automatic near(string what, logic [31:0] got, real want, real scale);
    real err;
    checks++;
    err = r(got) - want;
    if (err < 0) err = -err;
    if (err > 1.0e-5 * scale + 1.0e-30) begin
      failures++;
      $display("%s: got %g want %g", what, r(got), want);
    end
  endtask

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1.0e6;
  endfunction

  function automatic real fabs(real x); return x < 0 ? -x : x; endfunction

  // kernel data
  logic [31:0] ma [4][8], mb [8][4];
  logic [31:0] img [6][6];
  logic [31:0] strip [13][16], filt [13][13];
  logic [31:0] va [16], vb [16], f0, f1;
  logic [31:0] ang [4];
  real want, scale, x;
  int gx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  int gy [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
  // Taylor coefficients, highest power first
  real sin_c [6] = '{-1.0 / 39916800.0, 1.0 / 362880.0, -1.0 / 5040.0, 1.0 / 120.0, -1.0 / 6.0, 1.0};
  real cos_c [6] = '{-1.0 / 3628800.0, 1.0 / 40320.0, -1.0 / 720.0, 1.0 / 24.0, -1.0 / 2.0, 1.0};

  initial begin
    for (int i = 0; i < 32; i++) regs[i] = '0;
    for (int i = 0; i < 4; i++) acc_m[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // ---------------- DMM ----------------
    foreach (ma[i, j]) ma[i][j] = f(rnd(-2.0, 2.0));
    foreach (mb[i, j]) mb[i][j] = f(rnd(-2.0, 2.0));
    for (int y = 0; y < 4; y++) begin
      for (int j = 0; j < 4; j++) op(OP_MTACC, 32'd0, 0, 0, 0, 0, 2'(j));
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 4; j++) begin
          op(OP_FMACC, ma[y][i], mb[i][j], 0, 0, 2'(j), 2'(j));
          if (i == 0 && j == 0) t0 = last_fire;
        end
      checks++;
      if (last_fire - t0 != 31) begin
        failures++; $display("DMM row %0d: 32 accumulations took %0d cycles", y, last_fire - t0 + 1);
      end
      for (int j = 0; j < 4; j++) op(OP_MFACC, 0, 0, 0, 5'(j), 2'(j), 0);
      drain();
      for (int j = 0; j < 4; j++) begin
        want = 0; scale = 0;
        for (int i = 0; i < 8; i++) begin
          want += r(ma[y][i]) * r(mb[i][j]); scale += fabs(r(ma[y][i]) * r(mb[i][j]));
        end
        near($sformatf("DMM C[%0d][%0d]", y, j), regs[j], want, scale);
      end
    end

    // ---------------- Sobel ----------------
    foreach (img[i, j]) img[i][j] = f(real'($urandom_range(0, 255)));
    for (int y = 0; y < 4; y++)
      for (int x0 = 0; x0 < 4; x0 += 2) begin
        for (int k = 0; k < 4; k++) op(OP_MTACC, 32'd0, 0, 0, 0, 0, 2'(k));
        for (int u = 0; u < 3; u++)
          for (int v = 0; v < 3; v++)
            for (int p = 0; p < 2; p++) begin
              op(OP_FMACC, img[y+u][x0+p+v], f(real'(gx[u][v])), 0, 0, 2'(2*p), 2'(2*p));
              op(OP_FMACC, img[y+u][x0+p+v], f(real'(gy[u][v])), 0, 0, 2'(2*p+1), 2'(2*p+1));
            end
        for (int k = 0; k < 4; k++) op(OP_MFACC, 0, 0, 0, 5'(k), 2'(k), 0);
        drain();
        for (int p = 0; p < 2; p++) begin
          want = 0; scale = 0;
          for (int u = 0; u < 3; u++) for (int v = 0; v < 3; v++) begin
            want += r(img[y+u][x0+p+v]) * gx[u][v]; scale += r(img[y+u][x0+p+v]) * 2;
          end
          near("Sobel Gx", regs[2*p], want, scale);
          want = 0;
          for (int u = 0; u < 3; u++) for (int v = 0; v < 3; v++)
            want += r(img[y+u][x0+p+v]) * gy[u][v];
          near("Sobel Gy", regs[2*p+1], want, scale);
        end
      end

    // ---------------- Convolve ----------------
    foreach (strip[i, j]) strip[i][j] = f(rnd(0.0, 1.0));
    foreach (filt[i, j]) filt[i][j] = f($exp(-((i - 6) * (i - 6) + (j - 6) * (j - 6)) / 18.0));
    for (int k = 0; k < 4; k++) op(OP_MTACC, 32'd0, 0, 0, 0, 0, 2'(k));
    for (int u = 0; u < 13; u++)
      for (int v = 0; v < 13; v++)
        for (int p = 0; p < 4; p++) begin
          op(OP_FMACC, strip[u][p+v], filt[u][v], 0, 0, 2'(p), 2'(p));
          if (u == 0 && v == 0 && p == 0) t0 = last_fire;
        end
    checks++;
    if (last_fire - t0 != 13 * 13 * 4 - 1) begin
      failures++; $display("Convolve: %0d accumulations took %0d cycles", 13 * 13 * 4, last_fire - t0 + 1);
    end
    for (int k = 0; k < 4; k++) op(OP_MFACC, 0, 0, 0, 5'(k), 2'(k), 0);
    drain();
    for (int p = 0; p < 4; p++) begin
      want = 0;
      for (int u = 0; u < 13; u++) for (int v = 0; v < 13; v++)
        want += r(strip[u][p+v]) * r(filt[u][v]);
      near("Convolve", regs[p], want, want);
    end

    // ---------------- SVA ----------------
    f0 = f(rnd(-3.0, 3.0)); f1 = f(rnd(-3.0, 3.0));
    foreach (va[i]) begin va[i] = f(rnd(-10.0, 10.0)); vb[i] = f(rnd(-10.0, 10.0)); end
    for (int i = 0; i < 16; i += 4) begin
      for (int k = 0; k < 4; k++) op(OP_MUL, f1, vb[i+k], 0, 5'(8 + k), 0, 0);
      repeat (2) begin @(negedge clk); issue_valid = 0; end
      for (int k = 0; k < 4; k++) op(OP_FMADD, f0, va[i+k], regs[8 + k], 5'(12 + k), 0, 0);
      drain();
      for (int k = 0; k < 4; k++)
        near("SVA", regs[12 + k], r(f0) * r(va[i+k]) + r(f1) * r(vb[i+k]),
             fabs(r(f0) * r(va[i+k])) + fabs(r(f1) * r(vb[i+k])));
    end

    // ---------------- MRI-like: sine and cosine by Horner's rule ----------------
    for (int k = 0; k < 4; k++) ang[k] = f(rnd(-1.5, 1.5));
    for (int k = 0; k < 4; k++) op(OP_MUL, ang[k], ang[k], 0, 5'(16 + k), 0, 0);   // x^2
    drain();
    for (int k = 0; k < 4; k++) begin
      regs[20 + k] = f(sin_c[0]);
      regs[24 + k] = f(cos_c[0]);
    end
    for (int t = 1; t < 6; t++) begin
      for (int k = 0; k < 4; k++) begin
        op(OP_FMADD, regs[20 + k], regs[16 + k], f(sin_c[t]), 5'(20 + k), 0, 0);
        op(OP_FMADD, regs[24 + k], regs[16 + k], f(cos_c[t]), 5'(24 + k), 0, 0);
      end
      drain();
    end
    for (int k = 0; k < 4; k++) op(OP_MUL, regs[20 + k], ang[k], 0, 5'(20 + k), 0, 0);
    drain();
    for (int k = 0; k < 4; k++) begin
      x = r(ang[k]);
      near("sin", regs[20 + k], $sin(x), 1.0);
      near("cos", regs[24 + k], $cos(x), 1.0);
    end

    if (exp_wb.size() != 0) begin failures++; $display("%0d results missing", exp_wb.size()); end
    $display("bypass used %0d times", n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

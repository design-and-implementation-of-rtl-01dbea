// tb_fp_acc_file: self-checking testbench of the accumulator file.
//
// After reset every entry must read +0. Random writes on both ports (never to
// the same entry in one cycle, as the issue logic guarantees) and random reads
// on both ports are compared with a model: a write is visible from the cycle
// after its clock edge, and a read in the write cycle returns the old value.
module tb_fp_acc_file;
  import fpu_pkg::*;

  localparam int unsigned N = ACC_NUM_DEFAULT;
  localparam int unsigned N_RANDOM = 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]  rd0_idx = 0, rd1_idx = 0, wr0_idx = 0, wr1_idx = 0;
  fp32_t       rd0_data, rd1_data, wr0_data = '0, wr1_data = '0;
  logic        wr0_en = 0, wr1_en = 0;
  logic [31:0] m [N];
  int checks = 0, failures = 0;

  fp_acc_file dut (.*);

  initial begin
    for (int i = 0; i < N; i++) m[i] = 32'hDEAD_BEEF;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) m[i] = '0;
    for (int i = 0; i < N_RANDOM; i++) begin
      @(negedge clk);
      rd0_idx = 2'($urandom); rd1_idx = 2'($urandom);
      wr0_en = 1'($urandom); wr1_en = 1'($urandom);
      wr0_idx = 2'($urandom); wr1_idx = 2'($urandom);
      if (wr0_en && wr1_en && wr0_idx == wr1_idx) wr1_idx = wr1_idx + 1;
      wr0_data = $urandom; wr1_data = $urandom;
      #1;
      checks += 2;
      if (rd0_data !== m[rd0_idx]) begin failures++; if (failures < 10) $display("rd0[%0d] %h exp %h", rd0_idx, rd0_data, m[rd0_idx]); end
      if (rd1_data !== m[rd1_idx]) begin failures++; if (failures < 10) $display("rd1[%0d] %h exp %h", rd1_idx, rd1_data, m[rd1_idx]); end
      @(posedge clk);
      if (wr0_en) m[wr0_idx] = wr0_data;
      if (wr1_en) m[wr1_idx] = wr1_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RANDOM + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

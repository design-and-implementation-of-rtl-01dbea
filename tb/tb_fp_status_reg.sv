// tb_fp_status_reg: self-checking testbench of the sticky exception register.
//
// Random flag sets and clears are applied each cycle and the register is
// compared with a model: flags accumulate by OR, a clear empties the register
// at the clock edge but flags arriving in the same cycle survive, and reset
// gives zero.
module tb_fp_status_reg;
  import fpu_pkg::*;

  localparam int unsigned N_RANDOM = 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    set_en = 0, clr = 0;
  fflags_t set_flags = '0, status;
  logic [4:0] m;
  int checks = 0, failures = 0, n_keep = 0;

  fp_status_reg dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (status !== '0) begin failures++; $display("not zero after reset"); end
    rst_n = 1;
    m = '0;
    for (int i = 0; i < N_RANDOM; i++) begin
      @(negedge clk);
      set_en = ($urandom_range(0, 2) == 0);
      set_flags = fflags_t'(5'($urandom) & 5'($urandom));
      clr = ($urandom_range(0, 9) == 0);
      if (clr && set_en && set_flags != 0) n_keep++;
      @(posedge clk);
      m = (clr ? 5'd0 : m) | (set_en ? 5'(set_flags) : 5'd0);
      #1;
      checks++;
      if (status !== m) begin failures++; if (failures < 10) $display("status %b exp %b", status, m); end
    end
    checks++;
    if (n_keep == 0) begin failures++; $display("set and clear never coincided"); end
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

// fp_acc_file: separate accumulator file for multiply-accumulate.
//
// ACC_NUM entries of 32 bits (four in the proposed FPU: with a back-to-back
// accumulate latency of three cycles, four independent accumulators are enough
// to issue one accumulation every cycle). Two combinational read ports serve
// the multiply-add unit's addend and the move-from-accumulator operation. Two
// write ports take the multiply-add result and the move-to-accumulator data; a
// write on port 0 (multiply-add) wins if both name the same entry, which the
// issue logic never allows (checked by an assertion). Writes take effect at the
// clock edge, so a read in the same cycle returns the old value. All entries
// reset to +0.
//
// The 32-bit entries, the flip-flop storage and the default of four entries
// follow the proposed FPU; the port count and reset value are this design's.
// Lint notes rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the assertion.
module fp_acc_file
  import fpu_pkg::*;
#(
  parameter int unsigned ACC_NUM = ACC_NUM_DEFAULT,
  localparam int unsigned ACC_W  = (ACC_NUM > 1) ? $clog2(ACC_NUM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] rd0_idx,
  output fp32_t            rd0_data,
  input  logic [ACC_W-1:0] rd1_idx,
  output fp32_t            rd1_data,
  input  logic             wr0_en,
  input  logic [ACC_W-1:0] wr0_idx,
  input  fp32_t            wr0_data,
  input  logic             wr1_en,
  input  logic [ACC_W-1:0] wr1_idx,
  input  fp32_t            wr1_data
);

  fp32_t acc_q [ACC_NUM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ACC_NUM; i++) acc_q[i] <= '0;
    end else begin
      if (wr1_en) acc_q[wr1_idx] <= wr1_data;
      if (wr0_en) acc_q[wr0_idx] <= wr0_data;
    end
  end

  assign rd0_data = acc_q[rd0_idx];
  assign rd1_data = acc_q[rd1_idx];

  a_no_write_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr0_en && wr1_en && wr0_idx == wr1_idx));

endmodule

// fp_pipe: output register chain shared by the FPU units.
//
// Each unit computes its result in one combinational block and then passes it
// through DEPTH registers, so the unit's latency is DEPTH cycles from the issue
// cycle to the cycle in which out_valid is high. Only the valid bits are reset;
// the payload is written whenever its valid bit is, so no stale data can leave
// the chain marked valid. DEPTH must be at least 1.
// Writing each unit as logic plus movable output registers mirrors how the
// units were built for retiming; the register chain itself is this design's.
module fp_pipe #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  logic [DEPTH-1:0]            v_q;
  logic [DEPTH-1:0][WIDTH-1:0] d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else begin
      v_q[0] <= in_valid;
      for (int i = 1; i < DEPTH; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    d_q[0] <= in_data;
    for (int i = 1; i < DEPTH; i++) d_q[i] <= d_q[i-1];
  end

  assign out_valid = v_q[DEPTH-1];
  assign out_data  = d_q[DEPTH-1];

  initial assert (DEPTH >= 1) else $fatal(1, "fp_pipe: DEPTH must be at least 1");

endmodule

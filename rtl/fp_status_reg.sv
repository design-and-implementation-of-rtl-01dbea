// fp_status_reg: sticky exception status register.
//
// The core has no traps, so the exception flags of every completed FPU
// operation are ORed into this register and stay set until software reads them
// with the read-flags operation, which returns the value and clears it. Flags
// arriving in the same cycle as the clear are kept, so none is lost.
//
// Interface: set_en/set_flags are sampled at each rising edge; status is the
// registered value. clr empties the register at the same edge. Resets to zero.
//
// The register and the read instruction follow the proposed FPU; clearing on
// read is this design's choice. The divide-by-zero flag is never set.
module fp_status_reg
  import fpu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    set_en,
  input  fflags_t set_flags,
  input  logic    clr,
  output fflags_t status
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else        status <= (clr ? fflags_t'('0) : status) | (set_en ? set_flags : fflags_t'('0));
  end

endmodule

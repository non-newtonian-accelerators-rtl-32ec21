// nna_bypass_ctrl: the bypass state of a Non-Newtonian accelerator.
//
// A stage is bypassed (treated as faulty) when either the software has set
// its bit in the bypass register or a hardware fault detector drives its
// hw_fault input. The document leaves the detection method open: software
// may write the register directly, or a detector may be hard-wired to the
// bypass signals; both paths are provided and ORed together.
//
// Interface: cfg_we writes cfg_wdata into the register on the next rising
// edge (whole-register write, one bit per stage). bypass_reg reads it back.
// faulty is combinational from the register and hw_fault.
// Reset clears the register (no stage bypassed), which is this design's choice.
module nna_bypass_ctrl #(
  parameter int unsigned N = 4   // number of sub-accelerators
) (
  input  logic         clk,
  input  logic         rst_n,       // synchronous, active low
  input  logic         cfg_we,
  input  logic [N-1:0] cfg_wdata,
  input  logic [N-1:0] hw_fault,
  output logic [N-1:0] bypass_reg,
  output logic [N-1:0] faulty
);
  always_ff @(posedge clk) begin
    if (!rst_n)      bypass_reg <= '0;
    else if (cfg_we) bypass_reg <= cfg_wdata;
  end
  assign faulty = bypass_reg | hw_fault;
endmodule

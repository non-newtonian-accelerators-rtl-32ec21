// stage_reg: the output register of a sub-accelerator datapath stage.
//
// A main register (out_*) with a one-word skid register behind it. A word
// accepted in cycle t is on the output in cycle t+1, and a chain of
// stage_regs streams one word per cycle. in_ready is a register output
// (not skid_valid), so ready never ripples combinationally through a chain
// of stages: when the output stalls, the one word already on its way is
// caught in the skid register and the stage stops accepting a cycle later.
// The skid register is this design's choice; the document does not describe
// the stage handshake.
module stage_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  logic         skid_valid;
  logic [W-1:0] skid_data;

  assign in_ready = !skid_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      skid_valid <= 1'b0;
    end else if (!out_valid || out_ready) begin
      // main register free this cycle: refill from skid first, else input
      if (skid_valid) begin
        out_valid  <= 1'b1;
        skid_valid <= 1'b0;
      end else begin
        out_valid  <= in_valid;
      end
    end else if (in_valid && in_ready) begin
      skid_valid <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!out_valid || out_ready) begin
      if (skid_valid)    out_data <= skid_data;
      else if (in_valid) out_data <= in_data;
    end
    if (out_valid && !out_ready && in_valid && in_ready) skid_data <= in_data;
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));
endmodule

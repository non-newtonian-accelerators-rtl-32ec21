// toy_core: a stand-in sub-accelerator for testing the interconnect on its
// own. Stage I computes x*3 + I + 1 (mod 2^W), which depends on the order of
// the stages, and holds it in a stage_reg (one cycle of latency).
module toy_core #(
  parameter int W = 32,
  parameter int I = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  stage_reg #(.W(W)) u_reg (.clk, .rst_n, .in_valid, .in_ready,
    .in_data(W'(in_data * 3 + W'(I + 1))), .out_valid, .out_ready, .out_data);
endmodule

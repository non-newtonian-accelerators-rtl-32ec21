// dct_nna: 8x8 2-D DCT built as a Non-Newtonian accelerator of two
// sub-accelerators (dct_stage): a row pass and a column pass, each a 1-D
// 8-point DCT with a transpose.
// Software pushes an 8x8 block (element (r,c) at [(8r+c)*DW +: DW]) into
// consumer queue 0 and reads the 2-D DCT coefficients, same layout with r
// the vertical and c the horizontal frequency, from producer queue 1.
// Fault free, a block spends two cycles in the datapath plus one cycle in
// each of the two queues, and blocks stream at one per cycle. If one pass
// is bypassed, software computes that pass between the queues (see
// nna_chain). Block size and the two-stage split are this design's choices;
// the document only names the accelerator.
module dct_nna #(
  parameter int unsigned DW    = 16,  // bits per sample
  parameter int unsigned DEPTH = 4    // software queue depth
) (
  input  logic             clk,
  input  logic             rst_n,     // synchronous, active low
  input  logic             sw_cons_valid [2],
  output logic             sw_cons_ready [2],
  input  logic [64*DW-1:0] sw_cons_data  [2],
  output logic             sw_prod_valid [2],
  input  logic             sw_prod_ready [2],
  output logic [64*DW-1:0] sw_prod_data  [2],
  input  logic             cfg_we,
  input  logic [1:0]       cfg_wdata,
  input  logic [1:0]       hw_fault,
  output logic [1:0]       bypass_reg,
  output logic [1:0]       faulty
);
  localparam int unsigned W = 64 * DW;

  logic         core_in_valid [2];
  logic         core_in_ready [2];
  logic [W-1:0] core_in_data  [2];
  logic         core_out_valid[2];
  logic         core_out_ready[2];
  logic [W-1:0] core_out_data [2];

  nna_chain #(.N(2), .W(W), .DEPTH(DEPTH)) u_chain (
    .clk, .rst_n,
    .sw_cons_valid, .sw_cons_ready, .sw_cons_data,
    .sw_prod_valid, .sw_prod_ready, .sw_prod_data,
    .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty,
    .core_in_valid, .core_in_ready, .core_in_data,
    .core_out_valid, .core_out_ready, .core_out_data
  );

  for (genvar s = 0; s < 2; s++) begin : g_stage
    dct_stage #(.DW(DW)) u_stage (
      .clk, .rst_n,
      .in_valid (core_in_valid[s]),  .in_ready (core_in_ready[s]),  .in_data (core_in_data[s]),
      .out_valid(core_out_valid[s]), .out_ready(core_out_ready[s]), .out_data(core_out_data[s])
    );
  end
endmodule

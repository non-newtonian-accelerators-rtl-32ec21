// fft_nna: an N-point FFT built as a Non-Newtonian accelerator.
//
// The log2(N) radix-2 butterfly stages are separate sub-accelerators
// (fft_stage) joined by nna_chain; the default N = 16 gives four stages,
// the four sub-accelerators drawn in the document's overview figure.
// Software pushes N complex samples in natural order (see fft_stage for the
// word layout) into consumer queue 0 and reads DFT(x)/N, in natural order,
// from producer queue log2(N)-1. Fault free, a transform spends log2(N)
// cycles in the datapath plus one cycle in each of the two queues, and
// transforms stream at one per cycle. A bypassed stage is computed by
// software between the producer queue of the stage before it and the
// consumer queue of the stage after it (see nna_chain).
module fft_nna #(
  parameter int unsigned N     = 16,  // transform size (this design's choice)
  parameter int unsigned DW    = 16,  // bits per real or imaginary part
  parameter int unsigned DEPTH = 4    // software queue depth
) (
  input  logic              clk,
  input  logic              rst_n,     // synchronous, active low
  input  logic              sw_cons_valid [$clog2(N)],
  output logic              sw_cons_ready [$clog2(N)],
  input  logic [N*2*DW-1:0] sw_cons_data  [$clog2(N)],
  output logic              sw_prod_valid [$clog2(N)],
  input  logic              sw_prod_ready [$clog2(N)],
  output logic [N*2*DW-1:0] sw_prod_data  [$clog2(N)],
  input  logic                  cfg_we,
  input  logic [$clog2(N)-1:0]  cfg_wdata,
  input  logic [$clog2(N)-1:0]  hw_fault,
  output logic [$clog2(N)-1:0]  bypass_reg,
  output logic [$clog2(N)-1:0]  faulty
);
  localparam int unsigned S = $clog2(N);
  localparam int unsigned W = N * 2 * DW;

  logic         core_in_valid [S];
  logic         core_in_ready [S];
  logic [W-1:0] core_in_data  [S];
  logic         core_out_valid[S];
  logic         core_out_ready[S];
  logic [W-1:0] core_out_data [S];

  nna_chain #(.N(S), .W(W), .DEPTH(DEPTH)) u_chain (
    .clk, .rst_n,
    .sw_cons_valid, .sw_cons_ready, .sw_cons_data,
    .sw_prod_valid, .sw_prod_ready, .sw_prod_data,
    .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty,
    .core_in_valid, .core_in_ready, .core_in_data,
    .core_out_valid, .core_out_ready, .core_out_data
  );

  for (genvar s = 0; s < S; s++) begin : g_stage
    fft_stage #(.N(N), .DW(DW), .STAGE(s)) u_stage (
      .clk, .rst_n,
      .in_valid (core_in_valid[s]),  .in_ready (core_in_ready[s]),  .in_data (core_in_data[s]),
      .out_valid(core_out_valid[s]), .out_ready(core_out_ready[s]), .out_data(core_out_data[s])
    );
  end
endmodule

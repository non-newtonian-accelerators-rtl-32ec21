// fft_stage: one sub-accelerator of the FFT accelerator, i.e. one stage of
// an N-point radix-2 decimation-in-time FFT on complex fixed-point samples.
//
// Word layout: sample k occupies bits [k*2*DW +: 2*DW], real part in the
// upper DW bits, imaginary part in the lower DW bits, both two's complement.
// Stage 0 first puts the samples in bit-reversed order, so the accelerator
// takes its input in natural order. Stage s then forms butterflies of span
// H = 2^s: for every k with bit s clear, a = x[k], b = x[k+H],
// w = exp(-2*pi*i*j/(2H)) with j = k mod H, and
//     y[k]   = (a + b*w) >>> 1,   y[k+H] = (a - b*w) >>> 1.
// The halving keeps every stage inside DW bits, so the accelerator returns
// DFT(x)/N. Twiddles are Q1.14 and rounded to nearest; products are
// truncated (arithmetic shift) after the multiply, and so is the halving.
// Inputs should stay within +/-2^(DW-2) to leave headroom for b*w.
// Timing: combinational butterflies into a stage_reg, one word per cycle,
// one cycle of latency.
//
// The document names an FFT accelerator made of sub-accelerators but gives
// neither its size nor its arithmetic: the radix-2 split with one stage per
// sub-accelerator and all number formats are this design's choices.
module fft_stage #(
  parameter int unsigned N     = 16,  // transform size, a power of two
  parameter int unsigned DW    = 16,  // bits per real or imaginary part
  parameter int unsigned STAGE = 0    // which butterfly stage, 0..log2(N)-1
) (
  input  logic              clk,
  input  logic              rst_n,     // synchronous, active low
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [N*2*DW-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [N*2*DW-1:0] out_data
);
  import dsp_pkg::*;

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned H    = 1 << STAGE;

  logic signed [DW-1:0] xr [N];
  logic signed [DW-1:0] xi [N];
  logic [N*2*DW-1:0]    y;

  // input, bit-reversed in stage 0
  for (genvar k = 0; k < N; k++) begin : g_in
    localparam int unsigned SRC = (STAGE == 0) ? bit_reverse(k, LOGN) : k;
    assign xr[k] = in_data[SRC*2*DW + DW +: DW];
    assign xi[k] = in_data[SRC*2*DW      +: DW];
  end

  for (genvar k = 0; k < N; k++) begin : g_bf
    if ((k & H) == 0) begin : g_top
      localparam int unsigned J  = k % H;
      localparam real         A  = -2.0 * PI * real'(J) / real'(2 * H);
      localparam int          WR = to_coef(cos_r(A));
      localparam int          WI = to_coef(sin_r(A));
      logic signed [DW+1:0] bwr, bwi;   // b*w, two bits of headroom
      logic signed [DW+2:0] sr, si, dr, di;
      always_comb begin
        bwr = (DW+2)'((32'(xr[k+H]) * WR - 32'(xi[k+H]) * WI) >>> COEF_FRAC);
        bwi = (DW+2)'((32'(xr[k+H]) * WI + 32'(xi[k+H]) * WR) >>> COEF_FRAC);
        sr  = (DW+3)'(xr[k]) + (DW+3)'(bwr);
        si  = (DW+3)'(xi[k]) + (DW+3)'(bwi);
        dr  = (DW+3)'(xr[k]) - (DW+3)'(bwr);
        di  = (DW+3)'(xi[k]) - (DW+3)'(bwi);
      end
      assign y[k*2*DW + DW +: DW]     = DW'(sr >>> 1);
      assign y[k*2*DW      +: DW]     = DW'(si >>> 1);
      assign y[(k+H)*2*DW + DW +: DW] = DW'(dr >>> 1);
      assign y[(k+H)*2*DW      +: DW] = DW'(di >>> 1);
    end
  end

  stage_reg #(.W(N*2*DW)) u_reg (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(y),
    .out_valid, .out_ready, .out_data
  );

  initial begin
    assert ((1 << LOGN) == N && N >= 2) else $error("fft_stage: N must be a power of two");
    assert (STAGE < LOGN) else $error("fft_stage: STAGE out of range");
  end
endmodule

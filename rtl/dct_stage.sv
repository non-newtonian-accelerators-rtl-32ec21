// dct_stage: one sub-accelerator of the 2-D DCT accelerator. It takes an
// 8x8 block, computes the 8-point 1-D DCT-II of each of its rows and
// returns the result transposed. Two such stages in a row give the 2-D DCT:
// the first turns X into C*X^T, the second into C*X*C^T.
//
// The transform is orthonormal: Y[k] = sum_n c(k,n) * X[n] with
// c(k,n) = a(k) * cos((2n+1)*k*pi/16), a(0) = sqrt(1/8), a(k>0) = 1/2.
// Coefficients are Q1.14, each sum is rounded to nearest (add 2^13, shift
// right by 14) and kept to DW bits; for 8-bit image data (+/-255 after level
// shift) nothing overflows.
// Word layout: element (r,c) of the block at bits [(8*r+c)*DW +: DW],
// two's complement.
// Timing: 64 multiply-accumulate trees (8 products each) into a stage_reg;
// one block per cycle, one cycle of latency.
//
// The document names a 2-D DCT accelerator split into sub-accelerators and
// says it uses a fast DCT algorithm, but does not say which. The row/column
// split into two stages and the direct matrix product (rather than a
// factored fast algorithm) are this design's choices.
module dct_stage #(
  parameter int unsigned DW = 16   // bits per sample
) (
  input  logic            clk,
  input  logic            rst_n,   // synchronous, active low
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [64*DW-1:0] in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [64*DW-1:0] out_data
);
  import dsp_pkg::*;

  logic signed [DW-1:0] x [8][8];
  logic [64*DW-1:0]     y;

  for (genvar r = 0; r < 8; r++) begin : g_row
    for (genvar c = 0; c < 8; c++) begin : g_col
      assign x[r][c] = in_data[(8*r + c)*DW +: DW];
    end
  end

  // 1-D DCT of row r, output k, written to position (k, r).
  for (genvar r = 0; r < 8; r++) begin : g_r
    for (genvar k = 0; k < 8; k++) begin : g_k
      localparam real AK = (k == 0) ? 0.35355339059327376 : 0.5;  // sqrt(1/8), sqrt(2/8)
      logic signed [DW+COEF_FRAC+3:0] prod [8];
      logic signed [DW+COEF_FRAC+3:0] acc;
      for (genvar n = 0; n < 8; n++) begin : g_n
        localparam int C = to_coef(AK * cos_r(real'((2*n + 1) * k) * PI / 16.0));
        assign prod[n] = (DW+COEF_FRAC+4)'(x[r][n]) * (DW+COEF_FRAC+4)'(C);
      end
      always_comb begin
        acc = (DW+COEF_FRAC+4)'(1 << (COEF_FRAC - 1));  // rounding
        for (int n = 0; n < 8; n++) acc += prod[n];
      end
      assign y[(8*k + r)*DW +: DW] = DW'(acc >>> COEF_FRAC);
    end
  end

  stage_reg #(.W(64*DW)) u_reg (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(y),
    .out_valid, .out_ready, .out_data
  );
endmodule

// nna_top: the three case-study Non-Newtonian accelerators side by side:
// AES-128 in its 11-stage configuration (u_aes) and in its 3-stage
// configuration (u_aes3), an N-point FFT (u_fft) and an 8x8 2-D DCT
// (u_dct). Each is a chain of sub-accelerators with a consumer and a
// producer queue per sub-accelerator, direct links between neighbouring
// sub-accelerators, and a bypass register that lets software (or a fault
// detector on hw_fault) take any stage out of service; software then
// computes that stage between the queues. The accelerators share only clock
// and reset; each brings out its own queue, bypass and fault ports, with the
// prefix aes_, aes3_, fft_ or dct_. The software thread, the host processor
// and the fault detectors are outside this design.
module nna_top #(
  parameter int unsigned AES_STAGES  = 11,  // first AES configuration
  parameter int unsigned AES3_STAGES = 3,   // second AES configuration
  parameter int unsigned FFT_N       = 16,  // FFT size (log2 = number of stages)
  parameter int unsigned FFT_DW      = 16,
  parameter int unsigned DCT_DW      = 16,
  parameter int unsigned DEPTH       = 4,   // depth of every software queue
  localparam int unsigned FFT_STAGES = $clog2(FFT_N),
  localparam int unsigned DCT_STAGES = 2
) (
  input  logic            clk,
  input  logic            rst_n,   // synchronous, active low
  // aes_nna (aes)
  input  logic            aes_cons_valid [AES_STAGES],
  output logic            aes_cons_ready [AES_STAGES],
  input  logic [256-1:0] aes_cons_data  [AES_STAGES],
  output logic            aes_prod_valid [AES_STAGES],
  input  logic            aes_prod_ready [AES_STAGES],
  output logic [256-1:0] aes_prod_data  [AES_STAGES],
  input  logic            aes_cfg_we,
  input  logic [AES_STAGES-1:0] aes_cfg_wdata,
  input  logic [AES_STAGES-1:0] aes_hw_fault,
  output logic [AES_STAGES-1:0] aes_bypass_reg,
  output logic [AES_STAGES-1:0] aes_faulty,
  // aes_nna (aes3)
  input  logic            aes3_cons_valid [AES3_STAGES],
  output logic            aes3_cons_ready [AES3_STAGES],
  input  logic [256-1:0] aes3_cons_data  [AES3_STAGES],
  output logic            aes3_prod_valid [AES3_STAGES],
  input  logic            aes3_prod_ready [AES3_STAGES],
  output logic [256-1:0] aes3_prod_data  [AES3_STAGES],
  input  logic            aes3_cfg_we,
  input  logic [AES3_STAGES-1:0] aes3_cfg_wdata,
  input  logic [AES3_STAGES-1:0] aes3_hw_fault,
  output logic [AES3_STAGES-1:0] aes3_bypass_reg,
  output logic [AES3_STAGES-1:0] aes3_faulty,
  // fft_nna (fft)
  input  logic            fft_cons_valid [FFT_STAGES],
  output logic            fft_cons_ready [FFT_STAGES],
  input  logic [FFT_N*2*FFT_DW-1:0] fft_cons_data  [FFT_STAGES],
  output logic            fft_prod_valid [FFT_STAGES],
  input  logic            fft_prod_ready [FFT_STAGES],
  output logic [FFT_N*2*FFT_DW-1:0] fft_prod_data  [FFT_STAGES],
  input  logic            fft_cfg_we,
  input  logic [FFT_STAGES-1:0] fft_cfg_wdata,
  input  logic [FFT_STAGES-1:0] fft_hw_fault,
  output logic [FFT_STAGES-1:0] fft_bypass_reg,
  output logic [FFT_STAGES-1:0] fft_faulty,
  // dct_nna (dct)
  input  logic            dct_cons_valid [DCT_STAGES],
  output logic            dct_cons_ready [DCT_STAGES],
  input  logic [64*DCT_DW-1:0] dct_cons_data  [DCT_STAGES],
  output logic            dct_prod_valid [DCT_STAGES],
  input  logic            dct_prod_ready [DCT_STAGES],
  output logic [64*DCT_DW-1:0] dct_prod_data  [DCT_STAGES],
  input  logic            dct_cfg_we,
  input  logic [DCT_STAGES-1:0] dct_cfg_wdata,
  input  logic [DCT_STAGES-1:0] dct_hw_fault,
  output logic [DCT_STAGES-1:0] dct_bypass_reg,
  output logic [DCT_STAGES-1:0] dct_faulty
);
  aes_nna #(.STAGES(AES_STAGES), .DEPTH(DEPTH)) u_aes (
    .clk, .rst_n,
    .sw_cons_valid(aes_cons_valid), .sw_cons_ready(aes_cons_ready), .sw_cons_data(aes_cons_data),
    .sw_prod_valid(aes_prod_valid), .sw_prod_ready(aes_prod_ready), .sw_prod_data(aes_prod_data),
    .cfg_we(aes_cfg_we), .cfg_wdata(aes_cfg_wdata), .hw_fault(aes_hw_fault),
    .bypass_reg(aes_bypass_reg), .faulty(aes_faulty)
  );

  aes_nna #(.STAGES(AES3_STAGES), .DEPTH(DEPTH)) u_aes3 (
    .clk, .rst_n,
    .sw_cons_valid(aes3_cons_valid), .sw_cons_ready(aes3_cons_ready), .sw_cons_data(aes3_cons_data),
    .sw_prod_valid(aes3_prod_valid), .sw_prod_ready(aes3_prod_ready), .sw_prod_data(aes3_prod_data),
    .cfg_we(aes3_cfg_we), .cfg_wdata(aes3_cfg_wdata), .hw_fault(aes3_hw_fault),
    .bypass_reg(aes3_bypass_reg), .faulty(aes3_faulty)
  );

  fft_nna #(.N(FFT_N), .DW(FFT_DW), .DEPTH(DEPTH)) u_fft (
    .clk, .rst_n,
    .sw_cons_valid(fft_cons_valid), .sw_cons_ready(fft_cons_ready), .sw_cons_data(fft_cons_data),
    .sw_prod_valid(fft_prod_valid), .sw_prod_ready(fft_prod_ready), .sw_prod_data(fft_prod_data),
    .cfg_we(fft_cfg_we), .cfg_wdata(fft_cfg_wdata), .hw_fault(fft_hw_fault),
    .bypass_reg(fft_bypass_reg), .faulty(fft_faulty)
  );

  dct_nna #(.DW(DCT_DW), .DEPTH(DEPTH)) u_dct (
    .clk, .rst_n,
    .sw_cons_valid(dct_cons_valid), .sw_cons_ready(dct_cons_ready), .sw_cons_data(dct_cons_data),
    .sw_prod_valid(dct_prod_valid), .sw_prod_ready(dct_prod_ready), .sw_prod_data(dct_prod_data),
    .cfg_we(dct_cfg_we), .cfg_wdata(dct_cfg_wdata), .hw_fault(dct_hw_fault),
    .bypass_reg(dct_bypass_reg), .faulty(dct_faulty)
  );
endmodule

// tb_nna_top: the whole design at its default sizes. The four accelerators
// (AES-128 with 11 stages, AES-128 with 3 stages, 16-point FFT, 8x8 2-D DCT)
// run at the same time, each with its own software thread model, through
// the full sequence of nna_scenario: a fault-free stream with its latency
// and rate checked, every stage bypassed in turn by software, a stage taken
// out by the hardware fault input, several stages at once, and a stalled
// reader. Each scenario counts a failure for any mechanism that never
// happened (direct stage-to-stage transfer, output to software, software
// feeding a later stage, hardware fault bypass, multi-stage bypass,
// back-pressure).
module tb_nna_top;
  import nna_sw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;

  logic          aes_cv [11], aes_cr [11], aes_pv [11], aes_pr [11];
  logic [256-1:0] aes_cd [11], aes_pd [11];
  logic          aes_we;
  logic [11-1:0]  aes_wd, aes_hw, aes_br, aes_f;
  logic          aes_done;
  int            aes_checks, aes_failures;
  logic          aes3_cv [3], aes3_cr [3], aes3_pv [3], aes3_pr [3];
  logic [256-1:0] aes3_cd [3], aes3_pd [3];
  logic          aes3_we;
  logic [3-1:0]  aes3_wd, aes3_hw, aes3_br, aes3_f;
  logic          aes3_done;
  int            aes3_checks, aes3_failures;
  logic          fft_cv [4], fft_cr [4], fft_pv [4], fft_pr [4];
  logic [512-1:0] fft_cd [4], fft_pd [4];
  logic          fft_we;
  logic [4-1:0]  fft_wd, fft_hw, fft_br, fft_f;
  logic          fft_done;
  int            fft_checks, fft_failures;
  logic          dct_cv [2], dct_cr [2], dct_pv [2], dct_pr [2];
  logic [1024-1:0] dct_cd [2], dct_pd [2];
  logic          dct_we;
  logic [2-1:0]  dct_wd, dct_hw, dct_br, dct_f;
  logic          dct_done;
  int            dct_checks, dct_failures;

  nna_top dut (
    .clk, .rst_n,
    .aes_cons_valid(aes_cv), .aes_cons_ready(aes_cr), .aes_cons_data(aes_cd),
    .aes_prod_valid(aes_pv), .aes_prod_ready(aes_pr), .aes_prod_data(aes_pd),
    .aes_cfg_we(aes_we), .aes_cfg_wdata(aes_wd), .aes_hw_fault(aes_hw),
    .aes_bypass_reg(aes_br), .aes_faulty(aes_f),
    .aes3_cons_valid(aes3_cv), .aes3_cons_ready(aes3_cr), .aes3_cons_data(aes3_cd),
    .aes3_prod_valid(aes3_pv), .aes3_prod_ready(aes3_pr), .aes3_prod_data(aes3_pd),
    .aes3_cfg_we(aes3_we), .aes3_cfg_wdata(aes3_wd), .aes3_hw_fault(aes3_hw),
    .aes3_bypass_reg(aes3_br), .aes3_faulty(aes3_f),
    .fft_cons_valid(fft_cv), .fft_cons_ready(fft_cr), .fft_cons_data(fft_cd),
    .fft_prod_valid(fft_pv), .fft_prod_ready(fft_pr), .fft_prod_data(fft_pd),
    .fft_cfg_we(fft_we), .fft_cfg_wdata(fft_wd), .fft_hw_fault(fft_hw),
    .fft_bypass_reg(fft_br), .fft_faulty(fft_f),
    .dct_cons_valid(dct_cv), .dct_cons_ready(dct_cr), .dct_cons_data(dct_cd),
    .dct_prod_valid(dct_pv), .dct_prod_ready(dct_pr), .dct_prod_data(dct_pd),
    .dct_cfg_we(dct_we), .dct_cfg_wdata(dct_wd), .dct_hw_fault(dct_hw),
    .dct_bypass_reg(dct_br), .dct_faulty(dct_f)
  );

  nna_scenario #(.N(11), .W(256), .KIND(K_AES), .P1(0), .DW(0)) u_aes (.clk, .rst_n, .start,
    .done(aes_done), .checks(aes_checks), .failures(aes_failures),
    .sw_cons_valid(aes_cv), .sw_cons_ready(aes_cr), .sw_cons_data(aes_cd),
    .sw_prod_valid(aes_pv), .sw_prod_ready(aes_pr), .sw_prod_data(aes_pd),
    .cfg_we(aes_we), .cfg_wdata(aes_wd), .hw_fault(aes_hw), .bypass_reg(aes_br), .faulty(aes_f));

  nna_scenario #(.N(3), .W(256), .KIND(K_AES), .P1(0), .DW(0)) u_aes3 (.clk, .rst_n, .start,
    .done(aes3_done), .checks(aes3_checks), .failures(aes3_failures),
    .sw_cons_valid(aes3_cv), .sw_cons_ready(aes3_cr), .sw_cons_data(aes3_cd),
    .sw_prod_valid(aes3_pv), .sw_prod_ready(aes3_pr), .sw_prod_data(aes3_pd),
    .cfg_we(aes3_we), .cfg_wdata(aes3_wd), .hw_fault(aes3_hw), .bypass_reg(aes3_br), .faulty(aes3_f));

  nna_scenario #(.N(4), .W(512), .KIND(K_FFT), .P1(16), .DW(16)) u_fft (.clk, .rst_n, .start,
    .done(fft_done), .checks(fft_checks), .failures(fft_failures),
    .sw_cons_valid(fft_cv), .sw_cons_ready(fft_cr), .sw_cons_data(fft_cd),
    .sw_prod_valid(fft_pv), .sw_prod_ready(fft_pr), .sw_prod_data(fft_pd),
    .cfg_we(fft_we), .cfg_wdata(fft_wd), .hw_fault(fft_hw), .bypass_reg(fft_br), .faulty(fft_f));

  nna_scenario #(.N(2), .W(1024), .KIND(K_DCT), .P1(0), .DW(16)) u_dct (.clk, .rst_n, .start,
    .done(dct_done), .checks(dct_checks), .failures(dct_failures),
    .sw_cons_valid(dct_cv), .sw_cons_ready(dct_cr), .sw_cons_data(dct_cd),
    .sw_prod_valid(dct_pv), .sw_prod_ready(dct_pr), .sw_prod_data(dct_pd),
    .cfg_we(dct_we), .cfg_wdata(dct_wd), .hw_fault(dct_hw), .bypass_reg(dct_br), .faulty(dct_f));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    start = 1;
    wait (aes_done && aes3_done && fft_done && dct_done);
    $display("TB_RESULT checks=%0d failures=%0d",
             aes_checks + aes3_checks + fft_checks + dct_checks,
             aes_failures + aes3_failures + fft_failures + dct_failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d",
             aes_checks + aes3_checks + fft_checks + dct_checks,
             aes_failures + aes3_failures + fft_failures + dct_failures + 1);
    $finish;
  end
endmodule

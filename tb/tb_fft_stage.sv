// tb_fft_stage: every butterfly stage of a 16-point FFT against the
// software stage model on random data (one-cycle latency), and the four
// stages in a row against a floating-point DFT divided by 16.
module tb_fft_stage;
  import nna_sw_pkg::*;
  localparam int FN = 16, DW = 16, S = 4, W = FN * 2 * DW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         iv [S], ir [S], ov [S];
  logic [W-1:0] id [S], od [S];

  for (genvar s = 0; s < S; s++) begin : g_s
    fft_stage #(.N(FN), .DW(DW), .STAGE(s)) dut (.clk, .rst_n, .in_valid(iv[s]), .in_ready(ir[s]),
      .in_data(id[s]), .out_valid(ov[s]), .out_ready(1'b1), .out_data(od[s]));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int s = 0; s < S; s++) begin iv[s] = 0; id[s] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      sw_word_t x, y;
      x = make_job(K_FFT, FN, DW);
      y = x;
      for (int s = 0; s < S; s++) begin
        @(negedge clk);
        iv[s] = 1; id[s] = W'(y);
        @(posedge clk); #1;
        iv[s] = 0;
        check(ov[s] && sw_word_t'(od[s]) == fft_stage_sw(y, FN, DW, s),
              $sformatf("stage %0d", s));
        y = sw_word_t'(od[s]);
      end
      check(ref_ok(K_FFT, FN, DW, x, y), "four stages = DFT/16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_dct_stage: the row-DCT-and-transpose stage against the software pass
// on random 8x8 blocks (one-cycle latency), and two passes against a
// floating-point 2-D DCT. Also a constant block, whose only non-zero
// coefficient is the DC term 8 * value.
module tb_dct_stage;
  import nna_sw_pkg::*;
  localparam int DW = 16, W = 64 * DW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         iv, ir, ov;
  logic [W-1:0] id, od;

  dct_stage #(.DW(DW)) dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(1'b1), .out_data(od));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pass(input sw_word_t x, output sw_word_t y);
    @(negedge clk);
    iv = 1; id = W'(x);
    @(posedge clk); #1;
    iv = 0;
    check(ov && sw_word_t'(od) == dct_pass_sw(x, DW), "one pass");
    y = sw_word_t'(od);
  endtask

  initial begin
    sw_word_t x, y, z;
    iv = 0; id = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      x = make_job(K_DCT, 0, DW);
      pass(x, y);
      pass(y, z);
      check(ref_ok(K_DCT, 0, DW, x, z), "two passes = 2-D DCT");
    end
    x = '0;
    for (int i = 0; i < 64; i++) x = put_s(x, i, DW, 100);
    pass(x, y);
    pass(y, z);
    check(get_s(z, 0, DW) == 800, $sformatf("DC term %0d", get_s(z, 0, DW)));
    for (int i = 1; i < 64; i++) check(get_s(z, i, DW) == 0, "AC terms of a flat block");
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

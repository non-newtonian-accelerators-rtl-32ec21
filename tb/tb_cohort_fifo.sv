// tb_cohort_fifo: random pushes and pops against a queue model; checks
// order, data, full/empty flags and the one-cycle write-to-read latency.
module tb_cohort_fifo;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [W-1:0] model [$];

  cohort_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready, "empty after reset");
    // latency: write, then visible on the next cycle
    in_valid = 1; in_data = 16'habcd;
    #1 check(!out_valid, "no fall-through");
    @(posedge clk); model.push_back(in_data);
    @(negedge clk);
    in_valid = 0;
    check(out_valid && out_data == 16'habcd, "word visible one cycle after write");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(out_valid == (model.size() > 0), "valid matches occupancy");
      check(in_ready == (model.size() < DEPTH), "ready matches occupancy");
      if (out_valid && model.size() > 0) check(out_data == model[0], "data in order");
      in_valid  = 1'($urandom);
      in_data   = W'($urandom);
      out_ready = 1'($urandom);
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

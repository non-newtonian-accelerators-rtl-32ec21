// tb_nna_bypass_ctrl: reset value, software writes (taking effect on the
// next edge, held without cfg_we), and the OR with the hardware fault lines.
module tb_nna_bypass_ctrl;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic         cfg_we;
  logic [N-1:0] cfg_wdata, hw_fault, bypass_reg, faulty, model;

  nna_bypass_ctrl #(.N(N)) dut (.clk, .rst_n, .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cfg_we = 1; cfg_wdata = '1; hw_fault = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(bypass_reg == '0, "reset clears the register");
    rst_n = 1; cfg_we = 0;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      check(bypass_reg == model, "register value");
      check(faulty == (model | hw_fault), "faulty = register | hw_fault");
      cfg_we = ($urandom_range(0, 3) == 0);
      cfg_wdata = N'($urandom);
      hw_fault = ($urandom_range(0, 1) == 0) ? '0 : N'($urandom);
      #1 check(faulty == (model | hw_fault), "hw_fault acts at once");
      @(posedge clk);
      if (cfg_we) model = cfg_wdata;
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

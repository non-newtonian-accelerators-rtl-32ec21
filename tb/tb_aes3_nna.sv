// tb_aes3_nna: the 3-stage AES configuration (rounds 0-2, 3-6, 7-10) end
// to end with its software thread: fault free (latency 5 cycles, one block
// per cycle), each stage bypassed in turn, the hardware fault input, two
// stages at once, all three, and back-pressure (see nna_scenario).
module tb_aes3_nna;
  import nna_sw_pkg::*;
  localparam int N = 3;
  localparam int W = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done;
  int checks, failures;

  logic         cv [N], cr [N], pv [N], pr [N];
  logic [W-1:0] cd [N], pd [N];
  logic         cfg_we;
  logic [N-1:0] cfg_wdata, hw_fault, bypass_reg, faulty;

  aes_nna #(.STAGES(N)) dut (.clk, .rst_n,
    .sw_cons_valid(cv), .sw_cons_ready(cr), .sw_cons_data(cd),
    .sw_prod_valid(pv), .sw_prod_ready(pr), .sw_prod_data(pd),
    .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty);

  nna_scenario #(.N(N), .W(W), .KIND(K_AES), .P1(0), .DW(0)) u_sc (.clk, .rst_n, .start, .done,
    .checks, .failures,
    .sw_cons_valid(cv), .sw_cons_ready(cr), .sw_cons_data(cd),
    .sw_prod_valid(pv), .sw_prod_ready(pr), .sw_prod_data(pd),
    .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    start = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_nna_chain: the queue-bypassing interconnect with four toy stages
// (toy_core) and the software thread model: fault free stream (latency 6,
// one word per cycle), each stage bypassed, the hardware fault input, two
// stages at once, all stages, and back-pressure (see nna_scenario).
module tb_nna_chain;
  import nna_sw_pkg::*;
  localparam int N = 4;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done;
  int checks, failures, bad_input = 0;

  logic         cv [N], cr [N], pv [N], pr [N];
  logic [W-1:0] cd [N], pd [N];
  logic         cfg_we;
  logic [N-1:0] cfg_wdata, hw_fault, bypass_reg, faulty;
  logic         civ [N], cir [N], cov [N], cor [N];
  logic [W-1:0] cid [N], cod [N];

  nna_chain #(.N(N), .W(W)) dut (.clk, .rst_n,
    .sw_cons_valid(cv), .sw_cons_ready(cr), .sw_cons_data(cd),
    .sw_prod_valid(pv), .sw_prod_ready(pr), .sw_prod_data(pd),
    .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty,
    .core_in_valid(civ), .core_in_ready(cir), .core_in_data(cid),
    .core_out_valid(cov), .core_out_ready(cor), .core_out_data(cod));

  for (genvar i = 0; i < N; i++) begin : g_core
    toy_core #(.W(W), .I(i)) u_core (.clk, .rst_n,
      .in_valid(civ[i]), .in_ready(cir[i]), .in_data(cid[i]),
      .out_valid(cov[i]), .out_ready(cor[i]), .out_data(cod[i]));
  end

  nna_scenario #(.N(N), .W(W), .KIND(K_TEST), .P1(W), .DW(0)) u_sc (.clk, .rst_n, .start, .done,
    .checks, .failures,
    .sw_cons_valid(cv), .sw_cons_ready(cr), .sw_cons_data(cd),
    .sw_prod_valid(pv), .sw_prod_ready(pr), .sw_prod_data(pd),
    .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty);

  // a bypassed stage must never be handed a word
  always @(posedge clk)
    if (rst_n)
      for (int i = 0; i < N; i++)
        if (faulty[i] && civ[i]) begin
          bad_input++;
          $display("FAIL: bypassed stage %0d given input", i);
        end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    start = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + bad_input);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

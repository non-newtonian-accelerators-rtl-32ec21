// tb_cohort_engine: three queue pairs driven at random at the same time;
// every consumer and producer queue must deliver its own words in order,
// independent of the others.
module tb_cohort_engine;
  localparam int N = 3, W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int moved = 0;
  logic         scv [N], scr [N], acv [N], acr [N], apv [N], apr [N], spv [N], spr [N];
  logic [W-1:0] scd [N], acd [N], apd [N], spd [N];
  logic [W-1:0] mc [N][$], mp [N][$];

  cohort_engine #(.N(N), .W(W), .DEPTH(4)) dut (.clk, .rst_n,
    .sw_cons_valid(scv), .sw_cons_ready(scr), .sw_cons_data(scd),
    .acc_cons_valid(acv), .acc_cons_ready(acr), .acc_cons_data(acd),
    .acc_prod_valid(apv), .acc_prod_ready(apr), .acc_prod_data(apd),
    .sw_prod_valid(spv), .sw_prod_ready(spr), .sw_prod_data(spd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      scv[i] = 0; acr[i] = 0; apv[i] = 0; spr[i] = 0; scd[i] = '0; apd[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (acv[i]) check(mc[i].size() > 0 && acd[i] == mc[i][0], $sformatf("consumer %0d", i));
        if (spv[i]) check(mp[i].size() > 0 && spd[i] == mp[i][0], $sformatf("producer %0d", i));
        check(acv[i] == (mc[i].size() > 0) && spv[i] == (mp[i].size() > 0), "valid flags");
        scv[i] = 1'($urandom); scd[i] = W'({i[3:0], 8'($urandom)});
        acr[i] = 1'($urandom);
        apv[i] = 1'($urandom); apd[i] = W'({i[3:0], 8'($urandom)});
        spr[i] = 1'($urandom);
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (acv[i] && acr[i]) begin void'(mc[i].pop_front()); moved++; end
        if (spv[i] && spr[i]) begin void'(mp[i].pop_front()); moved++; end
        if (scv[i] && scr[i]) mc[i].push_back(scd[i]);
        if (apv[i] && apr[i]) mp[i].push_back(apd[i]);
      end
    end
    check(moved > 1500, $sformatf("only %0d words came out of the queues", moved));
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

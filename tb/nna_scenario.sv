// nna_scenario: drives one Non-Newtonian accelerator through every way of
// using it and checks each result. On start it runs, in order:
//   1. no stage bypassed: a back-to-back stream; checks the end-to-end latency
//      (N datapath cycles + one cycle per queue = N+2) and one result per cycle;
//   2. each stage bypassed in turn by a software write of the bypass register;
//   3. a stage taken out by the hardware fault input instead;
//   4. two stages bypassed together (when N >= 3), then every stage;
//   5. a stream with the software reader stalling, so back-pressure reaches
//      the datapath.
// Every result is compared with the all-software chain (bit exact) and with
// the mathematical definition (ref_ok). The software thread is nna_sw_agent.
// Counts of how often each mechanism was exercised are brought out; a
// mechanism that never happened counts as a failure.
module nna_scenario
  import nna_sw_pkg::*;
#(
  parameter int    N    = 4,
  parameter int    W    = 32,
  parameter kind_t KIND = K_TEST,
  parameter int    P1   = 32,
  parameter int    DW   = 16,
  parameter int    JOBS = 8     // jobs per stream
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         done,
  output int           checks,
  output int           failures,
  output logic         sw_cons_valid [N],
  input  logic         sw_cons_ready [N],
  output logic [W-1:0] sw_cons_data  [N],
  input  logic         sw_prod_valid [N],
  output logic         sw_prod_ready [N],
  input  logic [W-1:0] sw_prod_data  [N],
  output logic         cfg_we,
  output logic [N-1:0] cfg_wdata,
  output logic [N-1:0] hw_fault,
  input  logic [N-1:0] bypass_reg,
  input  logic [N-1:0] faulty
);
  logic         job_valid, res_valid, stall_out;
  logic [W-1:0] job_data, res_data;
  int           sw_count, to_sw_count, from_sw_count;

  nna_sw_agent #(.N(N), .W(W), .KIND(KIND), .P1(P1), .DW(DW)) u_sw (
    .clk, .rst_n, .faulty, .stall_out,
    .sw_cons_valid, .sw_cons_ready, .sw_cons_data,
    .sw_prod_valid, .sw_prod_ready, .sw_prod_data,
    .job_valid, .job_data, .res_valid, .res_data,
    .sw_count, .to_sw_count, .from_sw_count
  );

  int       cycle;
  sw_word_t job_q [$];
  int       t_in [$];
  int       last_lat, first_out, last_out, n_out;
  int       n_direct, n_stall, n_hw, n_multi;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && sw_cons_valid[0] && sw_cons_ready[0]) t_in.push_back(cycle);
    if (rst_n && sw_prod_valid[N-1] && sw_prod_ready[N-1]) begin
      if (t_in.size() > 0) last_lat = cycle - t_in.pop_front();
      if (n_out == 0) first_out = cycle;
      last_out = cycle;
      n_out++;
    end
    if (rst_n && sw_prod_valid[N-1] && !sw_prod_ready[N-1]) n_stall++;
    if (rst_n && res_valid) begin
      sw_word_t j, r, e;
      check(job_q.size() > 0, "result without a job");
      j = job_q.pop_front();
      r = sw_word_t'(res_data);
      e = chain_sw(KIND, N, P1, DW, j);
      e = e & ((sw_word_t'(1) << W) - 1);
      check(r == e, $sformatf("result differs from software chain, bypass %b", faulty));
      check(ref_ok(KIND, P1, DW, j, r), "result differs from the reference");
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%m): %s", what);
    end
  endtask

  task automatic stream(int m);
    for (int i = 0; i < m; i++) begin
      sw_word_t j;
      j = make_job(KIND, P1, DW);
      @(negedge clk);
      job_valid = 1;
      job_data  = W'(j);
      job_q.push_back(j);
    end
    @(negedge clk);
    job_valid = 0;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while ((job_q.size() > 0) && guard < 2000) begin
      @(posedge clk);
      guard++;
    end
    check(job_q.size() == 0, "results missing");
    repeat (N + 4) @(posedge clk);
  endtask

  task automatic set_bypass(logic [N-1:0] b);
    @(negedge clk);
    cfg_we = 1; cfg_wdata = b;
    @(negedge clk);
    cfg_we = 0;
    check(bypass_reg == b, "bypass register readback");
  endtask

  initial begin
    job_valid = 0; job_data = '0; stall_out = 0;
    cfg_we = 0; cfg_wdata = '0; hw_fault = '0;
    done = 0; checks = 0; failures = 0; cycle = 0;
    n_out = 0; n_direct = 0; n_stall = 0; n_hw = 0; n_multi = 0;
    wait (rst_n && start);
    // 1. fault free stream
    n_out = 0;
    stream(JOBS);
    drain();
    check(last_lat == N + 2, $sformatf("latency %0d, expected %0d", last_lat, N + 2));
    check(n_out == JOBS && last_out - first_out == JOBS - 1,
          $sformatf("%0d results in %0d cycles", n_out, last_out - first_out + 1));
    check(to_sw_count == 0 && sw_count == 0, "fault-free run used software");
    if (N > 1 && to_sw_count == 0) n_direct += JOBS;
    // 2. each stage bypassed by software
    for (int k = 0; k < N; k++) begin
      set_bypass(N'(1) << k);
      check(faulty == (N'(1) << k), "faulty follows bypass register");
      stream(JOBS / 2 + 1);
      drain();
    end
    set_bypass('0);
    // 3. hardware fault input
    @(negedge clk);
    hw_fault = N'(1) << (N / 2);
    #1;
    check(faulty == hw_fault && bypass_reg == '0, "hardware fault drives faulty");
    begin
      int n_before;
      n_before = sw_count;
      stream(3);
      drain();
      if (sw_count > n_before) n_hw++;
    end
    @(negedge clk);
    hw_fault = '0;
    // 4. several stages at once
    if (N >= 3) begin
      set_bypass(N'(5));
      stream(3);
      drain();
      set_bypass(N'(6));
      stream(3);
      drain();
      n_multi++;
    end
    set_bypass('1);
    stream(3);
    drain();
    set_bypass('0);
    // 5. back-pressure
    fork
      stream(JOBS + 4);
      begin
        repeat (N + 4) @(negedge clk);
        stall_out = 1;
        repeat (12) @(negedge clk);
        stall_out = 0;
      end
    join
    drain();
    // mechanisms
    check(n_direct > 0 || N == 1, "direct stage-to-stage path never used");
    check(to_sw_count > 0, "no output ever went to software");
    check(from_sw_count > 0 || N == 1, "software never fed a later stage");
    check(n_hw > 0, "hardware fault path never used");
    check(n_multi > 0 || N < 3, "multi-stage bypass never used");
    check(n_stall > 0, "back-pressure never happened");
    $display("%m: direct=%0d to_sw=%0d from_sw=%0d sw_stages=%0d hw=%0d stall_cycles=%0d",
             n_direct, to_sw_count, from_sw_count, sw_count, n_hw, n_stall);
    done = 1;
  end
endmodule

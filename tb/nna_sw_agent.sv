// nna_sw_agent: behavioural model of the software thread that uses a
// Non-Newtonian accelerator. Jobs handed to it on job_valid/job_data are
// computed in software through any leading bypassed stages and then pushed
// into the consumer queue of the first healthy stage. Whatever appears in a
// producer queue is taken, run in software through the bypassed stages that
// follow, and either pushed into the next healthy stage's consumer queue or,
// at the end of the chain, returned on res_valid/res_data (one per cycle,
// in order). stall_out holds all producer queues (back-pressure); sw_count
// counts stages run in software, to_sw_count words taken from a producer
// queue other than the last.
module nna_sw_agent
  import nna_sw_pkg::*;
#(
  parameter int    N    = 4,
  parameter int    W    = 32,
  parameter kind_t KIND = K_TEST,
  parameter int    P1   = 32,   // FFT size, or toy word width
  parameter int    DW   = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] faulty,
  input  logic         stall_out,
  output logic         sw_cons_valid [N],
  input  logic         sw_cons_ready [N],
  output logic [W-1:0] sw_cons_data  [N],
  input  logic         sw_prod_valid [N],
  output logic         sw_prod_ready [N],
  input  logic [W-1:0] sw_prod_data  [N],
  input  logic         job_valid,
  input  logic [W-1:0] job_data,
  output logic         res_valid,
  output logic [W-1:0] res_data,
  output int           sw_count,
  output int           to_sw_count,
  output int           from_sw_count
);
  sw_word_t pend [N][$];
  sw_word_t res_q [$];

  task automatic route(int j, sw_word_t d);
    while (j < N && faulty[j]) begin
      d = sw_stage(KIND, j, N, P1, DW, d);
      sw_count++;
      j++;
    end
    if (j == N) res_q.push_back(d);
    else begin
      if (j > 0) from_sw_count++;
      pend[j].push_back(d);
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) begin
        pend[j].delete();
        sw_cons_valid[j] <= 1'b0;
        sw_cons_data[j]  <= '0;
        sw_prod_ready[j] <= 1'b0;
      end
      res_q.delete();
      res_valid     <= 1'b0;
      res_data      <= '0;
      sw_count      = 0;
      to_sw_count   = 0;
      from_sw_count = 0;
    end else begin
      for (int j = 0; j < N; j++)
        if (sw_cons_valid[j] && sw_cons_ready[j]) void'(pend[j].pop_front());
      for (int i = 0; i < N; i++)
        if (sw_prod_valid[i] && sw_prod_ready[i]) begin
          if (i < N - 1) to_sw_count++;
          route(i + 1, sw_word_t'(sw_prod_data[i]));
        end
      if (job_valid) route(0, sw_word_t'(job_data));
      for (int j = 0; j < N; j++) begin
        sw_cons_valid[j] <= (pend[j].size() > 0);
        sw_cons_data[j]  <= (pend[j].size() > 0) ? W'(pend[j][0]) : '0;
        sw_prod_ready[j] <= !stall_out;
      end
      if (res_q.size() > 0) begin
        res_valid <= 1'b1;
        res_data  <= W'(res_q.pop_front());
      end else begin
        res_valid <= 1'b0;
      end
    end
  end
endmodule

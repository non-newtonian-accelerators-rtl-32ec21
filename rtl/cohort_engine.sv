// cohort_engine: the queue side of the accelerator tile, extended from one
// queue pair per tile to one queue pair per sub-accelerator.
//
// For every sub-accelerator i there is a consumer queue, which the software
// thread fills and sub-accelerator i drains, and a producer queue, which
// sub-accelerator i fills and the software thread drains. Queue i exists for
// every stage, whether or not it is in use: which of them carry data at a
// given time is decided by the bypass routing in nna_chain.
//
// Interface: arrays indexed by stage, each a valid/ready/data stream.
// sw_cons_* : software writes a word into consumer queue i.
// acc_cons_*: sub-accelerator side reads consumer queue i.
// acc_prod_*: sub-accelerator side writes producer queue i.
// sw_prod_* : software reads producer queue i.
// Timing: one cycle through each queue (see cohort_fifo).
//
// The multiple-queue organisation follows the document. The queues are plain
// FIFOs rather than queues in coherent memory, and the queue depth is this
// design's choice.
module cohort_engine #(
  parameter int unsigned N     = 4,   // number of sub-accelerators
  parameter int unsigned W     = 32,  // word width
  parameter int unsigned DEPTH = 4    // depth of every queue
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sw_cons_valid [N],
  output logic         sw_cons_ready [N],
  input  logic [W-1:0] sw_cons_data  [N],
  output logic         acc_cons_valid[N],
  input  logic         acc_cons_ready[N],
  output logic [W-1:0] acc_cons_data [N],
  input  logic         acc_prod_valid[N],
  output logic         acc_prod_ready[N],
  input  logic [W-1:0] acc_prod_data [N],
  output logic         sw_prod_valid [N],
  input  logic         sw_prod_ready [N],
  output logic [W-1:0] sw_prod_data  [N]
);
  for (genvar i = 0; i < N; i++) begin : g_q
    cohort_fifo #(.W(W), .DEPTH(DEPTH)) u_cons (
      .clk, .rst_n,
      .in_valid (sw_cons_valid[i]),  .in_ready (sw_cons_ready[i]),  .in_data (sw_cons_data[i]),
      .out_valid(acc_cons_valid[i]), .out_ready(acc_cons_ready[i]), .out_data(acc_cons_data[i])
    );
    cohort_fifo #(.W(W), .DEPTH(DEPTH)) u_prod (
      .clk, .rst_n,
      .in_valid (acc_prod_valid[i]), .in_ready (acc_prod_ready[i]), .in_data (acc_prod_data[i]),
      .out_valid(sw_prod_valid[i]),  .out_ready(sw_prod_ready[i]),  .out_data(sw_prod_data[i])
    );
  end
endmodule

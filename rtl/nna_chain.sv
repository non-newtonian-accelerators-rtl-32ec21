// nna_chain: the fault-tolerant skeleton shared by every Non-Newtonian
// accelerator. It connects N sub-accelerator datapaths (the "cores", which
// the accelerator module instantiates and wires to the core_* ports) in a
// chain f_{N-1} o ... o f_1 o f_0, and gives every stage its own pair of
// software queues.
//
// Routing, decided per stage from the bypass state faulty[]:
//   * Stage i takes its input from consumer queue i when it is the first
//     stage or when stage i-1 is bypassed; otherwise straight from the
//     output of stage i-1 (queue bypassing: no queue, no register, so a
//     fault-free chain has the latency of the bare datapath).
//   * Stage i sends its output to producer queue i when it is the last stage
//     or when stage i+1 is bypassed; otherwise straight into stage i+1.
//   * A bypassed stage gets no input; any word still in its output register
//     is drained and discarded. Its queues are left untouched.
// The software thread therefore sees the output of the stage before a
// faulty one in that stage's producer queue, computes the faulty stage (and
// any further faulty stages) itself, and pushes the result into the consumer
// queue of the next healthy stage. Several bypassed stages, adjacent or not,
// are handled the same way.
//
// The bypass state may be changed only while no data is in flight (this
// design's rule; the document does not say how a change is sequenced).
//
// Interface: sw_* are the software ends of the queues (see cohort_engine),
// cfg_*/hw_fault/bypass_reg/faulty as in nna_bypass_ctrl, core_* the
// valid/ready streams into and out of each datapath stage.
module nna_chain #(
  parameter int unsigned N     = 4,   // number of sub-accelerators
  parameter int unsigned W     = 32,  // word width between stages
  parameter int unsigned DEPTH = 4    // depth of each software queue
) (
  input  logic         clk,
  input  logic         rst_n,        // synchronous, active low
  // software queues
  input  logic         sw_cons_valid [N],
  output logic         sw_cons_ready [N],
  input  logic [W-1:0] sw_cons_data  [N],
  output logic         sw_prod_valid [N],
  input  logic         sw_prod_ready [N],
  output logic [W-1:0] sw_prod_data  [N],
  // bypass control
  input  logic         cfg_we,
  input  logic [N-1:0] cfg_wdata,
  input  logic [N-1:0] hw_fault,
  output logic [N-1:0] bypass_reg,
  output logic [N-1:0] faulty,
  // sub-accelerator datapaths
  output logic         core_in_valid [N],
  input  logic         core_in_ready [N],
  output logic [W-1:0] core_in_data  [N],
  input  logic         core_out_valid[N],
  output logic         core_out_ready[N],
  input  logic [W-1:0] core_out_data [N]
);
  logic         acc_cons_valid[N];
  logic         acc_cons_ready[N];
  logic [W-1:0] acc_cons_data [N];
  logic         acc_prod_valid[N];
  logic         acc_prod_ready[N];
  logic [W-1:0] acc_prod_data [N];

  cohort_engine #(.N(N), .W(W), .DEPTH(DEPTH)) u_engine (
    .clk, .rst_n,
    .sw_cons_valid, .sw_cons_ready, .sw_cons_data,
    .acc_cons_valid, .acc_cons_ready, .acc_cons_data,
    .acc_prod_valid, .acc_prod_ready, .acc_prod_data,
    .sw_prod_valid, .sw_prod_ready, .sw_prod_data
  );

  nna_bypass_ctrl #(.N(N)) u_bypass (
    .clk, .rst_n, .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty
  );

  logic in_from_sw [N];
  logic out_to_sw  [N];

  for (genvar i = 0; i < N; i++) begin : g_route
    if (i == 0) begin : g_first
      assign in_from_sw[i] = 1'b1;
    end else begin : g_mid_in
      assign in_from_sw[i] = faulty[i-1];
    end
    if (i == N - 1) begin : g_last
      assign out_to_sw[i] = 1'b1;
    end else begin : g_mid_out
      assign out_to_sw[i] = faulty[i+1];
    end

    // input side of stage i
    if (i == 0) begin : g_in0
      assign core_in_valid[i] = !faulty[i] && acc_cons_valid[i];
      assign core_in_data[i]  = acc_cons_data[i];
    end else begin : g_in
      assign core_in_valid[i] = !faulty[i] &&
                                (in_from_sw[i] ? acc_cons_valid[i] : core_out_valid[i-1]);
      assign core_in_data[i]  = in_from_sw[i] ? acc_cons_data[i] : core_out_data[i-1];
    end
    assign acc_cons_ready[i] = !faulty[i] && in_from_sw[i] && core_in_ready[i];

    // output side of stage i
    if (i == N - 1) begin : g_outl
      assign core_out_ready[i] = faulty[i] || acc_prod_ready[i];
    end else begin : g_out
      assign core_out_ready[i] = faulty[i] ||
                                 (out_to_sw[i] ? acc_prod_ready[i] : core_in_ready[i+1]);
    end
    assign acc_prod_valid[i] = !faulty[i] && out_to_sw[i] && core_out_valid[i];
    assign acc_prod_data[i]  = core_out_data[i];
  end
endmodule

// aes_nna: AES-128 encryption built as a Non-Newtonian accelerator.
//
// The cipher is cut into STAGES sub-accelerators (aes_stage) joined by
// nna_chain. With the default of 11 stages each stage does one round
// (round 0 = initial AddRoundKey, rounds 1..10); with 3 stages, stage s does
// rounds floor(11*s/3) .. floor(11*(s+1)/3)-1, i.e. 0-2, 3-6 and 7-10. Both
// stage counts are configurations the document evaluates; how the rounds are
// split among 3 stages is this design's choice.
//
// Use: software pushes {plaintext, key} (aes_pkg::aes_token_t: plaintext in
// [255:128], cipher key in [127:0]) into consumer queue 0 and reads
// {ciphertext, last round key} from producer queue STAGES-1. With no stage
// bypassed a block takes STAGES cycles through the datapath, plus one cycle
// in each of the two queues, and blocks stream at one per cycle. When stage k
// is bypassed, the token after stage k-1 appears in producer queue k-1 and
// the software pushes the token after its own round(s) into consumer queue
// k+1 (see nna_chain).
module aes_nna #(
  parameter int unsigned STAGES = 11,  // sub-accelerators: 11 or 3 in the document
  parameter int unsigned DEPTH  = 4    // software queue depth
) (
  input  logic         clk,
  input  logic         rst_n,         // synchronous, active low
  input  logic         sw_cons_valid [STAGES],
  output logic         sw_cons_ready [STAGES],
  input  logic [255:0] sw_cons_data  [STAGES],
  output logic         sw_prod_valid [STAGES],
  input  logic         sw_prod_ready [STAGES],
  output logic [255:0] sw_prod_data  [STAGES],
  input  logic                cfg_we,
  input  logic [STAGES-1:0]   cfg_wdata,
  input  logic [STAGES-1:0]   hw_fault,
  output logic [STAGES-1:0]   bypass_reg,
  output logic [STAGES-1:0]   faulty
);
  localparam int unsigned TOTAL = aes_pkg::AES_ROUNDS + 1;  // rounds 0..10

  logic         core_in_valid [STAGES];
  logic         core_in_ready [STAGES];
  logic [255:0] core_in_data  [STAGES];
  logic         core_out_valid[STAGES];
  logic         core_out_ready[STAGES];
  logic [255:0] core_out_data [STAGES];

  nna_chain #(.N(STAGES), .W(256), .DEPTH(DEPTH)) u_chain (
    .clk, .rst_n,
    .sw_cons_valid, .sw_cons_ready, .sw_cons_data,
    .sw_prod_valid, .sw_prod_ready, .sw_prod_data,
    .cfg_we, .cfg_wdata, .hw_fault, .bypass_reg, .faulty,
    .core_in_valid, .core_in_ready, .core_in_data,
    .core_out_valid, .core_out_ready, .core_out_data
  );

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned FIRST = (TOTAL * s) / STAGES;
    localparam int unsigned LAST  = (TOTAL * (s + 1)) / STAGES - 1;
    aes_stage #(.FIRST(FIRST), .LAST(LAST)) u_stage (
      .clk, .rst_n,
      .in_valid (core_in_valid[s]),  .in_ready (core_in_ready[s]),  .in_data (core_in_data[s]),
      .out_valid(core_out_valid[s]), .out_ready(core_out_ready[s]), .out_data(core_out_data[s])
    );
  end

  initial begin
    assert (STAGES >= 1 && STAGES <= TOTAL)
      else $error("aes_nna: STAGES must be between 1 and %0d", TOTAL);
  end
endmodule

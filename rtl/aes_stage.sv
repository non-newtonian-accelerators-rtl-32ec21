// aes_stage: one AES-128 sub-accelerator. It applies rounds FIRST..LAST of
// the cipher (round 0 = initial AddRoundKey, rounds 1..9 = full rounds,
// round 10 = final round without MixColumns) to a token that carries the
// state together with the round key last used. Each stage expands the next
// round keys itself from the key it receives, so a stage needs nothing but
// its input token: the software version of the same stage, run when this one
// is bypassed, computes exactly the same function.
//
// The rounds are combinational and end in a stage_reg: one token per cycle,
// latency one cycle. Interface: valid/ready streams of aes_pkg::aes_token_t
// (256 bits: state in [255:128], key in [127:0]).
//
// The document names AES-128 accelerators of 11 and 3 stages but not how the
// rounds are cut; one round per stage and carrying the key with the state
// are this design's choices.
module aes_stage #(
  parameter int unsigned FIRST = 0,  // first round done here
  parameter int unsigned LAST  = 0   // last round done here
) (
  input  logic                clk,
  input  logic                rst_n,   // synchronous, active low
  input  logic                in_valid,
  output logic                in_ready,
  input  aes_pkg::aes_token_t in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output aes_pkg::aes_token_t out_data
);
  import aes_pkg::*;

  // one combinational block per round
  for (genvar r = FIRST; r <= LAST; r++) begin : g_round
    aes_token_t q;
    if (r == FIRST) begin : g_first
      assign q = aes_round(in_data, r);
    end else begin : g_next
      assign q = aes_round(g_round[r-1].q, r);
    end
  end

  stage_reg #(.W($bits(aes_token_t))) u_reg (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(g_round[LAST].q),
    .out_valid, .out_ready, .out_data
  );
endmodule

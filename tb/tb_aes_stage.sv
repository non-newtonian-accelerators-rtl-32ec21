// tb_aes_stage: checks aes_stage against the FIPS-197 example vectors (a
// stage doing all rounds 0..10) and against the software round model on
// random tokens (single-round stages 0, 5 and 10), including the one-cycle
// latency and holding the output under back-pressure.
module tb_aes_stage;
  import nna_sw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         iv [4], ir [4], ov [4], ordy [4];
  logic [255:0] id [4], od [4];

  aes_stage #(.FIRST(0),  .LAST(10)) u_full (.clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]),
    .in_data(id[0]), .out_valid(ov[0]), .out_ready(ordy[0]), .out_data(od[0]));
  aes_stage #(.FIRST(0),  .LAST(0))  u_r0   (.clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]),
    .in_data(id[1]), .out_valid(ov[1]), .out_ready(ordy[1]), .out_data(od[1]));
  aes_stage #(.FIRST(5),  .LAST(5))  u_r5   (.clk, .rst_n, .in_valid(iv[2]), .in_ready(ir[2]),
    .in_data(id[2]), .out_valid(ov[2]), .out_ready(ordy[2]), .out_data(od[2]));
  aes_stage #(.FIRST(10), .LAST(10)) u_r10  (.clk, .rst_n, .in_valid(iv[3]), .in_ready(ir[3]),
    .in_data(id[3]), .out_valid(ov[3]), .out_ready(ordy[3]), .out_data(od[3]));

  localparam int ROUND [4] = '{-1, 0, 5, 10};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  // drive one token into unit u, expect exp one cycle later
  task automatic one(int u, logic [255:0] tok, logic [255:0] exp, string what);
    @(negedge clk);
    iv[u] = 1; id[u] = tok; ordy[u] = 1;
    check(ir[u], {what, " ready"});
    @(posedge clk); #1;
    iv[u] = 0;
    check(ov[u] && od[u] == exp, $sformatf("%s: got %h exp %h", what, od[u], exp));
  endtask

  initial begin
    for (int u = 0; u < 4; u++) begin iv[u] = 0; ordy[u] = 1; id[u] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1 and Appendix B
    one(0, {128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f},
        {128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h13111d7fe3944a17f307a78b4d2b30c5},
        "FIPS-197 C.1");
    one(0, {128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c},
        {128'h3925841d02dc09fbdc118597196a0b32, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6},
        "FIPS-197 B");
    for (int n = 0; n < 20; n++) begin
      logic [255:0] t;
      t = rnd256();
      one(0, t, chain_sw(K_AES, 11, 0, 0, t), "random block");
      check(od[0][255:128] == aes_encrypt_sw(t[255:128], t[127:0]), "random block ciphertext");
      for (int u = 1; u < 4; u++) one(u, t, aes_round_sw(t, ROUND[u]), $sformatf("round %0d", ROUND[u]));
    end
    // back-pressure: output held, next token waits in the skid register
    @(negedge clk);
    ordy[1] = 0; iv[1] = 1; id[1] = 256'h1;
    @(posedge clk); #1;
    id[1] = 256'h2;
    @(posedge clk); #1;
    iv[1] = 0;
    check(ov[1] && od[1] == aes_round_sw(256'h1, 0) && !ir[1], "stall holds first token");
    repeat (3) @(posedge clk);
    #1 check(ov[1] && od[1] == aes_round_sw(256'h1, 0), "still held");
    @(negedge clk); ordy[1] = 1;
    @(posedge clk); #1;
    check(ov[1] && od[1] == aes_round_sw(256'h2, 0), "second token after stall");
    @(posedge clk); #1;
    check(!ov[1], "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

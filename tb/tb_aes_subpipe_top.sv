// tb_aes_subpipe_top: end-to-end test of the whole design at its default
// size. The encryption, decryption and joint cores of the top are each
// driven by an aes_core_agent: nine key loads (three of every size) with
// sixteen random blocks per key, the joint core switching direction twice
// per key. Every output block is compared with the reference model, with
// its latency (22/26/30 cycles for 128/192/256-bit keys), and the start-up
// delay after every key load is checked. The test also counts, and
// requires at least once, each mechanism of the design: encryption running
// while the key is still being expanded, decryption waiting for the full
// schedule, the joint core draining before a direction switch, key loads
// waiting for the pipeline to empty, and every key size (the 10/12/14-round
// output selection for encryption, the stage 5/3/1 entry for decryption)
// on every core.
module tb_aes_subpipe_top;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         key_valid [3], key_ready [3], in_valid [3], in_ready [3];
  logic         in_dec [3], out_valid [3], out_dec [3];
  logic [255:0] key [3];
  key_size_e    key_size [3];
  state_t       in_data [3], out_data [3];
  int           chk [3], fail [3], ovl [3], dw [3], md [3], kw [3];
  int           nks [3][3];
  bit           done [3];

  aes_subpipe_top dut (
    .clk, .rst_n,
    .enc_key_valid (key_valid[0]), .enc_key_ready (key_ready[0]),
    .enc_key       (key[0]),       .enc_key_size  (key_size[0]),
    .enc_in_valid  (in_valid[0]),  .enc_in_ready  (in_ready[0]),
    .enc_in_data   (in_data[0]),
    .enc_out_valid (out_valid[0]), .enc_out_data  (out_data[0]),
    .dec_key_valid (key_valid[1]), .dec_key_ready (key_ready[1]),
    .dec_key       (key[1]),       .dec_key_size  (key_size[1]),
    .dec_in_valid  (in_valid[1]),  .dec_in_ready  (in_ready[1]),
    .dec_in_data   (in_data[1]),
    .dec_out_valid (out_valid[1]), .dec_out_data  (out_data[1]),
    .ed_key_valid  (key_valid[2]), .ed_key_ready  (key_ready[2]),
    .ed_key        (key[2]),       .ed_key_size   (key_size[2]),
    .ed_in_valid   (in_valid[2]),  .ed_in_ready   (in_ready[2]),
    .ed_in_dec     (in_dec[2]),    .ed_in_data    (in_data[2]),
    .ed_out_valid  (out_valid[2]), .ed_out_dec    (out_dec[2]),
    .ed_out_data   (out_data[2])
  );

  // the single-direction cores have no direction output
  assign out_dec[0] = 1'b0;
  assign out_dec[1] = 1'b1;

  localparam datapath_e DPS [3] = '{DP_ENC, DP_DEC, DP_JOINT};

  for (genvar i = 0; i < 3; i++) begin : g_agent
    aes_core_agent #(.DP(DPS[i]), .NBLK(16), .NKEYS(9)) agent (
      .clk, .rst_n,
      .key_valid (key_valid[i]), .key_ready (key_ready[i]),
      .key       (key[i]),       .key_size  (key_size[i]),
      .in_valid  (in_valid[i]),  .in_ready  (in_ready[i]),
      .in_dec    (in_dec[i]),    .in_data   (in_data[i]),
      .out_valid (out_valid[i]), .out_dec   (out_dec[i]),
      .out_data  (out_data[i]),
      .checks (chk[i]), .failures (fail[i]), .done (done[i]),
      .n_enc_overlap (ovl[i]), .n_dec_wait (dw[i]), .n_mode_drain (md[i]),
      .n_key_wait (kw[i]), .n_ks (nks[i])
    );
  end

  int checks = 0, failures = 0;

  task automatic need(string what, int count);
    checks++;
    $display("  %-44s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    checks   = chk[0] + chk[1] + chk[2];
    failures = fail[0] + fail[1] + fail[2];
    checks++;
    if (aes_ref_pkg::self_test() != 0) failures++;
    need("enc: blocks during key expansion", ovl[0]);
    need("dec: waits for full schedule", dw[1]);
    need("joint: enc during key expansion", ovl[2]);
    need("joint: dec waits for schedule", dw[2]);
    need("joint: drain before direction switch", md[2]);
    for (int i = 0; i < 3; i++) begin
      need($sformatf("core %0d: key load waits for drain", i), kw[i]);
      for (int k = 0; k < 3; k++)
        need($sformatf("core %0d: %0d-bit keys", i, 128 + 64 * k), nks[i][k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule

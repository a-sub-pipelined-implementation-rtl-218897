// tb_aes_core: the three core variants (encryption, decryption, joint), each
// driven by an aes_core_agent through six key loads (two of each size) and
// twelve blocks per key. Passes when every block matches the reference with
// the right latency, the start-up delays after each key are right, no stall
// goes unexplained, and each core's mechanisms were exercised: encryption
// overlapping key expansion, decryption waiting for the schedule, the joint
// core draining before a direction switch, and key loads waiting for the
// pipeline to empty.
module tb_aes_core;
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

  localparam datapath_e DPS [3] = '{DP_ENC, DP_DEC, DP_JOINT};

  for (genvar i = 0; i < 3; i++) begin : g_core
    aes_core #(.DP(DPS[i])) dut (
      .clk, .rst_n,
      .key_valid (key_valid[i]), .key_ready (key_ready[i]),
      .key       (key[i]),       .key_size  (key_size[i]),
      .in_valid  (in_valid[i]),  .in_ready  (in_ready[i]),
      .in_dec    (in_dec[i]),    .in_data   (in_data[i]),
      .out_valid (out_valid[i]), .out_dec   (out_dec[i]),
      .out_data  (out_data[i])
    );
    aes_core_agent #(.DP(DPS[i]), .NBLK(12), .NKEYS(6)) agent (
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
    $display("  %-40s %0d", what, count);
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
    need("enc core: blocks during key expansion", ovl[0]);
    need("dec core: waits for full schedule", dw[1]);
    need("joint core: enc during key expansion", ovl[2]);
    need("joint core: dec waits for schedule", dw[2]);
    need("joint core: drain before direction switch", md[2]);
    for (int i = 0; i < 3; i++) begin
      need($sformatf("core %0d: key waits for drain", i), kw[i]);
      for (int k = 0; k < 3; k++) need($sformatf("core %0d: keys of size %0d", i, k), nks[i][k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule

// tb_aes_throughput: the throughput workload of the three architectures.
// For each core of the top (encryption, decryption, joint in both
// directions) and each key size, a key is loaded and then NB blocks are
// offered back to back. After the start-up wait the core must take one
// block every cycle without a single stall and deliver one result every
// cycle, in order and equal to the reference. The measured rate, in blocks
// per cycle, is converted to Gbit/s at the clock rates reported for the
// three FPGA implementations (278.5, 263.5 and 247 MHz) and printed.
module tb_aes_throughput;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int NB = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         key_valid [3], key_ready [3], in_valid [3], in_ready [3];
  logic         in_dec [3], out_valid [3], ed_out_dec;
  logic [255:0] key [3];
  key_size_e    key_size [3];
  state_t       in_data [3], out_data [3];
  int           chk [3], fail [3];
  bit           done [3];
  int           cyc;

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
    .ed_out_valid  (out_valid[2]), .ed_out_dec    (ed_out_dec),
    .ed_out_data   (out_data[2])
  );

  always @(posedge clk) cyc++;

  localparam real MHZ [3] = '{278.5, 263.5, 247.0};

  for (genvar i = 0; i < 3; i++) begin : g_drv
    initial begin
      state_t exp [$];
      int     runs;
      chk[i] = 0; fail[i] = 0; done[i] = 0;
      key_valid[i] = 0; in_valid[i] = 0; in_dec[i] = (i == 1);
      key[i] = '0; key_size[i] = KEY128; in_data[i] = '0;
      runs = (i == 2) ? 6 : 3;
      wait (rst_n);
      for (int r = 0; r < runs; r++) begin
        int ks, n_in, n_out, first_in, last_in, first_out, last_out, stalls;
        bit d;
        logic [255:0] k;
        ks = r % 3;
        d  = (i == 1) || (i == 2 && r >= 3);
        k  = rand_key() & ~((256'h1 << (128 - 64 * ks)) - 1);
        @(negedge clk);
        key[i] = k; key_size[i] = key_size_e'(ks); key_valid[i] = 1;
        while (!key_ready[i]) @(negedge clk);
        @(negedge clk);
        key_valid[i] = 0;
        n_in = 0; n_out = 0; stalls = 0;
        first_in = -1; last_in = 0; first_out = -1; last_out = 0;
        exp.delete();
        in_dec[i] = d;
        in_valid[i] = 1;
        in_data[i] = rand_blk();
        while (n_out < NB) begin
          @(posedge clk);
          if (in_valid[i] && in_ready[i]) begin
            exp.push_back(d ? decrypt(in_data[i], k, ks) : encrypt(in_data[i], k, ks));
            if (first_in < 0) first_in = cyc;
            last_in = cyc;
            n_in++;
          end else if (in_valid[i] && first_in >= 0) stalls++;
          if (out_valid[i]) begin
            state_t e;
            e = exp.pop_front();
            chk[i]++;
            if (out_data[i] !== e) begin
              fail[i]++;
              $display("core %0d ks=%0d: got %h expected %h", i, ks, out_data[i], e);
            end
            if (first_out < 0) first_out = cyc;
            last_out = cyc;
            n_out++;
          end
          @(negedge clk);
          if (n_in == NB) in_valid[i] = 0;
          else in_data[i] = rand_blk();
        end
        chk[i] += 2;
        if (stalls != 0 || last_in - first_in != NB - 1) begin
          fail[i]++;
          $display("core %0d ks=%0d: %0d stalls, %0d blocks in %0d cycles", i, ks, stalls, NB,
                   last_in - first_in + 1);
        end
        if (last_out - first_out != NB - 1) begin
          fail[i]++;
          $display("core %0d ks=%0d: %0d results over %0d cycles", i, ks, NB, last_out - first_out + 1);
        end
        $display("core %0d (%s) %0d-bit key: %0d blocks in %0d cycles, %0.3f block/cycle = %0.2f Gbit/s at %0.1f MHz",
                 i, d ? "dec" : "enc", 128 + 64 * ks, NB, last_out - first_out + 1,
                 real'(NB) / real'(last_out - first_out + 1),
                 128.0 * MHZ[i] / 1000.0 * real'(NB) / real'(last_out - first_out + 1), MHZ[i]);
      end
      done[i] = 1;
    end
  end

  int checks, failures;

  initial begin
    checks = 0; failures = 0; cyc = 0;
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    checks = chk[0] + chk[1] + chk[2] + 1;
    failures = fail[0] + fail[1] + fail[2];
    if (self_test() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_aes_datapath: the three data path builds (encryption, decryption,
// joint) are given reference round keys directly and fed bursts of random
// blocks, one per cycle with occasional gaps, for every key size (and, for
// the joint build, both directions). Every output must match the reference
// cipher, leave in order, and appear exactly 2*Nr+2 cycles (22/26/30) after
// it entered; a full burst must come out at one block per cycle. Between
// configurations the pipeline drains, as the core guarantees.
module tb_aes_datapath;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  key_size_e ks;
  logic      jdec, in_valid;
  state_t    in_data;
  state_t    rk [15];
  logic      ov [3];
  state_t    od [3];
  int        cyc;
  int checks = 0, failures = 0;

  aes_datapath #(.DP(DP_ENC))   u_e (.clk, .rst_n, .key_size(ks), .dec(1'b0), .rk,
                                     .in_valid, .in_data, .out_valid(ov[0]), .out_data(od[0]));
  aes_datapath #(.DP(DP_DEC))   u_d (.clk, .rst_n, .key_size(ks), .dec(1'b1), .rk,
                                     .in_valid, .in_data, .out_valid(ov[1]), .out_data(od[1]));
  aes_datapath #(.DP(DP_JOINT)) u_j (.clk, .rst_n, .key_size(ks), .dec(jdec), .rk,
                                     .in_valid, .in_data, .out_valid(ov[2]), .out_data(od[2]));

  typedef struct { state_t pt; int cyc; } ent_t;
  ent_t sent [$];
  int   got [3];
  int   first_out [3], last_out [3];
  logic [255:0] key;

  // inputs are taken at the edge; outputs checked against the input queue
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int i = 0; i < 3; i++) begin
        if (ov[i]) begin
          bit   d;
          ent_t e;
          state_t exp;
          d   = (i == 1) || (i == 2 && jdec);
          e   = sent[got[i]];
          exp = d ? decrypt(e.pt, key, int'(ks)) : encrypt(e.pt, key, int'(ks));
          checks++;
          if (od[i] !== exp || cyc - e.cyc != 2 * nrounds(int'(ks)) + 2) begin
            failures++;
            $display("dp%0d ks=%0d blk %0d: got %h after %0d, expected %h after %0d",
                     i, ks, got[i], od[i], cyc - e.cyc, exp, 2 * nrounds(int'(ks)) + 2);
          end
          if (got[i] == 0) first_out[i] = cyc;
          last_out[i] = cyc;
          got[i]++;
        end
      end
      if (in_valid) begin
        ent_t e;
        e.pt = in_data; e.cyc = cyc;
        sent.push_back(e);
      end
    end
  end

  task automatic burst(int k, bit d, int n, bit gaps);
    rks_t r;
    key = rand_key() & ~((256'h1 << (128 - 64 * k)) - 1);
    r = expand(key, k);
    @(negedge clk);
    ks = key_size_e'(k);
    jdec = d;
    for (int i = 0; i < 15; i++) rk[i] = r[i];
    sent.delete();
    for (int i = 0; i < 3; i++) got[i] = 0;
    for (int b = 0; b < n; b++) begin
      in_valid = 1;
      in_data  = rand_blk();
      @(negedge clk);
      if (gaps && $urandom % 3 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (40) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      // the joint build checks only its own direction against this burst
      checks++;
      if (got[i] != n) begin
        failures++;
        $display("dp%0d ks=%0d: %0d of %0d blocks came out", i, k, got[i], n);
      end
      if (!gaps) begin
        checks++;
        if (last_out[i] - first_out[i] != n - 1) begin
          failures++;
          $display("dp%0d: burst of %0d took %0d cycles", i, n, last_out[i] - first_out[i] + 1);
        end
      end
    end
  endtask

  initial begin
    ref_init();
    checks++;
    if (self_test() != 0) failures++;
    cyc = 0; in_valid = 0; in_data = '0; jdec = 0; ks = KEY128; key = '0;
    for (int i = 0; i < 15; i++) rk[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++)
      for (int d = 0; d < 2; d++) begin
        burst(k, d[0], 40, 1'b0);
        burst(k, d[0], 20, 1'b1);
      end
    // key size changes with no idle gap beyond the drain
    burst(2, 1'b0, 10, 1'b0);
    burst(0, 1'b1, 10, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

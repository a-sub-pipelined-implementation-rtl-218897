// aes_core_agent: drives one aes_core (directly or through the top) and
// checks everything that comes out of it against aes_ref_pkg.
//
// Scenario: NKEYS keys, cycling through 128/192/256 bits. After each key
// load it offers NBLK random blocks, mostly back to back with an occasional
// idle cycle, and offers the next key while the last blocks are still in
// the pipeline. On the joint core the direction flips half-way through each
// key's blocks and between keys, forcing a drain before each switch.
// Checks per block: output data, output direction, order and the latency
// 2*Nr+2. Checks per key: the first block is taken 2 cycles after the key
// (encryption) or 2+2*steps cycles after it (decryption, which waits for the
// whole schedule). Any stall that none of the rules explains is a failure.
// The n_* outputs count how often each mechanism was seen.
module aes_core_agent
  import aes_pkg::*;
  import aes_ref_pkg::*;
#(
  parameter datapath_e DP    = DP_JOINT,
  parameter int        NBLK  = 12,
  parameter int        NKEYS = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         key_valid,
  input  logic         key_ready,
  output logic [255:0] key,
  output key_size_e    key_size,
  output logic         in_valid,
  input  logic         in_ready,
  output logic         in_dec,
  output state_t       in_data,
  input  logic         out_valid,
  input  logic         out_dec,
  input  state_t       out_data,
  output int           checks,
  output int           failures,
  output bit           done,
  output int           n_enc_overlap,   // encryption blocks taken during key expansion
  output int           n_dec_wait,      // cycles a decryption block waited for the schedule
  output int           n_mode_drain,    // cycles a block waited for a direction switch
  output int           n_key_wait,      // cycles a key waited for the pipeline to drain
  output int           n_ks [3]         // keys of each size fully checked
);

  typedef struct {
    state_t exp;
    bit     dec;
    int     cyc;
    int     lat;
  } item_t;

  item_t        sb [$];
  int           cyc, key_cyc, blk_since_key;
  logic [255:0] cur_key;
  int           cur_ks;
  bit           key_fired, in_fired, last_dec;

  // schedule steps: 128 -> 10, 192 -> 8, 256 -> 13
  function automatic int steps(int ks);
    return (ks == 0) ? 10 : (ks == 1) ? 8 : 13;
  endfunction

  // Monitor: samples the handshakes at the clock edge.
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (key_valid && key_ready) begin
        cur_key   = key;
        cur_ks    = int'(key_size);
        key_cyc   = cyc;
        key_fired = 1;
        blk_since_key = 0;
      end else if (key_valid && sb.size() > 0) begin
        n_key_wait++;
      end
      if (in_valid && in_ready) begin
        item_t it;
        int    d;
        it.dec = (DP == DP_DEC) ? 1'b1 : (DP == DP_ENC) ? 1'b0 : in_dec;
        it.exp = it.dec ? decrypt(in_data, cur_key, cur_ks) : encrypt(in_data, cur_key, cur_ks);
        it.cyc = cyc;
        it.lat = 2 * nrounds(cur_ks) + 2;
        sb.push_back(it);
        d = cyc - key_cyc;
        if (blk_since_key == 0) begin
          checks++;
          if (d != (it.dec ? 2 + 2 * steps(cur_ks) : 2)) begin
            failures++;
            $display("agent %0d: first block %0d cycles after key, dec=%0d ks=%0d", DP, d, it.dec, cur_ks);
          end
        end
        if (!it.dec && d < 2 + 2 * steps(cur_ks)) n_enc_overlap++;
        blk_since_key++;
        last_dec = it.dec;
        in_fired = 1;
      end else if (in_valid && !key_valid) begin
        bit dec_b;
        int d;
        dec_b = (DP == DP_DEC) ? 1'b1 : (DP == DP_ENC) ? 1'b0 : in_dec;
        d = cyc - key_cyc;
        if (dec_b && d < 2 + 2 * steps(cur_ks)) n_dec_wait++;
        else if (!dec_b && d < 2) ;
        else if (sb.size() > 0 && dec_b != last_dec) n_mode_drain++;
        else begin
          failures++;
          $display("agent %0d: unexplained stall at cycle %0d", DP, cyc);
        end
      end
      if (out_valid) begin
        checks++;
        if (sb.size() == 0) begin
          failures++;
          $display("agent %0d: output with nothing expected", DP);
        end else begin
          item_t it;
          it = sb.pop_front();
          if (out_data !== it.exp || out_dec !== it.dec || cyc - it.cyc != it.lat) begin
            failures++;
            $display("agent %0d: got %h dec=%0d after %0d, expected %h dec=%0d after %0d",
                     DP, out_data, out_dec, cyc - it.cyc, it.exp, it.dec, it.lat);
          end
        end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0; cyc = 0; key_cyc = 0;
    n_enc_overlap = 0; n_dec_wait = 0; n_mode_drain = 0; n_key_wait = 0;
    for (int i = 0; i < 3; i++) n_ks[i] = 0;
    key_fired = 0; in_fired = 0; last_dec = 0; blk_since_key = 0;
    cur_key = '0; cur_ks = 0;
    key_valid = 0; key = '0; key_size = KEY128;
    in_valid = 0; in_dec = 0; in_data = '0;
    ref_init();
    wait (rst_n);
    @(negedge clk);
    for (int k = 0; k < NKEYS; k++) begin
      int ks;
      ks = k % 3;
      key       = rand_key() & ~((256'h1 << (128 - 64 * ks)) - 1);
      key_size  = key_size_e'(ks);
      key_valid = 1;
      do @(negedge clk); while (!key_fired);
      key_fired = 0;
      key_valid = 0;
      for (int b = 0; b < NBLK; b++) begin
        in_valid = 1;
        in_dec   = 1'((k + int'(b >= NBLK / 2)) % 2);
        in_data  = rand_blk();
        do @(negedge clk); while (!in_fired);
        in_fired = 0;
        in_valid = 0;
        if ($urandom % 4 == 0) @(negedge clk);
      end
      n_ks[ks]++;
    end
    while (sb.size() > 0) @(negedge clk);
    repeat (3) @(negedge clk);
    done = 1;
  end

endmodule

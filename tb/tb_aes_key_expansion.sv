// tb_aes_key_expansion: the key schedule unit writes into a model store;
// for the FIPS-197 keys and random keys of every size the test checks
//  - every round key against the reference schedule,
//  - the timing: the key words are written one edge after `start`
//    (`rk_first` rises with them), step j's words at edge 1+2j, and `rk_all`
//    rises after 21/17/27 edges for 128/192/256-bit keys,
//  - the rate: round key r is in the store no later than edge 1+2r, so a
//    block entering the pipeline right after `rk_first` never waits,
//  - that `start` is ignored while `busy`.
module tb_aes_key_expansion;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, rk_first, rk_all, we;
  logic [255:0] key;
  key_size_e    key_size, ks_o;
  logic [5:0]   wbase;
  logic [3:0]   wcount;
  word_t        wdata [8];
  word_t        model [64];
  int           wr_edge [64];
  int           cyc;
  int checks = 0, failures = 0;

  aes_key_expansion dut (.clk, .rst_n, .start, .key, .key_size, .busy, .rk_first,
                         .rk_all, .key_size_o(ks_o), .we, .wbase, .wcount, .wdata);

  always @(posedge clk) begin
    cyc++;
    if (we)
      for (int j = 0; j < int'(wcount); j++)
        if (int'(wbase) + j < 64) begin
          model[int'(wbase) + j]   = wdata[j];
          wr_edge[int'(wbase) + j] = cyc;
        end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [255:0] k, int ks);
    rks_t exp;
    int   k_edge, first_edge, all_edge, nr, st;
    nr = nrounds(ks);
    st = (ks == 0) ? 10 : (ks == 1) ? 8 : 13;
    for (int i = 0; i < 64; i++) wr_edge[i] = -1;
    @(negedge clk);
    key = k; key_size = key_size_e'(ks); start = 1;
    k_edge = cyc + 1;               // the coming edge takes the key
    @(negedge clk);
    start = 0;
    first_edge = -1; all_edge = -1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      if (rk_first && first_edge < 0) first_edge = cyc;
      if (rk_all && all_edge < 0) all_edge = cyc;
      // a second start while busy must be ignored
      if (n == 5) begin
        chk(busy, "busy during schedule");
        start = 1; key = ~k;
      end else start = 0;
    end
    exp = expand(k, ks);
    for (int r = 0; r <= nr; r++) begin
      chk({model[4*r], model[4*r+1], model[4*r+2], model[4*r+3]} === exp[r],
          $sformatf("ks=%0d rk[%0d]", ks, r));
      chk(wr_edge[4*r+3] >= 0 && wr_edge[4*r+3] - k_edge <= 1 + 2 * r,
          $sformatf("ks=%0d rk[%0d] late: edge %0d", ks, r, wr_edge[4*r+3] - k_edge));
    end
    chk(first_edge - k_edge == 1, $sformatf("rk_first after %0d", first_edge - k_edge));
    chk(all_edge - k_edge == 1 + 2 * st, $sformatf("rk_all after %0d", all_edge - k_edge));
    chk(!busy && ks_o == key_size_e'(ks), "idle after schedule");
  endtask

  initial begin
    logic [255:0] fk;
    ref_init();
    checks++;
    if (self_test() != 0) failures++;
    cyc = 0; start = 0; key = '0; key_size = KEY128;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fk = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    for (int ks = 0; ks < 3; ks++) run(fk & ~((256'h1 << (128 - 64 * ks)) - 1), ks);
    // FIPS-197 A.1 key
    run({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, 0);
    for (int n = 0; n < 9; n++) run(rand_key() & ~((256'h1 << (128 - 64 * (n % 3))) - 1), n % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

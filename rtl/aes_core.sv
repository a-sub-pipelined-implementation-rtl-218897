// aes_core: one complete sub-pipelined AES engine for 128/192/256-bit keys,
// built as the encryption architecture (DP_ENC), the decryption
// architecture (DP_DEC) or the joint encryption/decryption architecture
// with a single key expansion unit (DP_JOINT).
//
// It holds the key expansion, the round key store and the 14-round data
// path, plus the control that decides when a block may enter:
//  - Key load: `key_valid`/`key_ready` handshake. A key is taken only when
//    the previous schedule is finished and no block is in flight, because
//    all in-flight blocks read the same round keys.
//  - Encryption may start the cycle after the key words are in the store
//    (`rk_first`): the schedule delivers round keys at least as fast as a
//    block moves through the rounds, so encryption overlaps key expansion.
//  - Decryption starts from the last round key, so a decryption block waits
//    until the whole schedule is in the store (`rk_all`). This is the longer
//    start-up latency of decryption described for the design.
//  - Joint core: all blocks in the pipeline share one direction, which sets
//    the data path's multiplexers. A block of the other direction waits
//    until the pipeline has drained (mode switch).
// in_valid/in_ready: a block is taken when both are high. There is no
// output back-pressure: out_valid is a one-cycle strobe per block, 2*Nr+2
// cycles after it was taken; out_dec tells which direction it went.
// The first two rules and the overlap of encryption with key expansion
// follow the described design; the handshakes, the drain rule of the joint
// core and the single-direction pipeline are this design's choices.
module aes_core
  import aes_pkg::*;
#(
  parameter datapath_e DP = DP_JOINT
) (
  input  logic         clk,
  input  logic         rst_n,
  // key load
  input  logic         key_valid,
  output logic         key_ready,
  input  logic [255:0] key,          // left-aligned
  input  key_size_e    key_size,
  // blocks in
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_dec,       // joint core: 1 = decrypt this block
  input  state_t       in_data,
  // blocks out
  output logic         out_valid,
  output logic         out_dec,
  output state_t       out_data
);

  localparam int unsigned NR_MAX = 14;

  logic      kx_busy, rk_first, rk_all, have_key, key_fire, in_fire;
  key_size_e ks;
  logic      we;
  logic [5:0] wbase;
  logic [3:0] wcount;
  word_t     wdata [8];
  state_t    rk [NR_MAX+1];
  logic      cur_dec, blk_dec, mode_ok, keys_ok;
  logic [5:0] inflight;

  aes_key_expansion u_kexp (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (key_fire),
    .key        (key),
    .key_size   (key_size),
    .busy       (kx_busy),
    .rk_first   (rk_first),
    .rk_all     (rk_all),
    .key_size_o (ks),
    .we         (we),
    .wbase      (wbase),
    .wcount     (wcount),
    .wdata      (wdata)
  );

  aes_round_key_store #(.NR_MAX(NR_MAX)) u_store (
    .clk    (clk),
    .we     (we),
    .wbase  (wbase),
    .wcount (wcount),
    .wdata  (wdata),
    .rk     (rk)
  );

  aes_datapath #(.DP(DP), .NR_MAX(NR_MAX)) u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_size  (ks),
    .dec       (cur_dec),
    .rk        (rk),
    .in_valid  (in_fire),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

  // ---- control ----
  assign blk_dec   = (DP == DP_DEC) ? 1'b1 : (DP == DP_ENC) ? 1'b0 : in_dec;
  assign key_ready = !kx_busy && (inflight == '0);
  assign key_fire  = key_valid && key_ready;
  assign keys_ok   = blk_dec ? rk_all : rk_first;
  assign mode_ok   = (inflight == '0) || (blk_dec == cur_dec);
  assign in_ready  = have_key && keys_ok && mode_ok && !key_fire;
  assign in_fire   = in_valid && in_ready;
  assign out_dec   = cur_dec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_key <= 1'b0;
      cur_dec  <= (DP == DP_DEC);
      inflight <= '0;
    end else begin
      if (key_fire) have_key <= 1'b1;
      if (in_fire)  cur_dec  <= blk_dec;
      inflight <= inflight + 6'(in_fire) - 6'(out_valid);
    end
  end

  // A key offered must stay offered until it is taken.
  a_key_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               key_valid && !key_ready |=> key_valid);
  // Round keys never change under a block in flight.
  a_key_quiet: assert property (@(posedge clk) disable iff (!rst_n)
                                key_fire |-> inflight == '0);

endmodule

// aes_subpipe_top: the three sub-pipelined AES architectures side by side,
// each with its own key expansion and its own ports:
//   enc_* : encryption core   (128/192/256-bit keys, one block per cycle)
//   dec_* : decryption core   (same, starts once the schedule is complete)
//   ed_*  : joint encryption/decryption core with one key expansion unit
// The three are independent alternatives of the same design and share no
// logic; a system would normally build only the one it needs. See aes_core
// for the handshakes and timing, which are the same on all three.
module aes_subpipe_top
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // encryption core
  input  logic         enc_key_valid,
  output logic         enc_key_ready,
  input  logic [255:0] enc_key,
  input  key_size_e    enc_key_size,
  input  logic         enc_in_valid,
  output logic         enc_in_ready,
  input  state_t       enc_in_data,
  output logic         enc_out_valid,
  output state_t       enc_out_data,
  // decryption core
  input  logic         dec_key_valid,
  output logic         dec_key_ready,
  input  logic [255:0] dec_key,
  input  key_size_e    dec_key_size,
  input  logic         dec_in_valid,
  output logic         dec_in_ready,
  input  state_t       dec_in_data,
  output logic         dec_out_valid,
  output state_t       dec_out_data,
  // joint encryption / decryption core
  input  logic         ed_key_valid,
  output logic         ed_key_ready,
  input  logic [255:0] ed_key,
  input  key_size_e    ed_key_size,
  input  logic         ed_in_valid,
  output logic         ed_in_ready,
  input  logic         ed_in_dec,
  input  state_t       ed_in_data,
  output logic         ed_out_valid,
  output logic         ed_out_dec,
  output state_t       ed_out_data
);

  logic enc_out_dec_unused, dec_out_dec_unused;

  aes_core #(.DP(DP_ENC)) u_enc (
    .clk, .rst_n,
    .key_valid (enc_key_valid), .key_ready (enc_key_ready),
    .key       (enc_key),       .key_size  (enc_key_size),
    .in_valid  (enc_in_valid),  .in_ready  (enc_in_ready),
    .in_dec    (1'b0),          .in_data   (enc_in_data),
    .out_valid (enc_out_valid), .out_dec   (enc_out_dec_unused),
    .out_data  (enc_out_data)
  );

  aes_core #(.DP(DP_DEC)) u_dec (
    .clk, .rst_n,
    .key_valid (dec_key_valid), .key_ready (dec_key_ready),
    .key       (dec_key),       .key_size  (dec_key_size),
    .in_valid  (dec_in_valid),  .in_ready  (dec_in_ready),
    .in_dec    (1'b1),          .in_data   (dec_in_data),
    .out_valid (dec_out_valid), .out_dec   (dec_out_dec_unused),
    .out_data  (dec_out_data)
  );

  aes_core #(.DP(DP_JOINT)) u_ed (
    .clk, .rst_n,
    .key_valid (ed_key_valid),  .key_ready (ed_key_ready),
    .key       (ed_key),        .key_size  (ed_key_size),
    .in_valid  (ed_in_valid),   .in_ready  (ed_in_ready),
    .in_dec    (ed_in_dec),     .in_data   (ed_in_data),
    .out_valid (ed_out_valid),  .out_dec   (ed_out_dec),
    .out_data  (ed_out_data)
  );

endmodule

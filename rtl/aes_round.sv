// aes_round: one AES round as a two-register sub-pipeline stage.
//
// Cycle 1: register A holds the state entering the round. Its sixteen bytes
// address sixteen S-box ROMs; ShiftRows costs no logic because each ROM
// reads the byte that ShiftRows (or InvShiftRows) brings to its position.
// The ROM read registers form register B at the end of the cycle.
// Cycle 2: MixColumns and AddRoundKey are computed combinationally from B and
// the result (state_o) is loaded by register A of the next round.
// The split of a round into {SubBytes+ShiftRows} and {MixColumns+AddRoundKey}
// with two registers per round follows the described design.
//
// Directions (DP):
//   encryption: state_o = MixColumns(B) ^ rk      (B ^ rk when `last`)
//   decryption: state_o = InvMixColumns(B ^ rk)   (B ^ rk when `last`)
//   joint:      either, chosen by `dec`, with the S-box ROMs holding both
//               tables and one shared MixColumns network.
// Decryption uses the straightforward inverse cipher order (AddRoundKey
// before InvMixColumns) so that it reads the same round keys as encryption,
// unmodified; this ordering is a choice of this design.
// Timing: state_i loads A at a clock edge; state_o is valid, from that
// state, after the second following edge (latency two cycles). `dec`,
// `last` and `rk` must be stable during the second cycle; the S-box table
// (joint only) is chosen by `dec` during the first cycle.
module aes_round
  import aes_pkg::*;
#(
  parameter datapath_e DP = DP_JOINT
) (
  input  logic   clk,
  input  logic   dec,      // joint data path only: 1 = decryption
  input  logic   last,     // final round: no (Inv)MixColumns
  input  state_t state_i,  // loaded into register A every cycle
  input  state_t rk,       // round key of this stage
  output state_t state_o   // combinational, into the next round's register A
);

  localparam sbox_kind_e KIND = (DP == DP_ENC) ? SBOX_FWD :
                                (DP == DP_DEC) ? SBOX_INV : SBOX_BOTH;

  logic   is_dec;
  state_t reg_a, reg_b, pre, mixed;

  assign is_dec = (DP == DP_DEC) ? 1'b1 : (DP == DP_ENC) ? 1'b0 : dec;

  always_ff @(posedge clk) begin
    reg_a <= state_i;
  end

  // SubBytes + ShiftRows: the ROM at position k reads the byte that the
  // (inverse) row shift moves to k.
  for (genvar k = 0; k < 16; k++) begin : g_sub
    localparam int unsigned SRC_E = shift_src(k, 1'b0);
    localparam int unsigned SRC_D = shift_src(k, 1'b1);
    logic [7:0] addr;
    assign addr = is_dec ? reg_a[127-8*SRC_D -: 8] : reg_a[127-8*SRC_E -: 8];
    aes_sbox #(.KIND(KIND)) u_sbox (
      .clk  (clk),
      .inv  (is_dec),
      .addr (addr),
      .data (reg_b[127-8*k -: 8])
    );
  end

  // MixColumns + AddRoundKey
  assign pre = is_dec ? (reg_b ^ rk) : reg_b;

  for (genvar c = 0; c < 4; c++) begin : g_mix
    word_t mc;
    aes_mixcolumn #(.HAS_INV(DP != DP_ENC)) u_mix (
      .inv   (is_dec),
      .col_i (pre[127-32*c -: 32]),
      .col_o (mc)
    );
    assign mixed[127-32*c -: 32] = last ? pre[127-32*c -: 32] : mc;
  end

  assign state_o = is_dec ? mixed : (mixed ^ rk);

endmodule

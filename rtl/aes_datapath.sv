// aes_datapath: the unrolled, sub-pipelined AES data path for all three key
// sizes, built as the encryption path, the decryption path or the joint
// encryption/decryption path (parameter DP).
//
// Structure: an input register, the initial AddRoundKey, NR_MAX = 14 round
// stages of two registers each (aes_round), and an output register: 30
// registers in all, one new 128-bit block accepted every clock cycle.
//  - Encryption: blocks always enter at stage 1 and stage s uses round key
//    s. The final round (no MixColumns) is stage 10, 12 or 14 depending on
//    the key size, and a multiplexer in front of the output register picks
//    the result after stage 10, 12 or 14.
//  - Decryption: blocks enter at stage 15-Nr (5, 3 or 1), so that every key
//    size leaves through stage 14, the only final round. Stage s uses round
//    key 14-s for every key size; the initial AddRoundKey uses round key Nr.
//  - Joint: each stage switches between the two by `dec`.
// The output mux after rounds 10/12/14, the entry point chosen by key size
// and the 30-register count follow the described design.
// Interface: in_valid/in_data are taken every cycle (no back-pressure);
// out_valid/out_data appear 2*Nr+2 cycles later (22, 26 or 30). key_size,
// dec and the round keys must not change while blocks are in flight; the
// core guarantees this. A valid bit travels beside each register; the data
// registers have no reset.
module aes_datapath
  import aes_pkg::*;
#(
  parameter datapath_e   DP     = DP_JOINT,
  parameter int unsigned NR_MAX = 14
) (
  input  logic      clk,
  input  logic      rst_n,
  input  key_size_e key_size,
  input  logic      dec,               // joint data path only
  input  state_t    rk [NR_MAX+1],     // round keys 0..NR_MAX
  input  logic      in_valid,
  input  state_t    in_data,
  output logic      out_valid,
  output state_t    out_data
);

  logic        is_dec;
  int unsigned nr, entry, exit_s;
  state_t      in_reg, ark0, out_sel;
  logic        in_v;
  state_t      st_o [NR_MAX+1];        // st_o[s]: output of stage s
  logic        va   [NR_MAX+1];        // valid of register A of stage s
  logic        vb   [NR_MAX+1];        // valid of register B of stage s

  assign is_dec = (DP == DP_DEC) ? 1'b1 : (DP == DP_ENC) ? 1'b0 : dec;

  always_comb begin
    nr    = num_rounds(key_size);
    entry  = is_dec ? NR_MAX + 1 - nr : 1;
    exit_s = is_dec ? NR_MAX : nr;
  end

  // Input register and initial AddRoundKey
  always_ff @(posedge clk) in_reg <= in_data;
  assign ark0 = in_reg ^ (is_dec ? rk[nr] : rk[0]);

  assign st_o[0] = ark0;

  for (genvar s = 1; s <= NR_MAX; s++) begin : g_stage
    state_t sin, key;
    logic   last;
    // Stage s starts a block when it is the entry stage, otherwise it takes
    // the previous stage's result.
    assign sin  = (s == entry) ? ark0 : st_o[s-1];
    assign key  = is_dec ? rk[NR_MAX - s] : rk[s];
    assign last = is_dec ? (s == NR_MAX) : (s == nr);
    aes_round #(.DP(DP)) u_round (
      .clk     (clk),
      .dec     (is_dec),
      .last    (last),
      .state_i (sin),
      .rk      (key),
      .state_o (st_o[s])
    );
  end

  // Output multiplexer: result after round Nr (encryption) or after the
  // last stage (decryption).
  assign out_sel = is_dec ? st_o[NR_MAX] : st_o[nr];

  always_ff @(posedge clk) out_data <= out_sel;

  // Valid bits beside the data registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_v      <= 1'b0;
      out_valid <= 1'b0;
      for (int s = 0; s <= NR_MAX; s++) begin
        va[s] <= 1'b0;
        vb[s] <= 1'b0;
      end
    end else begin
      in_v <= in_valid;
      va[0] <= 1'b0;
      vb[0] <= 1'b0;
      for (int s = 1; s <= NR_MAX; s++) begin
        // valid only between the entry and the exit stage, so nothing
        // stale is left behind when the key size or direction changes
        if (s == int'(entry))
          va[s] <= in_v;
        else if (s > int'(entry) && s <= int'(exit_s))
          va[s] <= vb[s-1];
        else
          va[s] <= 1'b0;
        vb[s] <= va[s];
      end
      out_valid <= vb[exit_s];
    end
  end

endmodule

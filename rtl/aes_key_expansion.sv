// aes_key_expansion: AES key schedule for 128-, 192- and 256-bit keys,
// producing the round keys fast enough for encryption to start before the
// schedule is finished.
//
// A key is taken when `start` is high while `busy` is low. The unit keeps
// the last eight schedule words in a window register. After one cycle that
// writes the key itself into the round key store, it repeats a two-cycle
// step:
//   LOOK: the last word (rotated, except on the odd half-steps of a 256-bit
//         key) addresses four S-box ROMs, whose read registers capture
//         SubWord at the end of the cycle;
//   GEN:  the next words are formed by the XOR chain
//         w[i] = w[i-Nk] ^ w[i-1] (with SubWord and Rcon folded into the
//         first one) and written into the store.
// A step produces 4 words (128- and 256-bit keys) or 6 words (192-bit
// keys), i.e. at least one round key every two cycles: the same rate at
// which a block advances through the round pipeline. So a block admitted
// on the cycle after the key words were written (`rk_first` high) never
// reaches a stage before its round key. `rk_all` rises when the whole
// schedule is in the store (needed to decrypt, which starts from the last
// round key). A 192-bit schedule ends with two spare words, which land in
// round key 13 and are never used.
// Sharing the S-box ROM type with the data path and storing the keys
// follows the described design; the window-and-step organisation, the rate
// and the handshake are this design's.
// Timing from the `start` edge K: key words written at K+1, step j's words
// at K+1+2j; `rk_all` after K+21 (128), K+17 (192), K+27 (256).
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [255:0] key,           // left-aligned key
  input  key_size_e  key_size,
  output logic       busy,            // schedule in progress, start ignored
  output logic       rk_first,        // key written: encryption may begin
  output logic       rk_all,          // whole schedule written
  output key_size_e  key_size_o,      // size of the key in the store
  // write port of the round key store
  output logic       we,
  output logic [5:0] wbase,
  output logic [3:0] wcount,
  output word_t      wdata [8]
);

  typedef enum logic [1:0] {S_IDLE, S_COPY, S_LOOK, S_GEN} kstate_e;

  kstate_e    st;
  key_size_e  ks;
  word_t      win [8];       // win[7] is the newest word
  logic [5:0] wcnt;          // words written so far
  logic [7:0] rcon;
  logic       half;          // 256-bit keys: odd half-step (SubWord only)
  word_t      sub_in, sub_out, temp;
  word_t      nw [8];
  logic [3:0] nk, nstep;
  logic [5:0] total;
  logic       use_rot;

  always_comb begin
    nk    = 4'(key_words(ks));
    nstep = (ks == KEY192) ? 4'd6 : 4'd4;
    total = 6'(4 * (num_rounds(ks) + 1));
  end

  assign use_rot = !(ks == KEY256 && half);
  assign sub_in  = use_rot ? {win[7][23:0], win[7][31:24]} : win[7];

  for (genvar b = 0; b < 4; b++) begin : g_sub
    aes_sbox #(.KIND(SBOX_FWD)) u_sbox (
      .clk  (clk),
      .inv  (1'b0),
      .addr (sub_in[31-8*b -: 8]),
      .data (sub_out[31-8*b -: 8])
    );
  end

  assign temp = use_rot ? (sub_out ^ {rcon, 24'h0}) : sub_out;

  // XOR chain of one step: word m uses w[i-Nk+m] = win[8-Nk+m].
  always_comb begin
    for (int m = 0; m < 8; m++) nw[m] = '0;
    for (int m = 0; m < 6; m++) begin
      if (m < int'(nstep))
        nw[m] = win[8 - int'(nk) + m] ^ ((m == 0) ? temp : nw[(m + 7) % 8]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      ks   <= KEY128;
      wcnt <= '0;
      rcon <= 8'h01;
      half <= 1'b0;
      rk_first <= 1'b0;
      rk_all   <= 1'b0;
      for (int m = 0; m < 8; m++) win[m] <= '0;
    end else begin
      case (st)
        S_IDLE: if (start) begin
          ks       <= key_size;
          rk_first <= 1'b0;
          rk_all   <= 1'b0;
          rcon     <= 8'h01;
          half     <= 1'b0;
          wcnt     <= '0;
          for (int m = 0; m < 8; m++) begin
            // align the key so that its last word is win[7]
            if (m >= 8 - int'(key_words(key_size)))
              win[m] <= key[255 - 32*(m - 8 + int'(key_words(key_size))) -: 32];
            else
              win[m] <= '0;
          end
          st <= S_COPY;
        end
        S_COPY: begin
          wcnt     <= 6'(nk);
          rk_first <= 1'b1;
          st       <= S_LOOK;
        end
        S_LOOK: st <= S_GEN;
        S_GEN: begin
          wcnt <= wcnt + 6'(nstep);
          for (int m = 0; m < 8; m++)
            win[m] <= (m + int'(nstep) < 8) ? win[m + int'(nstep)] : nw[m + int'(nstep) - 8];
          if (use_rot) rcon <= xtime(rcon);
          if (ks == KEY256) half <= ~half;
          if (wcnt + 6'(nstep) >= total) begin
            st     <= S_IDLE;
            rk_all <= 1'b1;
          end else begin
            st <= S_LOOK;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy       = (st != S_IDLE);
  assign key_size_o = ks;

  // Store write port: the key itself in S_COPY, a step's words in S_GEN.
  always_comb begin
    we     = 1'b0;
    wbase  = wcnt;
    wcount = nstep;
    for (int m = 0; m < 8; m++) wdata[m] = nw[m];
    if (st == S_COPY) begin
      we     = 1'b1;
      wbase  = '0;
      wcount = nk;
      for (int m = 0; m < 8; m++)
        wdata[m] = (m < int'(nk)) ? win[8 - int'(nk) + m] : '0;
    end else if (st == S_GEN) begin
      we = 1'b1;
    end
  end

endmodule

// aes_round_key_store: storage for the expanded key.
//
// Holds the 4*(NR_MAX+1) = 60 key words of the longest schedule. The key
// expansion writes a run of consecutive words per cycle (4, 6 or 8 words
// starting at `wbase`); words beyond the store are dropped. Every stage of
// the unrolled pipeline needs its round key in every cycle, so all
// NR_MAX+1 round keys are read out in parallel on `rk`, round key r being
// words 4r..4r+3 with word 4r in the top bits. Keeping the expanded key in
// a store of its own, written by the expansion and read by the data path,
// follows the described design; the write port shape (a run of up to eight
// words) is this design's. No reset: a round key is read only after the
// expansion has written it, which the core's control guarantees.
// Timing: a write is visible on `rk` after the clock edge that performs it.
module aes_round_key_store
  import aes_pkg::*;
#(
  parameter int unsigned NR_MAX = 14
) (
  input  logic        clk,
  input  logic        we,
  input  logic [5:0]  wbase,            // index of the first word written
  input  logic [3:0]  wcount,           // number of words written, 1..8
  input  word_t       wdata [8],        // wdata[j] goes to word wbase+j
  output state_t      rk [NR_MAX+1]
);

  localparam int unsigned DEPTH = 4 * (NR_MAX + 1);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int j = 0; j < 8; j++) begin
        if (j < int'(wcount) && int'(wbase) + j < DEPTH)
          mem[int'(wbase) + j] <= wdata[j];
      end
    end
  end

  always_comb begin
    for (int r = 0; r <= NR_MAX; r++)
      rk[r] = {mem[4*r], mem[4*r+1], mem[4*r+2], mem[4*r+3]};
  end

endmodule

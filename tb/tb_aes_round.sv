// tb_aes_round: one round stage of each kind (encryption, decryption, joint)
// is fed a new random state and round key every cycle, with a random choice
// of final round. The result must appear exactly two clock edges after the
// state was applied (register A, then the S-box read register B) and equal
// the reference: MixColumns(SubShift(x)) ^ rk for encryption,
// InvMixColumns(InvSubShift(x) ^ rk) for decryption, without the mixing in
// a final round. The joint stage is run in both directions, switching every
// 40 cycles; the two cycles after a switch are not checked because a block
// in flight then would straddle directions (the core never does that).
module tb_aes_round;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  state_t x, rk, oe, od, oj;
  logic   last, jdec;
  int checks = 0, failures = 0;

  aes_round #(.DP(DP_ENC))   u_e (.clk, .dec(1'b0), .last, .state_i(x), .rk, .state_o(oe));
  aes_round #(.DP(DP_DEC))   u_d (.clk, .dec(1'b1), .last, .state_i(x), .rk, .state_o(od));
  aes_round #(.DP(DP_JOINT)) u_j (.clk, .dec(jdec), .last, .state_i(x), .rk, .state_o(oj));

  function automatic state_t exp_round(state_t s, state_t k, bit l, bit d);
    state_t t;
    if (!d) begin
      t = sub_shift(s, 0);
      if (!l) t = mix(t, 0);
      return t ^ k;
    end
    t = sub_shift(s, 1) ^ k;
    return l ? t : mix(t, 1);
  endfunction

  task automatic chk(state_t got, state_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  state_t hist [3];
  int     since_switch;

  initial begin
    ref_init();
    checks++;
    if (self_test() != 0) failures++;
    jdec = 0;
    since_switch = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // hist[1] was applied before the last two edges
      rk   = rand_blk();
      last = ($urandom % 3 == 0);
      if (n % 40 == 0 && n > 0) begin
        jdec = ~jdec;
        since_switch = 0;
      end
      #1;
      if (n >= 2) begin
        chk(oe, exp_round(hist[1], rk, last, 0), "enc");
        chk(od, exp_round(hist[1], rk, last, 1), "dec");
        if (since_switch >= 2) chk(oj, exp_round(hist[1], rk, last, jdec), "joint");
      end
      since_switch++;
      x = rand_blk();
      hist[1] = hist[0];
      hist[0] = x;
    end
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

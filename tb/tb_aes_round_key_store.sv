// tb_aes_round_key_store: random runs of 1..8 words written at random word
// indices (including runs that cross the end of the store, whose excess is
// dropped) are mirrored in a model array; after every write all fifteen
// parallel round-key outputs are compared with the model. Cycles with the
// write enable low must change nothing.
module tb_aes_round_key_store;
  import aes_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       we;
  logic [5:0] wbase;
  logic [3:0] wcount;
  word_t      wdata [8];
  state_t     rk [15];
  word_t      model [60];
  int checks = 0, failures = 0;

  aes_round_key_store #(.NR_MAX(14)) dut (.clk, .we, .wbase, .wcount, .wdata, .rk);

  initial begin
    we = 0;
    wbase = '0; wcount = 4'd8;
    for (int j = 0; j < 8; j++) wdata[j] = '0;
    // fill everything first so the model is defined
    for (int b = 0; b < 60; b += 8) begin
      @(negedge clk);
      we = 1; wbase = 6'(b); wcount = 4'd8;
      for (int j = 0; j < 8; j++) begin
        wdata[j] = $urandom;
        if (b + j < 60) model[b + j] = wdata[j];
      end
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we     = ($urandom % 4 != 0);
      wbase  = 6'($urandom % 60);
      wcount = 4'(1 + $urandom % 8);
      for (int j = 0; j < 8; j++) wdata[j] = $urandom;
      if (we)
        for (int j = 0; j < int'(wcount); j++)
          if (int'(wbase) + j < 60) model[int'(wbase) + j] = wdata[j];
      @(posedge clk);
      #1;
      for (int r = 0; r < 15; r++) begin
        checks++;
        if (rk[r] !== {model[4*r], model[4*r+1], model[4*r+2], model[4*r+3]}) begin
          failures++;
          $display("rk[%0d] = %h, expected %h", r, rk[r],
                   {model[4*r], model[4*r+1], model[4*r+2], model[4*r+3]});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

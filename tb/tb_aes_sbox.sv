// tb_aes_sbox: checks the three S-box ROM variants (forward, inverse, and
// the 512-entry combined table) against the reference tables for all 256
// addresses, and checks that the read data appears exactly one clock after
// the address (a synchronous ROM read).
module tb_aes_sbox;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] addr, d_fwd, d_inv, d_both;
  logic       inv;
  int checks = 0, failures = 0;

  aes_sbox #(.KIND(SBOX_FWD))  u_fwd  (.clk, .inv(1'b0), .addr, .data(d_fwd));
  aes_sbox #(.KIND(SBOX_INV))  u_inv  (.clk, .inv(1'b0), .addr, .data(d_inv));
  aes_sbox #(.KIND(SBOX_BOTH)) u_both (.clk, .inv,       .addr, .data(d_both));

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what, int a);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s[%02x]: got %02x expected %02x", what, a, got, exp);
    end
  endtask

  initial begin
    ref_init();
    checks++;
    if (self_test() != 0) failures++;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      addr = 8'(a);
      inv  = a[0];
      @(negedge clk);   // one edge later
      chk(d_fwd, fwd[a], "fwd", a);
      chk(d_inv, inv_t[a], "inv", a);
      chk(d_both, a[0] ? inv_t[a] : fwd[a], "both", a);
      addr = ~addr;     // the output must hold until the next edge
      #1;
      chk(d_fwd, fwd[a], "fwd-hold", a);
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

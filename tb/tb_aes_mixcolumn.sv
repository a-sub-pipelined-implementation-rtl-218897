// tb_aes_mixcolumn: compares the multiplier-less MixColumns and
// InvMixColumns of one column with the reference's full GF(2^8) matrix
// products, for the FIPS-197 example columns and 2000 random columns; also
// checks that inverse after forward returns the input and that the
// forward-only build (HAS_INV = 0) ignores `inv`.
module tb_aes_mixcolumn;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  word_t col, fo, io, no;
  int checks = 0, failures = 0;

  aes_mixcolumn #(.HAS_INV(1'b1)) u_f (.inv(1'b0), .col_i(col), .col_o(fo));
  aes_mixcolumn #(.HAS_INV(1'b1)) u_i (.inv(1'b1), .col_i(col), .col_o(io));
  aes_mixcolumn #(.HAS_INV(1'b0)) u_n (.inv(1'b1), .col_i(col), .col_o(no));

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s(%h): got %h expected %h", what, col, got, exp);
    end
  endtask

  initial begin
    word_t orig;
    ref_init();
    // FIPS-197 / common test columns
    col = 32'hdb135345; #1; chk(fo, 32'h8e4da1bc, "mc");
    col = 32'hf20a225c; #1; chk(fo, 32'h9fdc589d, "mc");
    col = 32'h8e4da1bc; #1; chk(io, 32'hdb135345, "imc");
    for (int n = 0; n < 2000; n++) begin
      col = $urandom;
      #1;
      chk(fo, mix_col(col, 0), "mc");
      chk(io, mix_col(col, 1), "imc");
      chk(no, mix_col(col, 0), "mc-only");
      orig = col;
      col  = fo;
      #1;
      chk(io, orig, "imc(mc)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

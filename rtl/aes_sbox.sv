// aes_sbox: one S-box look-up table read like a block RAM in ROM mode.
//
// The byte on `addr` is substituted and appears on `data` after the next
// rising clock edge; the output register is the ROM's own read register and
// is the second pipeline register of a round (the register after
// SubBytes/ShiftRows). KIND selects the contents:
//   SBOX_FWD  - 256 x 8 forward S-box (encryption, key expansion)
//   SBOX_INV  - 256 x 8 inverse S-box (decryption)
//   SBOX_BOTH - 512 x 8, both tables, `inv` is the top address bit
//               (joint encryption/decryption round)
// `inv` is ignored unless KIND is SBOX_BOTH. Storing the S-boxes as ROMs,
// one per state byte, follows the described design; putting both tables in
// one 512-entry ROM for the joint data path is a choice of this design.
// There is no reset: the ROM output is only meaningful one cycle after an
// address was presented, which the surrounding valid pipeline tracks.
module aes_sbox
  import aes_pkg::*;
#(
  parameter sbox_kind_e KIND = SBOX_FWD
) (
  input  logic       clk,
  input  logic       inv,
  input  logic [7:0] addr,
  output logic [7:0] data
);

  localparam int unsigned DEPTH = (KIND == SBOX_BOTH) ? 512 : 256;
  localparam int unsigned AW    = (KIND == SBOX_BOTH) ? 9 : 8;

  typedef logic [DEPTH-1:0][7:0] rom_t;

  // ROM contents from the package tables.
  function automatic rom_t fill();
    rom_t r;
    for (int k = 0; k < 256; k++) begin
      r[k] = (KIND == SBOX_INV) ? INV_SBOX[k] : SBOX[k];
      if (KIND == SBOX_BOTH) r[(k + 256) % DEPTH] = INV_SBOX[k];
    end
    return r;
  endfunction

  localparam rom_t ROM = fill();

  logic [AW-1:0] raddr;
  assign raddr = AW'({inv & (KIND == SBOX_BOTH), addr});

  always_ff @(posedge clk) begin
    data <= ROM[raddr];
  end

endmodule

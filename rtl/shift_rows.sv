// shift_rows: integrated ShiftRows / InvShiftRows. Row r of the 4x4 state
// is rotated left by r bytes for encryption (dec = 0) or right by r bytes
// for decryption (dec = 1). Pure wiring plus a 2:1 multiplexer per byte.
module shift_rows
  import aes_pkg::*;
(
  input  logic   dec,
  input  state_t s,
  output state_t y
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        y[127 - 8*(4*c + r) -: 8] = dec ? get_byte(s, r, (c + 4 - r) % 4)
                                        : get_byte(s, r, (c + r) % 4);
  end
endmodule

// aes_pkg: types and constants shared by the AES-256 engine.
// A 128-bit state holds 16 bytes in the usual AES order: byte 0 is bits
// [127:120] and bytes fill the 4x4 state column by column, so byte
// (row r, column c) is byte 4*c + r. The cipher key is 256 bits, giving
// 14 rounds (AES-256). Round keys are 128 bits and are handled in pairs.
package aes_pkg;
  localparam int unsigned NR = 14;           // rounds for a 256-bit key
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] state_t;
  typedef logic [255:0] key256_t;

  // byte (r, c) of a state
  function automatic byte_t get_byte(state_t s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  // round constant of the key schedule, Rcon[i] = x^(i-1) in GF(2^8), i = 1..7
  function automatic byte_t rcon(logic [3:0] i);
    unique case (i)
      4'd1: return 8'h01;
      4'd2: return 8'h02;
      4'd3: return 8'h04;
      4'd4: return 8'h08;
      4'd5: return 8'h10;
      4'd6: return 8'h20;
      4'd7: return 8'h40;
      default: return 8'h00;
    endcase
  endfunction
endpackage

// xtea_round: one XTEA half-round (a single Feistel step), purely combinational.
//
// This is the computational core of the sequential XTEA engine: the register
// block feeds Left, Right and the running sum in, and clocks the three results
// back in on the next edge, so one half-round is done per clock and a full
// 32-cycle XTEA operation takes 64 clocks.
//
// The mixing function is the XTEA one: F(x) = ((x << 4) ^ (x >> 5)) + x,
// XORed with (sum + K[sel]). The first half of a cycle selects the subkey with
// sum[1:0], the second half with sum[12:11]; the sum changes by DELTA between
// the two halves. Encryption adds the mixed value; decryption runs the same
// steps in reverse order and subtracts it, using the sum before it is
// decremented and the subkey order swapped.
//
// The Left/Right words swap roles on every half-round (the crossing of the
// two halves in the round diagram), so after an even number of half-rounds
// Left and Right are again the first and second XTEA words:
//   encrypt: Left' = Right,                      Right' = Left + (F(Right) ^ x)
//   decrypt: Left' = Right - (F(Left) ^ x),      Right' = Left
// Packing the swap into the step, and one shared F for both directions, are
// this design's choices; the arithmetic is the standard XTEA algorithm.
//
// Ports: decrypt selects direction, second_half selects which half of the
// cycle is computed, key is the 128-bit key as four 32-bit subkeys.
// Timing: no registers; the path is shifter/XOR, two adders and an
// adder/subtractor deep.
module xtea_round
  import xtea_pkg::*;
(
  input  logic  decrypt,
  input  logic  second_half,
  input  word_t left_in,
  input  word_t right_in,
  input  word_t sum_in,
  input  key_t  key,
  output word_t left_out,
  output word_t right_out,
  output word_t sum_out
);

  word_t   f_in, f_val, mix;
  logic [1:0] key_sel;

  // Subkey selection: encryption uses sum[1:0] first, decryption uses it last.
  always_comb begin
    if (second_half ^ decrypt) key_sel = sum_in[12:11];
    else                       key_sel = sum_in[1:0];
  end

  // The F input is the word that is not being updated.
  assign f_in  = decrypt ? left_in : right_in;
  assign f_val = ((f_in << 4) ^ (f_in >> 5)) + f_in;
  assign mix   = f_val ^ (sum_in + key[key_sel]);

  always_comb begin
    if (decrypt) begin
      left_out  = right_in - mix;
      right_out = left_in;
    end else begin
      left_out  = right_in;
      right_out = left_in + mix;
    end
  end

  // The sum advances (or steps back) once per cycle, in its first half.
  always_comb begin
    if (second_half)  sum_out = sum_in;
    else if (decrypt) sum_out = sum_in - DELTA;
    else              sum_out = sum_in + DELTA;
  end

endmodule

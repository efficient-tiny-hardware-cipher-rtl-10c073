// xtea: sequential (round-iterative) XTEA block cipher core, 64-bit block,
// 128-bit key, encryption and decryption.
//
// One combinational half-round (xtea_round) sits in a feedback loop around a
// register block (xtea_regs) that holds the key, the data words, the running
// sum, the output register and the four-state controller. One half-round is
// computed per clock, so no round hardware is replicated.
//
// Interface (133 pins): Clk; Reset_n (asynchronous, active low); Din[63:0]
// carries the key (two words of 64 bits on two consecutive edges, the first
// while Loadkey is high) and the plaintext or ciphertext; Encrypt and Decrypt
// start an operation from IDLE; Dout[63:0] holds the last result.
//
// Timing at the default ROUNDS = 32: key load 2 clocks; from the edge that
// samples Encrypt/Decrypt, 64 half-round clocks follow, and the next edge
// writes Dout and returns the controller to IDLE: 66 clocks in all, Dout
// written 65 edges after the command edge. A command is only accepted in IDLE. Block layout, pin names,
// state set and cycle counts follow the design description; the one-clock
// write of Dout and the command priority (Loadkey, Encrypt, Decrypt) are
// choices of this implementation.
module xtea
  import xtea_pkg::*;
#(
  parameter int unsigned ROUNDS = 32   // XTEA cycles; 2*ROUNDS half-rounds
) (
  input  logic        Clk,
  input  logic        Reset_n,
  input  logic [63:0] Din,
  input  logic        Encrypt,
  input  logic        Decrypt,
  input  logic        Loadkey,
  output logic [63:0] Dout
);

  logic   decrypt, second_half;
  word_t  left, right, sum, left_nx, right_nx, sum_nx;
  key_t   key;

  xtea_regs #(.ROUNDS(ROUNDS)) eb2 (
    .Clk        (Clk),
    .Reset_n    (Reset_n),
    .Din        (Din),
    .Encrypt    (Encrypt),
    .Decrypt    (Decrypt),
    .Loadkey    (Loadkey),
    .Dout       (Dout),
    .decrypt    (decrypt),
    .second_half(second_half),
    .left       (left),
    .right      (right),
    .sum        (sum),
    .key        (key),
    .left_nx    (left_nx),
    .right_nx   (right_nx),
    .sum_nx     (sum_nx)
  );

  xtea_round eb1 (
    .decrypt    (decrypt),
    .second_half(second_half),
    .left_in    (left),
    .right_in   (right),
    .sum_in     (sum),
    .key        (key),
    .left_out   (left_nx),
    .right_out  (right_nx),
    .sum_out    (sum_nx)
  );

endmodule

// xtea_regs: the clocked half of the sequential XTEA core (all inputs,
// outputs and state elements), holding the controller.
//
// Registers: the 128-bit key K[0..3], the data words Left and Right, the
// running sum and the 64-bit output register Dout, plus the controller's
// state and half-round counter (297 flip-flops at ROUNDS = 32).
//
// Din is shared: on the Loadkey edge it is written to K[0] (Din[63:32]) and
// K[1] (Din[31:0]); on the next edge, in BUSY_KEY, to K[2] and K[3]. On the
// Encrypt or Decrypt edge Din is written to Left (Din[63:32]) and Right
// (Din[31:0]) and the sum is preset to 0 for encryption or ROUNDS*DELTA for
// decryption. In a busy state every edge takes the combinational half-round's
// results (left_nx, right_nx, sum_nx) back into Left, Right and the sum. After
// 2*ROUNDS half-rounds one more edge copies {Left, Right} into Dout, which
// then holds the result until the next operation ends. Dout changes only at
// that edge.
//
// The key word placement in Din follows the design's key-load trace. The
// data word order (first XTEA word in the upper half), the separate Dout
// register and the stored running sum are this implementation's reading of
// the design (they make up its reported count of 297 registers). Reset_n
// asynchronously clears every register, the key included.
module xtea_regs
  import xtea_pkg::*;
#(
  parameter int unsigned ROUNDS = 32
) (
  input  logic        Clk,
  input  logic        Reset_n,
  input  logic [63:0] Din,
  input  logic        Encrypt,
  input  logic        Decrypt,
  input  logic        Loadkey,
  output logic [63:0] Dout,
  // to the half-round logic
  output logic        decrypt,
  output logic        second_half,
  output word_t       left,
  output word_t       right,
  output word_t       sum,
  output key_t        key,
  // fed back from the half-round logic
  input  word_t       left_nx,
  input  word_t       right_nx,
  input  word_t       sum_nx
);

  localparam int unsigned CW = $clog2(2 * ROUNDS + 1);
  localparam word_t SUM_DEC = dec_sum_init(ROUNDS);

  logic [CW-1:0] count;
  state_t state;
  logic key_wr_hi, key_wr_lo, data_wr, data_dec, step, dout_wr;

  xtea_fsm #(.ROUNDS(ROUNDS)) u_fsm (
    .Clk        (Clk),
    .Reset_n    (Reset_n),
    .Loadkey    (Loadkey),
    .Encrypt    (Encrypt),
    .Decrypt    (Decrypt),
    .state      (state),
    .count      (count),
    .key_wr_hi  (key_wr_hi),
    .key_wr_lo  (key_wr_lo),
    .data_wr    (data_wr),
    .data_dec   (data_dec),
    .step       (step),
    .second_half(second_half),
    .dout_wr    (dout_wr)
  );

  assign decrypt = (state == BUSY_DEC);

  always_ff @(posedge Clk or negedge Reset_n) begin
    if (!Reset_n) begin
      key   <= '0;
      left  <= '0;
      right <= '0;
      sum   <= '0;
      Dout  <= '0;
    end else begin
      if (key_wr_hi) begin
        key[0] <= Din[63:32];
        key[1] <= Din[31:0];
      end
      if (key_wr_lo) begin
        key[2] <= Din[63:32];
        key[3] <= Din[31:0];
      end
      if (data_wr) begin
        left  <= Din[63:32];
        right <= Din[31:0];
        sum   <= data_dec ? SUM_DEC : '0;
      end else if (step) begin
        left  <= left_nx;
        right <= right_nx;
        sum   <= sum_nx;
      end
      if (dout_wr) Dout <= {left, right};
    end
  end

  // The result is taken only after the last half-round of an operation.
  a_dout_at_end: assert property (@(posedge Clk) disable iff (!Reset_n)
                                  dout_wr |-> count == CW'(2 * ROUNDS));

endmodule

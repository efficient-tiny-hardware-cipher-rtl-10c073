// xtea_fsm: the four-state controller of the sequential XTEA core.
//
// States (codes as seen on the state register): IDLE=0, BUSY_KEY=1,
// BUSY_ENC=2, BUSY_DEC=3. From IDLE, Loadkey leads to BUSY_KEY, Encrypt to
// BUSY_ENC and Decrypt to BUSY_DEC; every busy state returns to IDLE by itself
// when its work is done. The actions are Mealy outputs on the transitions:
//   IDLE --Loadkey-->  BUSY_KEY : key_wr_hi  (Din -> K[0], K[1])
//   BUSY_KEY -------->  IDLE    : key_wr_lo  (Din -> K[2], K[3])
//   IDLE --Encrypt/Decrypt--> BUSY_x : data_wr (Din -> Left/Right, sum preset)
//   BUSY_x (count < 2*ROUNDS)        : step    (one half-round)
//   BUSY_x --(count = 2*ROUNDS)--> IDLE : dout_wr (Left/Right -> Dout)
// So key loading takes 2 clocks, and an encryption or decryption occupies
// 1 + 2*ROUNDS + 1 clocks, counting both the edge that samples the command
// and the edge that writes Dout: 66 at the default ROUNDS = 32, which with
// the 2 key clocks gives the 68-clock figure of the design.
//
// Design choices not fixed by the state diagram: if several commands are high
// in IDLE, Loadkey wins over Encrypt, and Encrypt over Decrypt; commands seen
// while busy are ignored (a command still high when IDLE is reached starts a
// new operation). Reset_n is asynchronous and active low.
module xtea_fsm
  import xtea_pkg::*;
#(
  parameter int unsigned ROUNDS = 32,   // XTEA cycles (two half-rounds each)
  localparam int unsigned CW = $clog2(2 * ROUNDS + 1)
) (
  input  logic          Clk,
  input  logic          Reset_n,
  input  logic          Loadkey,
  input  logic          Encrypt,
  input  logic          Decrypt,
  output state_t        state,
  output logic [CW-1:0] count,        // half-rounds done in this operation
  output logic          key_wr_hi,
  output logic          key_wr_lo,
  output logic          data_wr,
  output logic          data_dec,     // with data_wr: the operation is a decryption
  output logic          step,
  output logic          second_half,
  output logic          dout_wr
);

  localparam logic [CW-1:0] LAST = CW'(2 * ROUNDS);

  state_t state_n;
  logic   busy, done;

  assign busy = (state == BUSY_ENC) || (state == BUSY_DEC);
  assign done = (count == LAST);

  always_comb begin
    state_n   = state;
    key_wr_hi = 1'b0;
    key_wr_lo = 1'b0;
    data_wr   = 1'b0;
    data_dec  = 1'b0;
    step      = 1'b0;
    dout_wr   = 1'b0;
    unique case (state)
      IDLE: begin
        if (Loadkey) begin
          key_wr_hi = 1'b1;
          state_n   = BUSY_KEY;
        end else if (Encrypt) begin
          data_wr = 1'b1;
          state_n = BUSY_ENC;
        end else if (Decrypt) begin
          data_wr  = 1'b1;
          data_dec = 1'b1;
          state_n  = BUSY_DEC;
        end
      end
      BUSY_KEY: begin
        key_wr_lo = 1'b1;
        state_n   = IDLE;
      end
      BUSY_ENC, BUSY_DEC: begin
        if (done) begin
          dout_wr = 1'b1;
          state_n = IDLE;
        end else begin
          step = 1'b1;
        end
      end
      default: state_n = IDLE;
    endcase
  end

  assign second_half = count[0];

  always_ff @(posedge Clk or negedge Reset_n) begin
    if (!Reset_n) begin
      state <= IDLE;
      count <= '0;
    end else begin
      state <= state_n;
      if (data_wr)   count <= '0;
      else if (step) count <= count + 1'b1;
    end
  end

  // The half-round counter never runs past the end of an operation.
  a_count_range: assert property (@(posedge Clk) disable iff (!Reset_n) count <= LAST);
  // A half-round is only ever taken in a busy state.
  a_step_busy: assert property (@(posedge Clk) disable iff (!Reset_n) step |-> busy);

endmodule

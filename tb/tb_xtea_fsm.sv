// tb_xtea_fsm: self-checking test of the four-state XTEA controller.
//
// Inputs change at the falling clock edge and the Mealy outputs and state are
// checked there too. Covered: reset state, the two-clock key load, the
// encryption and decryption sequences (64 half-round steps with alternating
// halves, then one Dout write, 66 clocks in all), command priority in IDLE,
// commands ignored while busy, and an asynchronous reset in mid-operation.
module tb_xtea_fsm;
  import xtea_pkg::*;

  localparam int unsigned ROUNDS = 32;
  localparam int unsigned CW = $clog2(2 * ROUNDS + 1);

  int checks = 0, failures = 0;

  logic Clk = 1'b0, Reset_n = 1'b1, Loadkey = 1'b0, Encrypt = 1'b0, Decrypt = 1'b0;
  state_t state;
  logic [CW-1:0] count;
  logic key_wr_hi, key_wr_lo, data_wr, data_dec, step, second_half, dout_wr;

  xtea_fsm #(.ROUNDS(ROUNDS)) dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one operation whose command has just been applied in IDLE; counts the
  // clocks until the controller is back in IDLE and checks every step.
  task automatic run_op(input state_t busy_state, input logic dec);
    int steps, cycles, douts;
    check("cmd data_wr", int'(data_wr), int'(1));
    check("cmd data_dec", int'(data_dec), int'(dec));
    @(negedge Clk);
    Encrypt = 1'b0; Decrypt = 1'b0;
    cycles = 1; steps = 0; douts = 0;
    while (state != IDLE && cycles < 200) begin
      check("busy state", int'(state), int'(busy_state));
      if (step) begin
        check("count", int'(count), int'(steps));
        check("second_half", int'(second_half), int'(steps % 2));
        steps++;
      end
      if (dout_wr) begin
        douts++;
        check("dout after all steps", int'(steps), int'(2 * ROUNDS));
      end
      check("no key write while busy", int'({key_wr_hi, key_wr_lo, data_wr}), int'(0));
      @(negedge Clk);
      cycles++;
    end
    check("half-round steps", int'(steps), int'(2 * ROUNDS));
    check("dout writes", int'(douts), int'(1));
    check("clocks command to IDLE", int'(cycles), int'(2 * ROUNDS + 2));
  endtask

  initial begin
    #1 Reset_n = 1'b0;
    #11;
    check("reset state", int'(state), int'(IDLE));
    check("reset count", int'(count), int'(0));
    Reset_n = 1'b1;
    @(negedge Clk);
    check("idle stays", int'(state), int'(IDLE));
    check("idle no action", int'({key_wr_hi, key_wr_lo, data_wr, step, dout_wr}), int'(0));

    // key load, Loadkey held two clocks as in the design's key-load trace
    Loadkey = 1'b1;
    #1 check("key_wr_hi", int'(key_wr_hi), int'(1));
    @(negedge Clk);
    check("BUSY_KEY", int'(state), int'(BUSY_KEY));
    check("key_wr_lo", int'(key_wr_lo), int'(1));
    check("no hi in BUSY_KEY", int'(key_wr_hi), int'(0));
    Loadkey = 1'b0;
    @(negedge Clk);
    check("key load back to IDLE", int'(state), int'(IDLE));

    // encryption, with Decrypt raised in the middle (must be ignored)
    Encrypt = 1'b1;
    #1;
    fork
      run_op(BUSY_ENC, 1'b0);
      begin
        repeat (10) @(negedge Clk);
        Decrypt = 1'b1; Loadkey = 1'b1;
        repeat (3) @(negedge Clk);
        Decrypt = 1'b0; Loadkey = 1'b0;
      end
    join

    // decryption
    Decrypt = 1'b1;
    #1 run_op(BUSY_DEC, 1'b1);

    // priorities: Loadkey over Encrypt over Decrypt
    Loadkey = 1'b1; Encrypt = 1'b1; Decrypt = 1'b1;
    @(negedge Clk);
    check("Loadkey has priority", int'(state), int'(BUSY_KEY));
    Loadkey = 1'b0; Encrypt = 1'b0; Decrypt = 1'b0;
    @(negedge Clk);
    Encrypt = 1'b1; Decrypt = 1'b1;
    #1 run_op(BUSY_ENC, 1'b0);

    // asynchronous reset during a decryption
    Decrypt = 1'b1;
    @(negedge Clk);
    Decrypt = 1'b0;
    repeat (5) @(negedge Clk);
    check("decrypting", int'(state), int'(BUSY_DEC));
    #2 Reset_n = 1'b0;
    #1 check("async reset state", int'(state), int'(IDLE));
    check("async reset count", int'(count), int'(0));
    @(negedge Clk);
    Reset_n = 1'b1;
    @(negedge Clk);
    check("idle after reset", int'(state), int'(IDLE));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

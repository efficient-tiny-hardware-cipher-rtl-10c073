// tb_xtea: end-to-end test of the sequential XTEA core at its default size
// (32 cycles, 64 half-rounds), against the textbook model in xtea_ref_pkg.
//
// Operations are driven the way the pins are meant to be used: Loadkey for
// two clocks with the two key halves on Din, then an Encrypt or Decrypt pulse
// with the block on Din, then Dout is read once the core is back in IDLE.
// Checked: the all-zero test vector of XTEA (key 0, block 0 ->
// DEE9D4D8_F7131ED9), random keys and blocks in both directions, decryption
// of each ciphertext back to its plaintext, the latency (Dout written exactly
// 65 edges after the command edge, so an operation occupies 66 clocks and 68
// with the key load), Dout held between
// operations, commands ignored while busy, command priority and an
// asynchronous reset in mid-operation. Each of these mechanisms is counted,
// and one that never happened counts as a failure.
module tb_xtea;
  import xtea_ref_pkg::*;

  localparam int unsigned ROUNDS = 32;
  localparam int unsigned LAT    = 2 * ROUNDS + 2;   // command edge to Dout edge

  int checks = 0, failures = 0;
  int n_keyload = 0, n_enc = 0, n_dec = 0, n_ignored = 0, n_prio = 0, n_reset = 0,
      n_backtoback = 0;

  logic Clk = 1'b0, Reset_n = 1'b1, Loadkey = 1'b0, Encrypt = 1'b0, Decrypt = 1'b0;
  logic [63:0] Din = '0, Dout;

  xtea dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(input rkey_t k);
    Loadkey = 1'b1;
    Din = {k[0], k[1]};
    @(negedge Clk);
    Din = {k[2], k[3]};
    @(negedge Clk);
    Loadkey = 1'b0;
    Din = {$urandom, $urandom};
    n_keyload++;
  endtask

  // One operation; when `disturb` is set, other commands and Din changes are
  // applied while it runs. Returns Dout and checks the latency.
  task automatic run_op(input logic dec, input logic [63:0] blk, input logic disturb,
                        output logic [63:0] res);
    logic [63:0] dout_prev;
    dout_prev = Dout;
    Din = blk;
    if (dec) Decrypt = 1'b1; else Encrypt = 1'b1;
    @(negedge Clk);
    Encrypt = 1'b0; Decrypt = 1'b0;
    for (int c = 1; c < LAT; c++) begin
      Din = {$urandom, $urandom};
      if (disturb && c >= 5 && c < 9) begin
        Loadkey = 1'b1; Encrypt = dec; Decrypt = !dec;
      end else begin
        Loadkey = 1'b0; Encrypt = 1'b0; Decrypt = 1'b0;
      end
      check("Dout unchanged before latency", Dout, dout_prev);
      @(negedge Clk);
    end
    if (disturb) n_ignored++;
    res = Dout;
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    rkey_t k;
    logic [63:0] pt, ct, got, expct;

    #1 Reset_n = 1'b0;
    #11 Reset_n = 1'b1;
    @(negedge Clk);

    // XTEA all-zero test vector
    k = '{default: 32'h0};
    load_key(k);
    run_op(1'b0, 64'h0, 1'b0, got);
    check("zero vector", got, 64'hDEE9_D4D8_F713_1ED9);
    check("zero vector vs model", got, ref_encipher(64'h0, k, ROUNDS));
    run_op(1'b1, got, 1'b0, got);
    check("zero vector decrypts", got, 64'h0);

    // the key of the key-loading trace
    k = '{32'h1111_2222, 32'h3333_4444, 32'h5555_6666, 32'h7777_8888};
    load_key(k);
    pt = 64'h0123_4567_89AB_CDEF;
    run_op(1'b0, pt, 1'b1, ct);
    check("trace key enc", ct, ref_encipher(pt, k, ROUNDS));
    run_op(1'b1, ct, 1'b1, got);
    check("trace key dec", got, pt);
    repeat (4) @(negedge Clk);
    check("Dout held in IDLE", Dout, pt);

    // random keys and blocks, operations back to back
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 4; i++) k[i] = $urandom;
      load_key(k);
      for (int m = 0; m < 3; m++) begin
        pt = {$urandom, $urandom};
        expct = ref_encipher(pt, k, ROUNDS);
        run_op(1'b0, pt, (m == 1), ct);
        check("random enc", ct, expct);
        run_op(1'b1, ct, 1'b0, got);
        n_backtoback++;
        check("random dec", got, pt);
        got = {$urandom, $urandom};
        run_op(1'b1, got, 1'b0, pt);
        check("decrypt of random block", pt, ref_decipher(got, k, ROUNDS));
      end
    end

    // priority: Loadkey wins over Encrypt and Decrypt, Encrypt over Decrypt
    k = '{32'hA5A5_0001, 32'h5A5A_0002, 32'h0F0F_0003, 32'hF0F0_0004};
    Encrypt = 1'b1; Decrypt = 1'b1;
    load_key(k);           // Encrypt/Decrypt high during both key clocks
    Encrypt = 1'b0; Decrypt = 1'b0;
    pt = 64'hDEAD_BEEF_0BAD_F00D;
    Din = pt; Encrypt = 1'b1; Decrypt = 1'b1;
    @(negedge Clk);
    Encrypt = 1'b0; Decrypt = 1'b0;
    repeat (LAT - 1) @(negedge Clk);
    // this also shows that the key load won and that the new key is in use
    check("Encrypt wins over Decrypt", Dout, ref_encipher(pt, k, ROUNDS));
    n_prio++;

    // asynchronous reset in mid-operation clears everything
    Din = pt; Decrypt = 1'b1;
    @(negedge Clk);
    Decrypt = 1'b0;
    repeat (20) @(negedge Clk);
    #2 Reset_n = 1'b0;
    #1 check("reset clears Dout", Dout, 0);
    @(negedge Clk);
    Reset_n = 1'b1;
    n_reset++;
    // the key register is cleared too: encryption now uses the zero key
    run_op(1'b0, 64'h0, 1'b0, got);
    check("zero key after reset", got, 64'hDEE9_D4D8_F713_1ED9);

    if (n_keyload == 0)    begin failures++; $display("FAIL no key load"); end
    if (n_enc == 0)        begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)        begin failures++; $display("FAIL no decryption"); end
    if (n_ignored == 0)    begin failures++; $display("FAIL no busy command"); end
    if (n_prio == 0)       begin failures++; $display("FAIL no priority case"); end
    if (n_reset == 0)      begin failures++; $display("FAIL no reset"); end
    if (n_backtoback == 0) begin failures++; $display("FAIL no back-to-back"); end
    $display("mechanisms: key loads %0d, encryptions %0d, decryptions %0d, busy commands ignored %0d, priority %0d, resets %0d, back-to-back %0d",
             n_keyload, n_enc, n_dec, n_ignored, n_prio, n_reset, n_backtoback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

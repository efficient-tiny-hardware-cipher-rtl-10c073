// tb_xtea_test_cases: replays the three published test sequences of this core
// at its default size and checks the controller's state codes and cycle counts
// along the way.
//
//  1. Key loading: Loadkey high for two clocks with Din = 1111222233334444,
//     then 5555666677778888. The state goes IDLE(0) -> BUSY_KEY(1) -> IDLE(0),
//     and the key words become 11112222, 33334444, 55556666, 77778888.
//  2. Encryption: reset, all-zero key loaded, Encrypt pulse with a zero block.
//     The state is BUSY_ENC(2) for the 64 half-round clocks plus the Dout
//     clock, and Dout holds the XTEA result for key 0 / block 0
//     (DEE9D4D8_F7131ED9). Loadkey edge to Dout edge must be 68 clocks.
//  3. Decryption state transition: after a key load, a Decrypt pulse takes the
//     state from IDLE(0) to BUSY_DEC(3), and on the 66th clock, counting the
//     command clock as the first, Dout takes the plaintext of the block given.
module tb_xtea_test_cases;
  import xtea_pkg::*;
  import xtea_ref_pkg::*;

  int checks = 0, failures = 0;

  logic Clk = 1'b0, Reset_n = 1'b1, Loadkey = 1'b0, Encrypt = 1'b0, Decrypt = 1'b0;
  logic [63:0] Din = '0, Dout;

  xtea dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (1000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clocks from the current negedge until Dout changes.
  task automatic clocks_to_dout(output int n);
    logic [63:0] prev;
    prev = Dout;
    n = 0;
    while (Dout == prev && n < 200) begin
      @(negedge Clk);
      n++;
    end
  endtask

  initial begin
    int n;
    rkey_t k;
    logic [63:0] ct;

    #1 Reset_n = 1'b0;
    #11 Reset_n = 1'b1;
    @(negedge Clk);
    check("state after reset", 128'(dut.eb2.state), 128'(IDLE));

    // 1. key loading
    Loadkey = 1'b1; Din = 64'h1111_2222_3333_4444;
    @(negedge Clk);
    check("BUSY_KEY code 1", 128'(dut.eb2.state), 128'(2'd1));
    check("first key half", 128'({dut.eb2.key[0], dut.eb2.key[1]}), 128'(64'h1111_2222_3333_4444));
    Din = 64'h5555_6666_7777_8888;
    @(negedge Clk);
    Loadkey = 1'b0; Din = '0;
    check("back to IDLE code 0", 128'(dut.eb2.state), 128'(2'd0));
    check("whole key", 128'(dut.eb2.key), 128'h7777_8888_5555_6666_3333_4444_1111_2222);

    // 2. encryption of the zero block under the zero key
    Reset_n = 1'b0;
    @(negedge Clk);
    Reset_n = 1'b1;
    @(negedge Clk);
    Loadkey = 1'b1;                      // key 0 over two clocks
    @(negedge Clk);
    @(negedge Clk);
    Loadkey = 1'b0;
    Encrypt = 1'b1;
    @(negedge Clk);
    Encrypt = 1'b0;
    check("BUSY_ENC code 2", 128'(dut.eb2.state), 128'(2'd2));
    clocks_to_dout(n);
    check("Loadkey edge to Dout edge: 68 clocks", 128'(n + 3), 128'(68));
    check("zero vector ciphertext", 128'(Dout), 128'(64'hDEE9_D4D8_F713_1ED9));
    check("IDLE after encryption", 128'(dut.eb2.state), 128'(2'd0));

    // 3. decryption state transition, with the key of test 1
    k = '{32'h1111_2222, 32'h3333_4444, 32'h5555_6666, 32'h7777_8888};
    ct = ref_encipher(64'h0, k, 32);
    Loadkey = 1'b1; Din = {k[0], k[1]};
    @(negedge Clk);
    Din = {k[2], k[3]};
    @(negedge Clk);
    Loadkey = 1'b0;
    check("IDLE before Decrypt", 128'(dut.eb2.state), 128'(2'd0));
    Decrypt = 1'b1; Din = ct;
    @(negedge Clk);
    Decrypt = 1'b0; Din = '0;
    check("BUSY_DEC code 3", 128'(dut.eb2.state), 128'(2'd3));
    clocks_to_dout(n);
    check("Decrypt edge to Dout edge: 66 clocks", 128'(n + 1), 128'(66));
    check("decrypted block", 128'(Dout), 128'(64'h0));
    check("IDLE after decryption", 128'(dut.eb2.state), 128'(2'd0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

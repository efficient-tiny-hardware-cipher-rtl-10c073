// tb_xtea_round: self-checking test of the combinational XTEA half-round.
//
// Two instances are chained (first half, then second half of a cycle) and the
// pair is compared with one cycle of the textbook XTEA loop from
// xtea_ref_pkg, for encryption and decryption, on random words, sums and
// keys. Single half-rounds are also checked against the closed formulas, and
// the running sum update is checked on its own.
module tb_xtea_round;
  import xtea_pkg::*;
  import xtea_ref_pkg::*;

  int checks = 0, failures = 0;

  logic  dec;
  word_t l0, r0, s0, l1, r1, s1, l2, r2, s2;
  key_t  key;

  xtea_round u_h0 (.decrypt(dec), .second_half(1'b0), .left_in(l0), .right_in(r0),
                   .sum_in(s0), .key(key), .left_out(l1), .right_out(r1), .sum_out(s1));
  xtea_round u_h1 (.decrypt(dec), .second_half(1'b1), .left_in(l1), .right_in(r1),
                   .sum_in(s1), .key(key), .left_out(l2), .right_out(r2), .sum_out(s2));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v0, v1, s, e0, e1;
    rkey_t rk;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < 4; i++) begin
        rk[i]  = $urandom;
        key[i] = rk[i];
      end
      v0 = $urandom; v1 = $urandom; s = $urandom;
      if (n < 8) s = 32'h0 + n * 32'h0000_0800;  // exercise all sum[12:11] values
      // encryption: one textbook cycle
      dec = 1'b0; l0 = v0; r0 = v1; s0 = s;
      #1;
      e0 = v0 + (mixf(v1) ^ (s + rk[s[1:0]]));
      e1 = v1 + (mixf(e0) ^ ((s + REF_DELTA) + rk[(s + REF_DELTA) >> 11 & 3]));
      check("enc half0 left",  l1, v1);
      check("enc half0 right", r1, e0);
      check("enc half0 sum",   s1, s + REF_DELTA);
      check("enc cycle v0",    l2, e0);
      check("enc cycle v1",    r2, e1);
      check("enc cycle sum",   s2, s + REF_DELTA);
      // decryption: one textbook cycle undoes it
      dec = 1'b1; l0 = e0; r0 = e1; s0 = s + REF_DELTA;
      #1;
      check("dec half0 sum",   s1, s);
      check("dec half0 right", r1, e0);
      check("dec cycle v0",    l2, v0);
      check("dec cycle v1",    r2, v1);
      check("dec cycle sum",   s2, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_xtea_regs: self-checking test of the register block of the XTEA core,
// with the half-round logic replaced by a simple stand-in defined here
// (left' = right ^ sum, right' = left + 1, sum' = sum + 3), so that what is
// checked is the register block's own job: key capture from Din over two
// clocks, data and sum preset on Encrypt/Decrypt, feedback taken once per
// clock for exactly 2*ROUNDS clocks, the Dout write at the end, Dout held
// between operations, the decrypt and second_half outputs, and reset.
module tb_xtea_regs;
  import xtea_pkg::*;

  localparam int unsigned ROUNDS = 32;

  int checks = 0, failures = 0;

  logic Clk = 1'b0, Reset_n = 1'b1, Loadkey = 1'b0, Encrypt = 1'b0, Decrypt = 1'b0;
  logic [63:0] Din = '0, Dout;
  logic  decrypt, second_half;
  word_t left, right, sum, left_nx, right_nx, sum_nx;
  key_t  key;

  xtea_regs #(.ROUNDS(ROUNDS)) dut (.*);

  assign left_nx  = right ^ sum;
  assign right_nx = left + 32'd1;
  assign sum_nx   = sum + 32'd3;

  always #5 Clk = ~Clk;

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Start an operation from IDLE and follow it with a model of the stand-in
  // feedback; checks the registers every clock and Dout at the end.
  task automatic run_op(input logic dec, input logic [63:0] blk, input logic [63:0] old_dout);
    logic [31:0] ml, mr, ms, t;
    int clocks;
    Din = blk;
    if (dec) Decrypt = 1'b1; else Encrypt = 1'b1;
    @(negedge Clk);
    Encrypt = 1'b0; Decrypt = 1'b0; Din = {$urandom, $urandom};
    ml = blk[63:32]; mr = blk[31:0];
    ms = dec ? 32'(DELTA * ROUNDS) : 32'h0;
    check("preset left", 128'(left), 128'(ml));
    check("preset right", 128'(right), 128'(mr));
    check("preset sum", 128'(sum), 128'(ms));
    check("decrypt output", 128'(decrypt), 128'(dec));
    for (int h = 0; h < 2 * ROUNDS; h++) begin
      check("second_half", 128'(second_half), 128'(h[0]));
      check("Dout held while busy", 128'(Dout), 128'(old_dout));
      t = mr ^ ms; mr = ml + 1; ml = t; ms = ms + 3;
      @(negedge Clk);
      check("left", 128'(left), 128'(ml));
      check("right", 128'(right), 128'(mr));
      check("sum", 128'(sum), 128'(ms));
    end
    check("Dout not yet written", 128'(Dout), 128'(old_dout));
    @(negedge Clk);
    check("Dout", 128'(Dout), 128'({ml, mr}));
    check("registers hold in IDLE (left)", 128'(left), 128'(ml));
    repeat (3) @(negedge Clk);
    check("Dout held in IDLE", 128'(Dout), 128'({ml, mr}));
  endtask

  initial begin
    logic [63:0] d;
    #1 Reset_n = 1'b0;
    #1;
    check("reset Dout", 128'(Dout), 128'(0));
    check("reset key", 128'(key), 128'(0));
    #10 Reset_n = 1'b1;
    @(negedge Clk);
    // key load as in the key-load trace: 1111222233334444 then 5555666677778888
    Loadkey = 1'b1; Din = 64'h1111_2222_3333_4444;
    @(negedge Clk);
    check("K0", 128'(key[0]), 128'(32'h1111_2222));
    check("K1", 128'(key[1]), 128'(32'h3333_4444));
    check("K2 not yet", 128'(key[2]), 128'(0));
    Din = 64'h5555_6666_7777_8888;
    @(negedge Clk);
    Loadkey = 1'b0; Din = '0;
    check("K2", 128'(key[2]), 128'(32'h5555_6666));
    check("K3", 128'(key[3]), 128'(32'h7777_8888));
    check("K0 kept", 128'(key[0]), 128'(32'h1111_2222));
    @(negedge Clk);
    check("key kept in IDLE", 128'(key), 128'(128'h7777_8888_5555_6666_3333_4444_1111_2222));

    run_op(1'b0, 64'h0123_4567_89AB_CDEF, 64'h0);
    d = Dout;
    run_op(1'b1, 64'hFEDC_BA98_7654_3210, d);
    d = Dout;
    run_op(1'b0, {$urandom, $urandom}, d);
    check("key unchanged by operations", 128'(key), 128'(128'h7777_8888_5555_6666_3333_4444_1111_2222));

    Reset_n = 1'b0;
    #1 check("async reset Dout", 128'(Dout), 128'(0));
    check("async reset key", 128'(key), 128'(0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// xtea_ref_pkg: reference model of XTEA for the testbenches, written in the
// algorithm's textbook form (two words v0, v1, one loop iteration per cycle,
// no word swapping), so that it shares no structure with the hardware's
// half-round-with-swap datapath.
package xtea_ref_pkg;

  localparam logic [31:0] REF_DELTA = 32'h9E37_79B9;

  typedef logic [31:0] rkey_t [4];

  function automatic logic [31:0] mixf(input logic [31:0] x);
    return ((x << 4) ^ (x >> 5)) + x;
  endfunction

  function automatic logic [63:0] ref_encipher(input logic [63:0] blk, input rkey_t k,
                                               input int unsigned cycles);
    logic [31:0] v0, v1, s;
    v0 = blk[63:32];
    v1 = blk[31:0];
    s  = 0;
    for (int unsigned i = 0; i < cycles; i++) begin
      v0 += mixf(v1) ^ (s + k[s & 3]);
      s  += REF_DELTA;
      v1 += mixf(v0) ^ (s + k[(s >> 11) & 3]);
    end
    return {v0, v1};
  endfunction

  function automatic logic [63:0] ref_decipher(input logic [63:0] blk, input rkey_t k,
                                               input int unsigned cycles);
    logic [31:0] v0, v1, s;
    v0 = blk[63:32];
    v1 = blk[31:0];
    s  = REF_DELTA * cycles;
    for (int unsigned i = 0; i < cycles; i++) begin
      v1 -= mixf(v0) ^ (s + k[(s >> 11) & 3]);
      s  -= REF_DELTA;
      v0 -= mixf(v1) ^ (s + k[s & 3]);
    end
    return {v0, v1};
  endfunction

endpackage

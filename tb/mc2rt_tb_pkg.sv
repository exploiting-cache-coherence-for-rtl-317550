// mc2rt_tb_pkg: helpers shared by the testbenches: the initial contents of the
// simulated memory (a fixed function of the block address, so that checkers can
// compute any block without reading the memory model) and a reference decoder
// for the variable-length trace message format.
package mc2rt_tb_pkg;
  import mc2rt_pkg::*;

  function automatic logic [WORD_W-1:0] init_word(input logic [BADDR_W-1:0] baddr, input int k);
    return {baddr[19:0], 4'h0, 8'(k)} ^ 32'hA5C3_0000;
  endfunction

  function automatic logic [BLOCK_BITS-1:0] init_block(input logic [BADDR_W-1:0] baddr);
    logic [BLOCK_BITS-1:0] b;
    for (int k = 0; k < WORDS_PER_BLOCK; k++) b[k*WORD_W +: WORD_W] = init_word(baddr, k);
    return b;
  endfunction

  // number of bits the variable-length code of v takes (8 per 7-bit group, >= 8)
  function automatic int vle_bits(input logic [31:0] v);
    int n;
    n = 1;
    for (int k = 1; k < 5; k++) if ((v >> (7 * k)) != 0) n = k + 1;
    return 8 * n;
  endfunction
endpackage

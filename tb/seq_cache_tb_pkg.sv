// seq_cache_tb_pkg: helpers shared by the cache testbenches.
//
// init_word gives the contents main memory holds before anything is written
// to it, as a function of the word address, so the memory model and the
// reference models of the testbenches agree without a stored table.
package seq_cache_tb_pkg;

  function automatic logic [31:0] init_word(logic [31:0] word_addr);
    logic [31:0] x;
    x = word_addr * 32'h9E37_79B1;
    x = x ^ (x >> 15) ^ 32'h5A5A_A5A5;
    return x;
  endfunction

  function automatic logic [31:0] merge_be(logic [31:0] old, logic [31:0] nw,
                                           logic [3:0] be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

endpackage

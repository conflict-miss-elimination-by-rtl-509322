// Testbench helpers: the initial contents of the modelled L2/main memory.
//
// Every line starts with a value computed from its address, so that no
// memory array is needed: word w of line a holds a 32-bit mix of a and w.
// Stores are kept by the L2 model and by each testbench's own reference.
package tb_mem_pkg;
  import tsp_pkg::*;

  function automatic word_t init_word(line_addr_t a, int unsigned w);
    logic [31:0] x;
    x = {a, 5'(w)} * 32'h9E37_79B1;
    x = x ^ (x >> 15);
    return x * 32'h85EB_CA6B;
  endfunction

  function automatic line_t init_line(line_addr_t a);
    line_t l;
    for (int unsigned w = 0; w < WORDS_PER_LINE; w++) l[w*WORD_W +: WORD_W] = init_word(a, w);
    return l;
  endfunction
endpackage

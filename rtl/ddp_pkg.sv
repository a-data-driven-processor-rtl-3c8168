// ddp_pkg: types shared by every module of the data driven processor.
//
// Every module talks over the same cable. A cable word has a 16-bit data
// value field and a control field holding `valid` (the word is not empty),
// `complete` (the word marks a block boundary) and a 4-bit `name` that tells
// which data subset the word belongs to. A `hold` wire runs the other way:
// a word moves from source to destination in a cycle where valid=1 and
// hold=0. These field widths follow the original hardware; encoding a
// complete word with valid=1 as well is a choice of this design.
package ddp_pkg;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned NAME_W = 4;

  typedef struct packed {
    logic              valid;
    logic              cmpl;
    logic [NAME_W-1:0] name;
    logic [DATA_W-1:0] data;
  } word_t;

  localparam word_t EMPTY_WORD = '0;

  function automatic logic is_data(word_t w);
    return w.valid && !w.cmpl;
  endfunction

  function automatic logic is_cmpl(word_t w);
    return w.valid && w.cmpl;
  endfunction

  function automatic word_t mk_word(logic [NAME_W-1:0] n, logic [DATA_W-1:0] d);
    return '{valid: 1'b1, cmpl: 1'b0, name: n, data: d};
  endfunction

  function automatic word_t mk_cmpl(logic [NAME_W-1:0] n, logic [DATA_W-1:0] d);
    return '{valid: 1'b1, cmpl: 1'b1, name: n, data: d};
  endfunction

  // Plug-in patch: address bit k is taken from bit sel[k] of the source
  // field (the 20 name+data bits of one word, or 40 bits of two words).
  function automatic logic [7:0] patch8(logic [39:0] src, logic [5:0] sel [8]);
    logic [7:0] a;
    for (int k = 0; k < 8; k++) a[k] = src[sel[k]];
    return a;
  endfunction
endpackage

// memctrl_pkg -- shared types and address-decoding functions of the flexible
// memory controller.
//
// A data structure is stored in a homogeneous set of physical banks of equal
// depth. Its layout is described by a layout_t:
//   m    parallel banks (cyclic partitioning; the low address bits pick one)
//   n    serial repetitions of each parallel bank (block partitioning; the
//        high part of the address picks one)
//   d    merge factor: d narrow elements share one bank word (d = 1: none)
//   blk  words per serial block inside a bank (normally the bank depth)
//   base first physical bank used by the layout
//   dup  number of full copies of the m*n banks (data duplication); writes go
//        to every copy, a read interface names its copy through base
// m and d must be powers of two, as in the examples the controller follows;
// n and blk may be any value, because the serial block is found by comparing
// against multiples of blk instead of slicing address bits.
//
// A logical address A of an interface decomposes as
//   slice = A mod d,  word = A / d,  par = word mod m,  row = word / m,
//   ser   = largest k < n with row >= k*blk,  phys = row - ser*blk,
//   tag   = ser*m + par,  bank = base + c*m*n + tag  (c = copy, 0..dup-1).
// The tag numbering (serial index above parallel index) follows the bank tags
// printed in the address-translation examples; the function forms are this
// design's own.
package memctrl_pkg;

  typedef struct packed {
    int unsigned m;
    int unsigned n;
    int unsigned d;
    int unsigned blk;
    int unsigned base;
    int unsigned dup;
  } layout_t;

  // Builds a layout_t; convenient in parameter lists.
  function automatic layout_t mk_layout(int unsigned m, int unsigned n,
                                        int unsigned d, int unsigned blk,
                                        int unsigned base, int unsigned dup);
    layout_t l;
    l.m    = m;
    l.n    = n;
    l.d    = d;
    l.blk  = blk;
    l.base = base;
    l.dup  = dup;
    return l;
  endfunction

  // log2 of a power of two (0 for 1).
  function automatic int unsigned log2p(int unsigned v);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 32; i++)
      if ((32'd1 << i) == v) r = i;
    return r;
  endfunction

  // Result of decoding one logical address.
  typedef struct packed {
    int unsigned tag;   // ser*m + par, relative to the first bank of a copy
    int unsigned phys;  // word address inside the bank
    int unsigned slice; // element inside a merged word
  } decode_t;

  function automatic decode_t decode(layout_t l, logic [31:0] a);
    decode_t r;
    int unsigned word, row, ser, lm, ld;
    ld      = log2p(l.d);
    lm      = log2p(l.m);
    word    = a >> ld;
    r.slice = a & (l.d - 1);
    row     = word >> lm;
    ser     = 0;
    for (int unsigned k = 1; k < 64; k++)
      if (k < l.n && row >= k * l.blk) ser = k;
    r.phys = row - ser * l.blk;
    r.tag  = ser * l.m + (word & (l.m - 1));
    return r;
  endfunction

  // Tag that physical bank 'bank' carries in layout l, or -1 when the layout
  // does not use the bank. Evaluated at elaboration time only.
  function automatic int bank_tag(layout_t l, int unsigned bank);
    int unsigned span;
    span = l.m * l.n;
    if (bank < l.base || bank >= l.base + span * l.dup) return -1;
    return int'((bank - l.base) % span);
  endfunction

endpackage

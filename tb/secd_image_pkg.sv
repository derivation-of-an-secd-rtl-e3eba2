// secd_image_pkg -- builds SECD memory images for the testbenches.
//
// A small list-cell allocator over an image array: cons() takes the next
// free cell, lst() builds a proper list, finish() writes the header the
// machine expects (word 0 = first free cell, word 1 = pointer to cell 1,
// cell 1 = root list (s e c d)).  Also holds reference models used to work
// out expected results independently of the RTL (TAK).
package secd_image_pkg;
  import secd_pkg::*;

  localparam int IMG_WORDS = 32768;
  logic [15:0] img [IMG_WORDS];
  int          nxt;

  function automatic void img_reset();
    for (int k = 0; k < IMG_WORDS; k++) img[k] = '0;
    nxt = 2;   // cell 0: header words, cell 1: root list
  endfunction

  function automatic word_t cons(word_t a, word_t b);
    img[2*nxt]   = a;
    img[2*nxt+1] = b;
    nxt++;
    return mk_ptr(14'(nxt - 1));
  endfunction

  function automatic word_t lst(word_t q[$]);
    word_t r = W_NIL;
    for (int k = q.size() - 1; k >= 0; k--) r = cons(q[k], r);
    return r;
  endfunction

  function automatic word_t n(int v);  return mk_num(12'(v)); endfunction
  function automatic word_t ch(int v); return mk_char(8'(v)); endfunction
  function automatic word_t loc(int m, int k); return cons(n(m), n(k)); endfunction

  function automatic void finish(word_t s, word_t e, word_t c, word_t d);
    word_t l3, l2, l1;
    l3 = cons(d, W_NIL);
    l2 = cons(c, l3);
    l1 = cons(e, l2);
    img[2] = s;
    img[3] = l1;
    img[1] = W_PTR1;
    img[0] = mk_ptr(14'(nxt));
  endfunction

  // Program: code c run with s = e = d = nil.
  function automatic void load_prog(word_t c);
    finish(W_NIL, W_NIL, c, W_NIL);
  endfunction

  // TAK compiled by hand into SECD code (argument lists built last-first):
  //   (letrec ((tak (lambda (x y z) (if (leq x y) z
  //        (tak (tak (sub x 1) y z) (tak (sub y 1) z x) (tak (sub z 1) x y))))))
  //     (tak X Y Z))
  function automatic word_t tak_code(int x, int y, int z);
    word_t body, thn, els, mainc;
    word_t a3[$], a2[$], a1[$];
    thn = lst('{n(OP_LD), loc(0,2), n(OP_JOIN)});
    els = lst('{n(OP_LDC), W_NIL,
      n(OP_LDC), W_NIL, n(OP_LD), loc(0,1), n(OP_CONS), n(OP_LD), loc(0,0), n(OP_CONS),
      n(OP_LD), loc(0,2), n(OP_LDC), n(1), n(OP_SUB), n(OP_CONS), n(OP_LD), loc(1,0), n(OP_AP), n(OP_CONS),
      n(OP_LDC), W_NIL, n(OP_LD), loc(0,0), n(OP_CONS), n(OP_LD), loc(0,2), n(OP_CONS),
      n(OP_LD), loc(0,1), n(OP_LDC), n(1), n(OP_SUB), n(OP_CONS), n(OP_LD), loc(1,0), n(OP_AP), n(OP_CONS),
      n(OP_LDC), W_NIL, n(OP_LD), loc(0,2), n(OP_CONS), n(OP_LD), loc(0,1), n(OP_CONS),
      n(OP_LD), loc(0,0), n(OP_LDC), n(1), n(OP_SUB), n(OP_CONS), n(OP_LD), loc(1,0), n(OP_AP), n(OP_CONS),
      n(OP_LD), loc(1,0), n(OP_AP), n(OP_JOIN)});
    body = lst('{n(OP_LD), loc(0,0), n(OP_LD), loc(0,1), n(OP_LEQ), n(OP_SEL), thn, els, n(OP_RTN)});
    mainc = lst('{n(OP_LDC), W_NIL, n(OP_LDC), n(z), n(OP_CONS), n(OP_LDC), n(y), n(OP_CONS),
                  n(OP_LDC), n(x), n(OP_CONS), n(OP_LD), loc(0,0), n(OP_AP), n(OP_RTN)});
    return lst('{n(OP_DUM), n(OP_LDC), W_NIL, n(OP_LDF), body, n(OP_CONS), n(OP_LDF), mainc,
                 n(OP_RAP), n(OP_STOP)});
  endfunction

  function automatic int tak_ref(int x, int y, int z);
    if (x <= y) return z;
    return tak_ref(tak_ref(x-1, y, z), tak_ref(y-1, z, x), tak_ref(z-1, x, y));
  endfunction
endpackage

// tb_ecd_ref: reference model of the error decoder for the testbenches.
//
// Written independently of the RTL: field multiplication by alpha is a
// shift with a conditional XOR of 0x1D (x^8+x^4+x^3+x^2+1), the syndrome
// register is an array of four bytes and the shuffle is an index table.
package tb_ecd_ref;
  typedef logic [7:0] byte_t;
  typedef byte_t      syn_t[4];

  typedef struct {
    logic        stat;
    logic [7:0]  e;
    logic [5:0]  l;
    int unsigned search_steps;
  } result_t;

  function automatic byte_t mulx(input byte_t a);
    byte_t r = {a[6:0], 1'b0};
    if (a[7]) r ^= 8'h1D;
    return r;
  endfunction

  function automatic byte_t mulx_k(input byte_t a, input int k);
    byte_t r = a;
    for (int i = 0; i < k; i++) r = mulx(r);
    return r;
  endfunction

  // new byte j = old byte SRC[j]
  function automatic syn_t shuf(input syn_t s);
    const int SRC[4] = '{1, 3, 0, 2};
    syn_t r;
    for (int j = 0; j < 4; j++) r[j] = s[SRC[j]];
    return r;
  endfunction

  function automatic syn_t horner_step(input syn_t s, input byte_t x);
    syn_t r;
    for (int i = 0; i < 4; i++) r[i] = x ^ mulx_k(s[i], i);
    return r;
  endfunction

  function automatic syn_t pack32(input logic [31:0] v);
    syn_t r;
    for (int i = 0; i < 4; i++) r[i] = v[8*i +: 8];
    return r;
  endfunction

  function automatic logic [31:0] unpack32(input syn_t s);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = s[i];
    return r;
  endfunction

  function automatic result_t decode(input logic t, input byte_t sym[$],
                                     input int words_t0 = 27, input int words_t1 = 32);
    result_t res;
    syn_t    s = '{default: 8'h00};
    int      n;
    foreach (sym[k]) s = horner_step(s, sym[k]);
    res.e = s[0];
    n = (t ? words_t1 : words_t0) - 1;
    s = shuf(shuf(s));
    res.search_steps = 0;
    while (!(n < 0 || s[0] == s[1])) begin
      s = horner_step(s, 8'h00);
      n--;
      res.search_steps++;
    end
    res.stat = (n < 0);
    s = shuf(s);
    res.stat |= (s[0] == s[1]);
    s = shuf(s);
    res.stat |= (s[0] == s[1]);
    res.l = 6'(n);
    return res;
  endfunction
endpackage

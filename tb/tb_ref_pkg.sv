// tb_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. Packed words are read element by element as signed b-bit
// numbers and the results are computed with plain integer arithmetic.
package tb_ref_pkg;

  // signed b-bit element number idx of a packed word
  function automatic int elem(logic [2047:0] w, int idx, int b);
    int v;
    v = 0;
    for (int i = 0; i < b; i++) v[i] = w[idx*b + i];
    if (v[b-1]) v = v - (1 << b);
    return v;
  endfunction

  // dot product of two packed words of nbits bits at b bits per element
  function automatic int dot(logic [2047:0] f, logic [2047:0] k, int nbits, int b);
    int s;
    s = 0;
    for (int e = 0; e < nbits / b; e++) s += elem(f, e, b) * elem(k, e, b);
    return s;
  endfunction

  // ReLU, divide by 2^shift rounding half up, clamp to signed b bits
  function automatic int requant(longint acc, bit relu, int shift, int b);
    longint x, lo, hi;
    x = acc;
    if (relu && x < 0) x = 0;
    if (shift > 0) x = (x + (longint'(1) << (shift - 1))) >>> shift;
    hi = (longint'(1) << (b - 1)) - 1;
    lo = -hi - 1;
    if (x > hi) x = hi;
    if (x < lo) x = lo;
    return int'(x);
  endfunction

  function automatic int bits_of(int p);
    return (p == 1) ? 4 : (p == 2) ? 2 : 8;
  endfunction

  // One accelerator run as the testbenches describe it. Word indices are
  // DRAM word numbers relative to the start of the memory model.
  typedef struct {
    int op;        // 0 conv, 1 pool
    int prec;      // 0: 8 bit, 1: 4 bit, 2: 2 bit
    int relu, shift;
    int t;         // PE array size T_IN = T_OUT
    int h, w;      // full input tensor size
    int in_row0, in_rows, groups;
    int out_w, out_rows, out_row0;
    int k, s, pad;
    int in_word, w_word, out_word;
  } run_t;

  // Number of output words a run writes.
  function automatic int out_words(run_t r);
    int npix, l;
    npix = r.out_rows * r.out_w;
    l = 8 / bits_of(r.prec);
    return (r.op == 1) ? npix * r.groups : (npix + l - 1) / l;
  endfunction

  // Expected output words of a run, computed from a snapshot of DRAM.
  // Input word of group g, row y, column x: in_word + g*h*w + y*w + x
  // (in_word points at row 0 of the full tensor). Weight word of
  // (g, ky, kx, output channel o): w_word + ((g*k + ky)*k + kx)*t + o.
  function automatic void expect_run(run_t r, ref logic [255:0] m [], ref logic [255:0] exp [$]);
    int b, l, dw;
    b  = bits_of(r.prec);
    l  = 8 / b;
    dw = r.t * 8;
    exp.delete();
    if (r.op == 0) begin
      logic [255:0] word;
      int p;
      p = 0;
      word = '0;
      for (int oy = 0; oy < r.out_rows; oy++)
        for (int ox = 0; ox < r.out_w; ox++) begin
          for (int o = 0; o < r.t; o++) begin
            longint acc;
            int q;
            acc = 0;
            for (int g = 0; g < r.groups; g++)
              for (int ky = 0; ky < r.k; ky++)
                for (int kx = 0; kx < r.k; kx++) begin
                  int iy, ix;
                  iy = (r.out_row0 + oy) * r.s + ky - r.pad;
                  ix = ox * r.s + kx - r.pad;
                  if (iy >= 0 && iy < r.h && ix >= 0 && ix < r.w)
                    acc += dot(2048'(m[r.in_word + g*r.h*r.w + iy*r.w + ix]),
                               2048'(m[r.w_word + ((g*r.k + ky)*r.k + kx)*r.t + o]), dw, b);
                end
            q = requant(acc, r.relu != 0, r.shift, b);
            for (int i = 0; i < b; i++) word[(p % l) * r.t * b + o * b + i] = q[i];
          end
          if ((p % l) == l - 1 || (oy == r.out_rows - 1 && ox == r.out_w - 1)) begin
            exp.push_back(word);
            word = '0;
          end
          p++;
        end
    end else begin
      for (int g = 0; g < r.groups; g++)
        for (int oy = 0; oy < r.out_rows; oy++)
          for (int ox = 0; ox < r.out_w; ox++) begin
            logic [255:0] word;
            word = '0;
            for (int e = 0; e < dw / b; e++) begin
              int mx, v;
              mx = -1000;
              for (int ky = 0; ky < r.k; ky++)
                for (int kx = 0; kx < r.k; kx++) begin
                  v = elem(2048'(m[r.in_word + g*r.h*r.w + ((r.out_row0 + oy)*r.s + ky)*r.w + ox*r.s + kx]), e, b);
                  if (v > mx) mx = v;
                end
              for (int i = 0; i < b; i++) word[e*b + i] = mx[i];
            end
            exp.push_back(word);
          end
    end
  endfunction

endpackage

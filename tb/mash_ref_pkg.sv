// Reference models used by the testbenches.
//
// mash_ref models a conventional MASH 1-1-...-1 of order L (3 by default)
// on whole words (no slicing): L m-bit accumulators whose registered carries
// are the stage outputs, the dither added at the LSB of stage 2, and the
// output formed from the expanded binomial form of
// Y = sum_j z^-(L-j) (1-z^-1)^(j-1) Y_j over a history of stage outputs (for
// L = 3: Y = z^-2 Y1 + z^-1(1-z^-1) Y2 + (1-z^-1)^2 Y3). step() models one
// rising clock edge; y() is the output between edges.
//
// prbs_ref produces the bit stream of a Fibonacci LFSR from the recurrence
// b[n] = b[n-W+t1] ^ b[n-W+t2] ... on its own output bits.
package mash_ref_pkg;

  class mash_ref;
    int unsigned     m;            // word width
    int unsigned     order;        // number of first-order stages L
    longint unsigned mask;
    longint unsigned a [8];        // accumulator states (errors), stage 1..L at 0..L-1
    bit              c [8];        // registered carries (stage outputs)
    bit              h [8][8];     // h[j][i] = output of stage j, i clocks ago
    // bc[b]: carries out of the low b bits of any stage sum (coverage)
    int unsigned     bc [64];

    function new(int unsigned m_bits, int unsigned l = 3);
      m     = m_bits;
      order = l;
      mask  = (64'd1 << m_bits) - 1;
      reset();
    endfunction

    function void reset();
      foreach (a[j]) begin a[j] = 0; c[j] = 0; end
      foreach (h[j, i]) h[j][i] = 0;
      foreach (bc[b]) bc[b] = 0;
    endfunction

    function int binom(int n, int k);
      int r;
      r = 1;
      for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
      return r;
    endfunction

    // y[n] = sum_j sum_i (-1)^i C(j-1, i) y_j[n - (L-j) - i], stages j = 1..L,
    // the expanded form of Y = sum_j z^-(L-j) (1 - z^-1)^(j-1) Y_j.
    function int y();
      int r, sgn;
      r = 0;
      for (int j = 1; j <= int'(order); j++)
        for (int i = 0; i < j; i++) begin
          sgn = (i % 2 == 0) ? 1 : -1;
          r += sgn * binom(j - 1, i) * int'(h[j-1][int'(order) - j + i]);
        end
      return r;
    endfunction

    function bit cy(int j);
      return c[j];
    endfunction

    // One rising clock edge with input x and dither bit d (into stage 2).
    function void step(longint unsigned x, bit d);
      longint unsigned s [8];
      longint unsigned lo, din;
      for (int j = 0; j < int'(order); j++) begin
        din  = (j == 0) ? (x & mask) : a[j-1];
        s[j] = din + a[j] + ((j == 1) ? longint'(d) : 0);
        for (int b = 1; b < int'(m); b++) begin
          lo = (64'd1 << b) - 1;
          if (((din & lo) + (a[j] & lo) + ((j == 1) ? longint'(d) : 0)) >> b != 0) bc[b]++;
        end
      end
      for (int j = 0; j < int'(order); j++) begin
        for (int i = 7; i > 0; i--) h[j][i] = h[j][i-1];
        c[j] = bit'(s[j] >> m);
        a[j] = s[j] & mask;
        h[j][0] = c[j];
      end
    endfunction
  endclass

  class prbs_ref;
    int unsigned w;
    bit          hist[$];     // output history, newest last
    int unsigned tap_list[$];

    // seed_bits: initial register contents, bit i = stage i+1.
    function new(int unsigned width, int unsigned taps[$], longint unsigned seed);
      w = width;
      tap_list = taps;
      // The register holds the last w bits shifted in; stage w is the oldest.
      for (int i = int'(w) - 1; i >= 0; i--) hist.push_back(bit'(seed >> i));
    endfunction

    // Bit currently at the register's last stage (the output).
    function bit out();
      int idx;
      idx = hist.size() - int'(w);
      return hist[idx];
    endfunction

    function void step();
      bit fb;
      int idx;
      fb = 0;
      foreach (tap_list[i]) begin
        idx = hist.size() - int'(tap_list[i]);
        fb ^= hist[idx];
      end
      hist.push_back(fb);
      if (hist.size() > 64) void'(hist.pop_front());
    endfunction
  endclass

endpackage

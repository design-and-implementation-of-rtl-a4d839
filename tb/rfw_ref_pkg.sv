// rfw_ref_pkg: arithmetic reference models for the testbenches.
//
// The models do not build partial-product arrays column by column as the RTL
// does. They start from the exact integer product of the operands involved,
// subtract the value of the partial-product bits that fall below column n
// (the truncated part, including the Booth neg bits), divide by 2^n, and add
// the adaptive compensation floor((Emain + theta + K) / 2), where Emain and
// theta are the numbers of one bits in columns n-1 and n-2 and K = (theta == 0).
// Full-precision modes are checked against the plain product.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
package rfw_ref_pkg;

  function automatic longint sx(input longint v, input int w);
    longint m;
    m = (longint'(1) << w) - 1;
    v = v & m;
    return (v >>> (w - 1)) & 1 ? v - (longint'(1) << w) : v;
  endfunction

  function automatic longint bits(input longint v, input int lo, input int w);
    return (v >> lo) & ((longint'(1) << w) - 1);
  endfunction

  function automatic longint bit1(input longint v, input int k);
    return (v >> k) & 1;
  endfunction

  // Booth digit of row i from the bit vector yv where bit 0 is y[-1].
  function automatic int bdigit(input longint yv, input int i);
    return int'(bit1(yv, 2*i)) + int'(bit1(yv, 2*i+1)) - 2*int'(bit1(yv, 2*i+2));
  endfunction

  // Fixed-width value of Booth rows [r0, r1) with digits from yv (bit 0 = y[-1])
  // and signed multiplicand m of width wm, rows at column 2i.
  function automatic longint booth_fw(input int n, input longint yv, input int r0, input int r1,
                                      input longint m, input int wm);
    longint v, l, row, mag;
    int     e, th, d, c;
    v = 0; l = 0; e = 0; th = 0;
    for (int i = r0; i < r1; i++) begin
      d   = bdigit(yv, i);
      v  += longint'(d) * m * (longint'(1) << (2*i));
      mag = (d < 0 ? -d : d) * m;
      row = (d < 0) ? ~mag : mag;
      if (d < 0) l += longint'(1) << (2*i);           // neg bit
      for (int j = 0; j < wm; j++) begin
        c = 2*i + j;
        if (c < n) l += bit1(row, j) << c;
        if (c == n-1) e  += int'(bit1(row, j));
        if (c == n-2) th += int'(bit1(row, j));
      end
    end
    return ((v - l) >>> n) + longint'((e + th + (th == 0 ? 1 : 0)) / 2);
  endfunction

  function automatic longint booth_ref(input int n, input int op, input longint x, input longint y);
    longint xs, x0s, x1s, y1s, p1, p2, yv;
    int h;
    h   = n / 2;
    xs  = sx(x, n);
    x0s = sx(x, h);
    x1s = sx(x >> h, h);
    y1s = sx(y >> h, h);
    case (op)
      0: begin
        yv = bits(y, 0, n) << 1;
        return bits(booth_fw(n, yv, 0, n/2, xs, n), 0, n);
      end
      3, 1: begin
        yv = bits(y, 0, h) << 1;                      // Y0 with y[-1] = 0
        p1 = bits(booth_fw(n, yv, 0, n/4, xs, n), 0, h);
        yv = (bits(y, h, h) << (h + 1));              // Y1 with y[n/2-1] = 0
        p2 = bits(booth_fw(n, yv, n/4, n/2, x0s, h), 0, h);
        if (op == 1) return (p2 << h) | p1;
        return bits(sx(p1, h) + sx(p2, h), 0, n);
      end
      default: return bits(x1s * y1s, 0, n);
    endcase
  endfunction

  // Baugh-Wooley fixed width of the signed product a*b placed at column off,
  // a on x bits [ax, ax+wa), b on y bits [by, by+wb) of the n x n array.
  function automatic longint bw_fw(input int n, input longint x, input longint y,
                                   input int ax, input int wa, input int by, input int wb);
    longint v, l, b;
    int e, th, c;
    v = sx(x >> ax, wa) * sx(y >> by, wb) * (longint'(1) << (ax + by));
    l = 0; e = 0; th = 0;
    for (int i = ax; i < ax + wa; i++)
      for (int j = by; j < by + wb; j++) begin
        b = bit1(x, i) & bit1(y, j);
        if ((i == ax + wa - 1) != (j == by + wb - 1)) b = b ^ 1;
        c = i + j;
        if (c < n) l += b << c;
        if (c == n-1) e  += int'(b);
        if (c == n-2) th += int'(b);
      end
    return ((v - l) >>> n) + longint'((e + th + (th == 0 ? 1 : 0)) / 2);
  endfunction

  function automatic longint bw_ref(input int n, input int op, input longint x, input longint y);
    int h, q;
    longint p1, p2;
    h = n / 2; q = n / 4;
    case (op)
      0: return bits(bw_fw(n, x, y, 0, n, 0, n), 0, n);
      1: begin
        p1 = bits(bw_fw(n, x, y, h, h, 0, h), 0, h);
        p2 = bits(bw_fw(n, x, y, 0, h, h, h), 0, h);
        return (p2 << h) | p1;
      end
      2: return bits(sx(x >> h, h) * sx(y >> h, h), 0, n);
      default: begin
        p1 = bits(sx(x >> h, q) * sx(y >> h, q), 0, h);
        p2 = bits(sx(x >> (h + q), q) * sx(y >> (h + q), q), 0, h);
        return (p2 << h) | p1;
      end
    endcase
  endfunction

endpackage

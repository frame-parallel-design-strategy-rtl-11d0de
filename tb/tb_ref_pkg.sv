// tb_ref_pkg: reference models shared by the testbenches.
//
// Written independently of the RTL: a pseudo-random reference picture with
// edge clamping, the H.264 half-pel interpolation written straight from its
// definition, a matrix-form 4x4 Hadamard SATD, and the se(v) bit count.
package tb_ref_pkg;

  localparam int FRAME_W = 1280;   // 720p luma
  localparam int FRAME_H = 720;

  // integer pixel of reference picture r, coordinates clamped into the frame
  function automatic int pel(input int r, input int x, input int y);
    int xc, yc;
    int unsigned h;
    xc = (x < 0) ? 0 : (x >= FRAME_W) ? FRAME_W - 1 : x;
    yc = (y < 0) ? 0 : (y >= FRAME_H) ? FRAME_H - 1 : y;
    h  = 32'(xc) * 32'd73856093 ^ 32'(yc) * 32'd19349663 ^ 32'(r + 1) * 32'd83492791;
    h  = h ^ (h >> 13);
    h  = h * 32'd1274126177;
    h  = h ^ (h >> 16);
    return int'(h & 32'hFF);
  endfunction

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // sample at half-pel position (hx, hy) (half-pel units) of reference r
  function automatic int halfpel(input int r, input int hx, input int hy);
    int x, y, fx, fy, t [6], acc;
    int k [6] = '{1, -5, 20, 20, -5, 1};
    x  = hx >>> 1; y = hy >>> 1; fx = hx & 1; fy = hy & 1;
    if (!fx && !fy) return pel(r, x, y);
    if (fx && !fy) begin
      acc = 0;
      for (int i = 0; i < 6; i++) acc += k[i] * pel(r, x - 2 + i, y);
      return clip((acc + 16) >>> 5);
    end
    if (!fx && fy) begin
      acc = 0;
      for (int i = 0; i < 6; i++) acc += k[i] * pel(r, x, y - 2 + i);
      return clip((acc + 16) >>> 5);
    end
    for (int j = 0; j < 6; j++) begin
      t[j] = 0;
      for (int i = 0; i < 6; i++) t[j] += k[i] * pel(r, x - 2 + i, y - 2 + j);
    end
    acc = 0;
    for (int j = 0; j < 6; j++) acc += k[j] * t[j];
    return clip((acc + 512) >>> 10);
  endfunction

  // SATD of a 4x4 residual block, H * D * H' with the 4x4 Hadamard matrix
  function automatic int satd4(input int d [4][4]);
    int hm [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int t [4][4];
    int s;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += hm[i][k] * d[k][j];
      end
    s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int u;
        u = 0;
        for (int k = 0; k < 4; k++) u += t[i][k] * hm[j][k];
        s += (u < 0) ? -u : u;
      end
    return (s + 1) / 2;
  endfunction

  // bits of the signed Exp-Golomb code se(v)
  function automatic int se_bits(input int v);
    int k, n;
    k = (v > 0) ? 2 * v - 1 : -2 * v;
    n = 0;
    while ((k + 1) >> (n + 1) != 0) n++;
    return 2 * n + 1;
  endfunction

endpackage

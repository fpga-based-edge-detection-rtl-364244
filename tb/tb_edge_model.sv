// tb_edge_model: reference model of the edge pipeline for the testbenches.
//
// Works on the 1-D pixel stream exactly as the hardware sees it: frames of
// HRES*VRES pixels, each followed by the flush steps as zero pixels. A window
// around stream position c takes positions c + (r-1)*HRES + (k-1), so windows
// wrap across line ends like the hardware's. A result is "defined" only when
// every stream position it depends on exists (is not before the stream's
// start); the testbenches compare defined results only.
package tb_edge_model;

  function automatic int floor_div8(int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction

  function automatic int isqrt(int v);
    int s = 0;
    while ((s + 1) * (s + 1) <= v) s++;
    return s;
  endfunction

  // Sobel on a stream; out[c] is defined when in is defined on c's window.
  function automatic void sobel_stream(int hres, ref int in_v[], ref bit in_ok[],
                                       output int ox[], output int oy[], output bit ok[]);
    int n = in_v.size();
    int w[3][3];
    bit good;
    ox = new[n]; oy = new[n]; ok = new[n];
    for (int c = 0; c < n; c++) begin
      good = 1;
      for (int r = 0; r < 3; r++)
        for (int k = 0; k < 3; k++) begin
          int p = c + (r - 1) * hres + (k - 1);
          if (p < 0 || p >= n) good = 0;
          else begin
            if (!in_ok[p]) good = 0;
            w[r][k] = in_v[p];
          end
        end
      ok[c] = good;
      if (good) begin
        ox[c] = floor_div8((w[0][2] - w[0][0]) + 2 * (w[1][2] - w[1][0]) + (w[2][2] - w[2][0]));
        oy[c] = floor_div8((w[2][0] - w[0][0]) + 2 * (w[2][1] - w[0][1]) + (w[2][2] - w[0][2]));
      end else begin
        ox[c] = 0; oy[c] = 0;
      end
    end
  endfunction

  // R = (dxx dx^2 + 2 dxy dx dy + dyy dy^2) / (dx^2 + dy^2), truncated; 0 if dx = dy = 0
  function automatic int second_deriv(int dx, int dy, int dxx, int dxy, int dyy);
    longint p = longint'(dxx) * dx * dx + 2 * longint'(dxy) * dx * dy + longint'(dyy) * dy * dy;
    longint q = longint'(dx) * dx + longint'(dy) * dy;
    if (q == 0) return 0;
    return int'(p / q);
  endfunction

  // Full model: pixel stream -> dx, dy, R, gradient (each with a defined flag).
  function automatic void run(int hres, ref int pix[],
                              output int dx[], output int dy[], output bit d_ok[],
                              output int r[], output int g[], output bit r_ok[]);
    int n = pix.size();
    bit all_ok[];
    int dxx[], dxy_a[], dyy[], tmp[];
    bit ok_x[], ok_y[];
    all_ok = new[n];
    foreach (all_ok[i]) all_ok[i] = 1;
    sobel_stream(hres, pix, all_ok, dx, dy, d_ok);
    sobel_stream(hres, dx, d_ok, dxx, dxy_a, ok_x);
    sobel_stream(hres, dy, d_ok, tmp, dyy, ok_y);
    r = new[n]; g = new[n]; r_ok = new[n];
    for (int c = 0; c < n; c++) begin
      r_ok[c] = ok_x[c] && ok_y[c];
      r[c] = r_ok[c] ? second_deriv(dx[c], dy[c], dxx[c], dxy_a[c], dyy[c]) : 0;
      g[c] = d_ok[c] ? isqrt(dx[c] * dx[c] + dy[c] * dy[c]) : 0;
    end
  endfunction

endpackage

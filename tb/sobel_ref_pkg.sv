// Reference model used by the testbenches: integer arithmetic written
// straight from the definitions, independent of the RTL structure.
//   luma        Y = round(0.299 R + 0.587 G + 0.114 B) with 8-bit weights 77/150/29
//   sobel_at    Gh, Gv of the pixel (r, c) of a w x h grey image, zero outside
//   is_edge     sqrt((Gh/8)^2 + (Gv/8)^2) > th, done in real arithmetic
//   out_level   grey level chosen by the output control rule
package sobel_ref_pkg;

  function automatic int luma(input int r, input int g, input int b);
    return (77 * r + 150 * g + 29 * b + 128) / 256;
  endfunction

  function automatic int px(ref int img[], input int w, input int h, input int r, input int c);
    if (r < 0 || c < 0 || r >= h || c >= w) return 0;
    return img[r * w + c];
  endfunction

  function automatic void sobel_at(ref int img[], input int w, input int h, input int r, input int c,
                                   output int gh, output int gv);
    int k [3][3];
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        k[dr + 1][dc + 1] = px(img, w, h, r + dr, c + dc);
    gh = 0; gv = 0;
    // Gh mask rows (1 0 -1)(2 0 -2)(1 0 -1); Gv mask rows (1 2 1)(0 0 0)(-1 -2 -1)
    for (int i = 0; i < 3; i++) begin
      int wgt;
      wgt = (i == 1) ? 2 : 1;
      gh += wgt * (k[i][0] - k[i][2]);
      gv += wgt * (k[0][i] - k[2][i]);
    end
  endfunction

  function automatic bit is_edge(input int gh, input int gv, input int th);
    real m;
    m = $sqrt((real'(gh) / 8.0) ** 2 + (real'(gv) / 8.0) ** 2);
    return m > real'(th);
  endfunction

  function automatic int out_level(input bit edge_px, input int gh, input int gv,
                                   input bit bg_white, input bit show_grad);
    int a;
    if (!edge_px) return bg_white ? 255 : 0;
    if (show_grad) begin
      a = (gh < 0 ? -gh : gh) + (gv < 0 ? -gv : gv);
      return a / 8;
    end
    return bg_white ? 0 : 255;
  endfunction

endpackage

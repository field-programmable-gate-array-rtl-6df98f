// sobel_ref_pkg: reference model of the binary Sobel edge image, used by the
// testbenches. Works on an image held as a flat int array in raster order.
// Border pixels are background; elsewhere the pixel is an edge (255) when
// |Gx| + |Gy| >= thresh, with Gx = left column minus right column and
// Gy = top row minus bottom row, both weighted 1-2-1.
package sobel_ref_pkg;
  function automatic int ref_gx(const ref int img[], input int w, input int r, input int c);
    return (img[(r-1)*w+c-1] + 2*img[r*w+c-1] + img[(r+1)*w+c-1])
         - (img[(r-1)*w+c+1] + 2*img[r*w+c+1] + img[(r+1)*w+c+1]);
  endfunction

  function automatic int ref_gy(const ref int img[], input int w, input int r, input int c);
    return (img[(r-1)*w+c-1] + 2*img[(r-1)*w+c] + img[(r-1)*w+c+1])
         - (img[(r+1)*w+c-1] + 2*img[(r+1)*w+c] + img[(r+1)*w+c+1]);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int ref_edge(const ref int img[], input int w, input int h,
                                  input int r, input int c, input int thresh);
    if (r == 0 || r == h-1 || c == 0 || c == w-1) return 0;
    return (iabs(ref_gx(img, w, r, c)) + iabs(ref_gy(img, w, r, c)) >= thresh) ? 255 : 0;
  endfunction

  // Test image: flat blocks of a few grey levels (edges between them) with a
  // little noise (so that flat areas stay below the threshold).
  function automatic void make_image(ref int img[], input int w, input int h, input int seed);
    int unsigned s;
    s = seed;
    img = new[w*h];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int base;
        s = s * 1103515245 + 12345;
        base = (((r / 5) + (c / 7) + seed) % 4) * 60;
        if (((r - h/2) * (r - h/2) + (c - w/2) * (c - w/2)) < (w*w)/16) base = 230;
        img[r*w+c] = base + int'((s >> 16) % 8);
      end
  endfunction
endpackage

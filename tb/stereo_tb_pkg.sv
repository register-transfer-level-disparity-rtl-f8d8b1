// stereo_tb_pkg: helpers shared by the testbenches: the synthetic test
// texture and reference models worked out independently of the RTL.
package stereo_tb_pkg;

  // Pseudo-random texture level 0..12 for scene point (x, y); defined for
  // any x and y so that shifted views can be generated.
  function automatic int unsigned tex(input int x, input int y);
    int unsigned h;
    h = int'(x) * 32'd73856093 ^ int'(y) * 32'd19349663 ^ 32'h5bd1e995;
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    h = h ^ (h >> 15);
    return h % 13;
  endfunction

  // Clocks the disparity generator needs for one frame:
  // two set-up cycles per row, one load cycle per pixel, one cycle per
  // border pixel and min(max_disp, x-h+1) candidate cycles per inner pixel.
  function automatic longint unsigned disp_cycles(input int w, input int hgt,
                                                  input int win, input int max_disp);
    longint unsigned n;
    int h;
    h = (win - 1) / 2;
    n = 2 * hgt + w * hgt;
    for (int y = 0; y < hgt; y++)
      for (int x = 0; x < w; x++)
        if (y >= h && y < hgt - h && x >= h && x < w - h)
          n += longint'((x - h + 1 < max_disp) ? x - h + 1 : max_disp);
        else
          n += 1;
    return n;
  endfunction

endpackage

// tb_edge_ref_pkg: reference arithmetic for the edge detection testbenches.
//
// ref_pixel computes one output pixel straight from the definition, with
// plain integers: for each mask the sum of coefficient*pixel over the 3x3
// window, reduced to a 16-bit two's complement value, its absolute value, the
// sum of both absolute values, times scale, then 0 below the threshold and
// 255 above 255. It shares no code with the RTL.
package tb_edge_ref_pkg;

  // win[k], k = 3*row + column; mask entries are signed bytes.
  function automatic int ref_branch(input byte unsigned win[9], input byte mask[9]);
    int acc = 0;
    for (int k = 0; k < 9; k++) acc += int'(win[k]) * int'(mask[k]);
    acc = int'(shortint'(acc));          // 16-bit two's complement
    return (acc < 0) ? -acc : acc;
  endfunction

  function automatic int ref_pixel(input byte unsigned win[9], input byte ma[9],
                                   input byte mb[9], input int scale, input int thr);
    longint v;
    v = longint'(ref_branch(win, ma) + ref_branch(win, mb)) * longint'(scale);
    if (v < longint'(thr)) return 0;
    if (v > 255) return 255;
    return int'(v);
  endfunction

  // The Sobel pair used by default in the tests.
  function automatic void sobel(output byte ma[9], output byte mb[9]);
    ma = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
    mb = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  endfunction

endpackage

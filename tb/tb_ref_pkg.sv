// tb_ref_pkg: reference arithmetic for the Hough engine testbenches.
//
// trig127 returns round(127*cos(deg)) or round(127*sin(deg)) computed with
// real arithmetic, halves rounded away from zero (a tiny bias absorbs the
// floating-point error of values such as cos 60 = 0.5). Angles above 180
// return 0, the content of the unused table words. pix_x/pix_y give the
// six edge pixels of the 6x6 test image: a line x + y = 4 of four pixels
// plus (3,4) and (5,5).
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int trig127(input int deg, input bit is_sin);
    real v, a;
    if (deg > 180) return 0;
    v = is_sin ? $sin(deg * PI / 180.0) : $cos(deg * PI / 180.0);
    v = v * 127.0;
    a = (v < 0.0) ? -v : v;
    a = $floor(a + 0.5 + 1.0e-9);
    return (v < 0.0) ? -int'(a) : int'(a);
  endfunction

  function automatic int pix_x(input int i);
    int xs [6] = '{1, 2, 3, 4, 3, 5};
    return (i < 6) ? xs[i] : 0;
  endfunction

  function automatic int pix_y(input int i);
    int ys [6] = '{3, 2, 1, 0, 4, 5};
    return (i < 6) ? ys[i] : 0;
  endfunction

endpackage

// Testbench helper package: reference model of the Polygon edge walker.
// For the edge (x1, y1) -> (x2, y2) the scan-line points are, for
// i = 0..|y2-y1| and s = +1 (y2 >= y1) or -1,
//   q = trunc((x2-x1) * 2^16 / (y2-y1))   (0 when y2 = y1)
//   y_i = y1 + s*i,   x_i = floor((x1*2^16 + s*i*q) / 2^16).
package tb_poly_ref;
  localparam int FRAC = 16;

  function automatic longint slope(longint x1, longint y1, longint x2, longint y2);
    if (y2 == y1) return 0;
    return ((x2 - x1) * (longint'(1) <<< FRAC)) / (y2 - y1);
  endfunction

  // Appends the expected points of one edge to xs / ys.
  function automatic void edge_points(input int x1, input int y1, input int x2, input int y2,
                                      ref int xs[$], ref int ys[$]);
    longint q = slope(x1, y1, x2, y2);
    int     s = (y2 >= y1) ? 1 : -1;
    int     n = (y2 >= y1) ? (y2 - y1) : (y1 - y2);
    for (int i = 0; i <= n; i++) begin
      xs.push_back(int'(((longint'(x1) <<< FRAC) + longint'(s * i) * q) >>> FRAC));
      ys.push_back(y1 + s * i);
    end
  endfunction

  // True when x lies at most one unit from of the exact intersection of the edge
  // with scan line y (an accuracy check independent of the fixed-point form).
  function automatic bit near_edge(int x1, int y1, int x2, int y2, int x, int y);
    real ex, tol;
    if (y2 == y1) return x == x1;
    ex  = x1 + real'(x2 - x1) * real'(y - y1) / real'(y2 - y1);
    tol = 1.0 + real'((y >= y1) ? (y - y1) : (y1 - y)) / 65536.0;
    return (real'(x) >= ex - tol) && (real'(x) <= ex + tol);
  endfunction
endpackage

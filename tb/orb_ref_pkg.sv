// orb_ref_pkg: reference model functions shared by the testbenches.
//
// ref_desc computes the rotated BRIEF descriptor of a 45 x 45 patch (logical
// layout, centre at row and column 22) for orientation o: cos and sin are
// rounded from $cos/$sin in Q7, each pattern point is rotated as
// floor((x*cos - y*sin + 64) / 128), floor((x*sin + y*cos + 64) / 128), and
// bit i is 1 when the first point of pair i is darker than the second.
package orb_ref_pkg;
  import orb_pkg::*;

  function automatic int fdiv128(input int v);
    return (v >= 0) ? v / 128 : -((-v + 127) / 128);
  endfunction

  function automatic logic [NPAIRS-1:0] ref_desc(input byte unsigned patch [45][45], input int o);
    logic [NPAIRS-1:0] d;
    int c, s;
    real th;
    th = o * 3.14159265358979 / 8.0;
    c = int'($floor(128.0 * $cos(th) + 0.5));
    s = int'($floor(128.0 * $sin(th) + 0.5));
    for (int i = 0; i < int'(NPAIRS); i++) begin
      int p [2];
      for (int k = 0; k < 2; k++) begin
        int x, y, xr, yr;
        x = pat_coord(i, 2 * k);
        y = pat_coord(i, 2 * k + 1);
        xr = fdiv128(x * c - y * s + 64);
        yr = fdiv128(x * s + y * c + 64);
        p[k] = patch[22 + yr][22 + xr];
      end
      d[i] = p[0] < p[1];
    end
    return d;
  endfunction
endpackage

// speedo_tb_pkg: reference models shared by the speedometer testbenches.
//
// ref_speed evaluates V = C * N / T * 3.6 in floating point for a wheel
// circumference of 0.079861 m and a 0.5 s window, rounds to nearest and
// limits to 255. ref_seg gives the active-low {G,F,E,D,C,B,A} code of a
// decimal digit from its list of lit segments.
package speedo_tb_pkg;

  function automatic int ref_speed(int n);
    real v = real'(n) * 0.079861 * 3.6 / 0.5;
    int  r = $rtoi(v + 0.5);
    return (r > 255) ? 255 : r;
  endfunction

  function automatic logic [6:0] ref_seg(int d);
    string lit [10] = '{"ABCDEF", "BC", "ABDEG", "ABCDG", "BCFG",
                        "ACDFG", "ACDEFG", "ABC", "ABCDEFG", "ABCDFG"};
    logic [6:0] e = '1;
    for (int i = 0; i < lit[d].len(); i++) e[3'(lit[d][i] - "A")] = 1'b0;
    return e;
  endfunction

endpackage

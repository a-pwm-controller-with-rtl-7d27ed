// tb_ref_pkg - reference model shared by the testbenches.
//
// Computes the compensator's arithmetic independently of the RTL tables: the
// PID sum e'(n) = 12.5 e(n) - 23.5 e(n-1) + 11.5 e(n-2) in floating point,
// rounded half away from zero, the list of values reachable from
// consecutive EPU states (each step at most one), and the code of a value as
// its position in that ascending list.
package tb_ref_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam real A = 12.5;
  localparam real B = -23.5;
  localparam real C = 11.5;

  function automatic int ref_eprime(int en, int en1, int en2);
    real x;
    x = A*en + B*en1 + C*en2;
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  function automatic bit ref_reachable(int en, int en1, int en2);
    if (en > 4 || en < -4 || en1 > 4 || en1 < -4 || en2 > 4 || en2 < -4) return 0;
    if (en - en1 > 1 || en1 - en > 1 || en1 - en2 > 1 || en2 - en1 > 1) return 0;
    return 1;
  endfunction

  // Ascending list of reachable rounded values (filled by build_list).
  int vals[$];

  function automatic void build_list();
    bit seen [int];
    vals.delete();
    for (int a = -4; a <= 4; a++)
      for (int b = -4; b <= 4; b++)
        for (int c = -4; c <= 4; c++)
          if (ref_reachable(a, b, c)) seen[ref_eprime(a, b, c)] = 1;
    for (int v = -200; v <= 200; v++)
      if (seen.exists(v)) vals.push_back(v);
  endfunction

  function automatic int ref_code(int v);
    foreach (vals[i]) if (vals[i] == v) return i;
    return -1;
  endfunction

  function automatic int ref_value(int code);
    return (code < vals.size()) ? vals[code] : 0;
  endfunction

  function automatic int ref_clamp(int d);
    return d < 1 ? 1 : (d > 254 ? 254 : d);
  endfunction

  function automatic int count_triples();
    int n = 0;
    for (int a = -4; a <= 4; a++)
      for (int b = -4; b <= 4; b++)
        for (int c = -4; c <= 4; c++)
          if (ref_reachable(a, b, c)) n++;
    return n;
  endfunction
endpackage

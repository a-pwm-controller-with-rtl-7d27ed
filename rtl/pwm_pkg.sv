// pwm_pkg - shared types, constants and table-generation functions of the
// digital buck regulator controller.
//
// The controller closes the loop once per 1 MHz switching period. The error
// process unit (EPU) turns a 2-bit comparator code into a small signed error
// state e(n) in -4..+4. A PID law
//     d(n) = d(n-1) + a*e(n) + b*e(n-1) + c*e(n-2)
// is then evaluated purely by table look-up in two accesses:
//     Memory-A : {e(n), e(n-1), e(n-2)} -> code of e'(n) = a*e(n)+b*e(n-1)+c*e(n-2)
//     Memory-B : {code, d(n-1)}         -> d(n) = d(n-1) + e'(n), kept in 1..254
// The coefficients a = 12.5, b = -23.5, c = 11.5, the 4-bit error register,
// the 8-bit duty word and its 1..254 range follow the published design. The
// functions below compute the contents of both tables so that the RAMs start
// preloaded; a host may overwrite them through the controller's table port.
//
// Design choices that are not taken from the published design:
//   * e'(n) is rounded half away from zero to an integer, since d(n) is an
//     integer.
//   * Memory-A stores the index of e'(n) in the ascending list of reachable
//     rounded values (the "code"). With the given coefficients that list has
//     27 entries, so the code is 5 bits wide (CODE_W), not 4.
//   * Addresses that the EPU can never produce map to the code of e'(n) = 0;
//     codes past the last reachable value decode to 0 in Memory-B.
package pwm_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int E_W    = 4;      // width of the EPU state register
  localparam int E_MAX  = 4;      // e(n) ranges over -E_MAX..+E_MAX
  localparam int D_W    = 8;      // duty word width, duty = d/256
  localparam int D_MIN  = 1;      // smallest compensated duty word
  localparam int D_MAX  = 254;    // largest compensated duty word
  localparam int CODE_W = 5;      // width of the e'(n) code from Memory-A
  localparam int A_AW   = 3*E_W;  // Memory-A address width (12)
  localparam int B_AW   = CODE_W + D_W;  // Memory-B address width (13)

  // PID coefficients, stored as twice their value so that they are integers:
  // a = 12.5, b = -23.5, c = 11.5.
  localparam int KA2 = 25;
  localparam int KB2 = -47;
  localparam int KC2 = 23;
  // Bound on |e'(n)| used when scanning the reachable values.
  localparam int EP_BOUND = ((KA2 < 0 ? -KA2 : KA2) + (KB2 < 0 ? -KB2 : KB2)
                            + (KC2 < 0 ? -KC2 : KC2)) * E_MAX / 2 + 1;

  typedef logic signed [E_W-1:0] err_t;    // e(n), two's complement
  typedef logic [D_W-1:0]         duty_t;  // d(n)
  typedef logic [CODE_W-1:0]      code_t;  // Memory-A data

  // Comparator bus: 00 output too high, 11 output too low, 01/10 in band.
  typedef enum logic [1:0] {
    EV_DOWN = 2'b00,
    EV_IN_A = 2'b01,
    EV_IN_B = 2'b10,
    EV_UP   = 2'b11
  } err_volt_t;

  // The three error samples that form the Memory-A address.
  typedef struct packed {
    err_t e_n;   // e(n)   - address bits 11:8
    err_t e_n1;  // e(n-1) - address bits 7:4
    err_t e_n2;  // e(n-2) - address bits 3:0
  } err_triple_t;

  // Round a value given in half units to the nearest integer, halves away
  // from zero.
  function automatic int round_half(int x2);
    return (x2 >= 0) ? (x2 + 1) / 2 : -((-x2 + 1) / 2);
  endfunction

  // Rounded e'(n) for one error triple.
  function automatic int eprime(int en, int en1, int en2);
    return round_half(KA2*en + KB2*en1 + KC2*en2);
  endfunction

  // A triple is reachable when all samples lie in -E_MAX..E_MAX and each
  // differs from the one before by at most one step (the EPU moves by one
  // state per period). There are 71 such triples.
  function automatic bit triple_reachable(int en, int en1, int en2);
    if (en < -E_MAX || en > E_MAX || en1 < -E_MAX || en1 > E_MAX ||
        en2 < -E_MAX || en2 > E_MAX) return 1'b0;
    return (en - en1 <= 1) && (en1 - en <= 1) && (en1 - en2 <= 1) && (en2 - en1 <= 1);
  endfunction

  // Set of rounded e'(n) values reachable from some reachable triple:
  // bit v + EP_BOUND is set for each such v.
  typedef logic [2*EP_BOUND:0] value_set_t;

  function automatic value_set_t reachable_values();
    value_set_t set = '0;
    for (int m = -E_MAX; m <= E_MAX; m++)
      for (int p = -1; p <= 1; p++)
        for (int q = -1; q <= 1; q++)
          if (triple_reachable(m + p, m, m + q))
            set[eprime(m + p, m, m + q) + EP_BOUND] = 1'b1;
    return set;
  endfunction

  // d(n-1) + e'(n) limited to D_MIN..D_MAX.
  function automatic duty_t clamp_duty(int d);
    if (d < D_MIN) return duty_t'(D_MIN);
    if (d > D_MAX) return duty_t'(D_MAX);
    return duty_t'(d);
  endfunction
endpackage

// usc_tb_pkg: reference arithmetic shared by the end-to-end testbenches.
// target() evaluates the twelve target functions in floating point;
// bern4() evaluates a degree-4 Bernstein polynomial whose coefficients are
// given in units of 1/64, the function the SC cores are built to realise.
package usc_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real target(int id, real x);
    case (id)
      1:  return $sin(x);
      2:  return $cos(x);
      3:  return $exp(-x);
      4:  return $ln(1.0 + x);
      5:  return $sin(PI * x) / PI;
      6:  return $tanh(x);
      7:  return $tanh(4.0 * x);
      8:  return (x > 0.0) ? $pow(x, 0.45) : 0.0;
      9:  return $exp(-2.0 * x);
      10: return 1.0 / (1.0 + $exp(-x));
      11: return (x > 0.0) ? $pow(x, 2.2) : 0.0;
      12: return 0.5 * $cos(PI * x) + 0.5;
      default: return 0.0;
    endcase
  endfunction

  function automatic real bern4(int b0, int b1, int b2, int b3, int b4, real x);
    real y = 1.0 - x;
    return (b0 * y**4 + 4.0 * b1 * x * y**3 + 6.0 * b2 * x**2 * y**2
          + 4.0 * b3 * x**3 * y + b4 * x**4) / 64.0;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage

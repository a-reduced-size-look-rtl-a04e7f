// tb_ref_pkg: reference model of the quarter-wave sine synthesizer, for the
// testbenches.
//
// It rebuilds the 256-sample period the way the construction is stated on
// paper, with 1-based arrays: rom(i) = round(A*sin(2*pi*(i-1)/256)) for
// i = 1..64; half(i) = rom(i) and half(64+i) = rom(65-i) for i = 1..64;
// full(1..128) = half and full(129..256) = -half. Sample number p (0-based
// phase) is full(p+1). The arithmetic is done in real numbers here and does
// not share code with the RTL.
package tb_ref_pkg;

  function automatic int rom1(input int i, input int amplitude);   // i = 1..64
    real x;
    x = $sin(2.0 * 3.14159265358979323846 * (i - 1) / 256.0) * amplitude;
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  function automatic int half1(input int j, input int amplitude);  // j = 1..128
    return (j <= 64) ? rom1(j, amplitude) : rom1(129 - j, amplitude);
  endfunction

  function automatic int full1(input int n, input int amplitude);  // n = 1..256
    return (n <= 128) ? half1(n, amplitude) : -half1(n - 128, amplitude);
  endfunction

  // Expected carrier sample for an 8-bit phase.
  function automatic int ref_sine(input int phase, input int amplitude = 10000);
    return full1((phase % 256) + 1, amplitude);
  endfunction

endpackage

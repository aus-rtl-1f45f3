// fir_ref_pkg: reference arithmetic for the testbenches: the rectifier, the 23-tap
// filter with the published coefficients (written out as the full symmetric impulse
// response), the round-half-up division by 256, and the simulated echo envelope.
package fir_ref_pkg;
  // full 23-tap impulse response, h[0] applies to the newest sample
  localparam int H [23] = '{-1, -2, -1, 0, 3, 7, 12, 17, 23, 27, 30, 31,
                            30, 27, 23, 17, 12, 7, 3, 0, -1, -2, -1};

  function automatic int rectify(input int x);
    // distance from mid-scale: 128..255 -> 0..127, 127..0 -> 0..127
    return (x >= 128) ? x - 128 : 127 - x;
  endfunction

  function automatic int round_out(input longint s);
    longint q;
    if (s < 0) return 0;
    q = (s + 128) / 256;
    return (q > 255) ? 255 : int'(q);
  endfunction

  // echo envelope of the simulated backend at depth j
  function automatic int echo_env(input int j);
    int pos [8] = '{ 16, 150, 172, 560, 880, 1480, 1530, 1620};
    int amp [8] = '{120, 100,  60,  70,  85,  120,  105,   45};
    int best = 0;
    if (j < 0 || j >= 2048) return 0;
    for (int e = 0; e < 8; e++) begin
      int v = amp[e] - 6 * ((j > pos[e]) ? j - pos[e] : pos[e] - j);
      if (v > best) best = v;
    end
    return best;
  endfunction

  // raw backend byte at depth j (carrier period 4)
  function automatic int echo_raw(input int j);
    int a = echo_env(j);
    if (j < 0 || j >= 2048) return 128;
    return ((j / 2) % 2 == 1) ? 127 - a : 128 + a;
  endfunction
endpackage

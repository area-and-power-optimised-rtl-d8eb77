// bf_ref_pkg: bit-true reference model of the adaptive beamformer used by the
// testbenches. It is written directly from the algorithm with plain integer
// arithmetic (64-bit, floor shifts, explicit saturation) and shares no code
// with the RTL:
//   x1 = a(n)-b(n-1), x2 = b(n)-a(n-1)
//   z  = sat(floor((C1*temp + C3*z_prev + 2^13) / 2^14))   (output of the
//        previous sample's y, as in the hardware schedule)
//   y  = sat(x1 - sat(floor(G*x2 / 2^14)))
//   temp = sat(y + y_prev)
//   G  = clamp(G + floor(y*x2 / 2^16), 0, 2^14)
// ADC words are normalised as floor((code - 2^15) / 2).
package bf_ref_pkg;

  localparam longint C1 = 4520;    // round(0.2759 * 2^14)
  localparam longint C3 = 15988;   // round(0.9758 * 2^14)

  function automatic longint sat(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  function automatic longint norm(input longint code);
    return (code - 32768) >>> 1;
  endfunction

  typedef struct {
    longint temp, z, pz, y, g;
    int     n_lo, n_hi, n_zsat;
  } ref_state_t;

  function automatic void ref_reset(ref ref_state_t s, input longint g0);
    s.temp = 0; s.z = 0; s.pz = 0; s.y = 0; s.g = g0;
    s.n_lo = 0; s.n_hi = 0; s.n_zsat = 0;
  endfunction

  // One downsampled sample through all four states.
  function automatic void ref_step(ref ref_state_t s, input longint an, input longint bn,
                                   input longint ad, input longint bd);
    longint pt, x1, x2, zr, yn, gs;
    pt = C1 * s.temp;
    x1 = an - bd;
    x2 = bn - ad;
    zr = (pt + s.pz + 8192) >>> 14;
    if (zr != sat(zr)) s.n_zsat++;
    s.z = sat(zr);
    yn = sat(x1 - sat((s.g * x2) >>> 14));
    s.temp = sat(yn + s.y);
    s.y = yn;
    s.pz = C3 * s.z;
    gs = s.g + ((s.y * x2) >>> 16);
    if (gs < 0) begin s.g = 0; s.n_lo++; end
    else if (gs > 16384) begin s.g = 16384; s.n_hi++; end
    else s.g = gs;
  endfunction

endpackage

// fcc_ref.svh: reference arithmetic for the testbenches, included inside
// each testbench module. It restates the
// controller's fixed-point rules (18-bit quantities with 8 fractional
// bits, 18-bit coefficients with 16 fractional bits, arithmetic-shift
// truncation, saturation after every operation) in plain scalar integer
// code, one phase and one capacitor at a time, so that the pipelined RTL
// can be compared against it bit for bit.

  localparam longint QMAX = (64'sd1 <<< 17) - 1;
  localparam longint QMIN = -(64'sd1 <<< 17);
  localparam longint THIRD_Q16 = 21846;          // round-up of 2^16 / 3

  typedef longint ph_t  [3];
  typedef longint cap_t [3][3];                  // [phase][capacitor]

  function automatic longint rsat(input longint v);
    if (v > QMAX) return QMAX;
    if (v < QMIN) return QMIN;
    return v;
  endfunction

  function automatic longint rmul(input longint v, input longint k);
    return rsat((v * k) >>> 16);
  endfunction

  // Switch bit s of phase x in the packed state word.
  function automatic int sbit(input int unsigned sw, input int x, input int s,
                              input int nsw);
    return (sw >> (x * nsw + s)) & 1;
  endfunction

  // One step of the coupled converter model (eqs. 1-5), all phases.
  function automatic void model(input int unsigned sw, input int nlev,
                                input longint vdc, input longint a,
                                input longint b, input longint c,
                                input ph_t i_in, input cap_t vc_in,
                                output ph_t i_out, output cap_t vc_out);
    longint vxn [3];
    longint vsum, von, vxo, inew, csum, dq;
    int nsw, ncap, d;
    nsw  = nlev - 1;
    ncap = nlev - 2;
    vsum = 0;
    for (int x = 0; x < 3; x++) begin
      vxn[x] = sbit(sw, x, nsw - 1, nsw) ? vdc : 0;
      for (int j = 0; j < ncap; j++) begin
        d = sbit(sw, x, j + 1, nsw) - sbit(sw, x, j, nsw);
        vxn[x] = vxn[x] - d * vc_in[x][j];
      end
      vsum = vsum + vxn[x];
    end
    von = rmul(vsum, THIRD_Q16);
    for (int x = 0; x < 3; x++) begin
      vxo  = rsat(vxn[x] - von);
      inew = rsat(rmul(i_in[x], a) + rmul(vxo, b));
      csum = i_in[x] + inew;
      dq   = rmul(csum, c);
      i_out[x] = inew;
      for (int j = 0; j < 3; j++) vc_out[x][j] = 0;
      for (int j = 0; j < ncap; j++) begin
        d = sbit(sw, x, j + 1, nsw) - sbit(sw, x, j, nsw);
        vc_out[x][j] = rsat(vc_in[x][j] + d * dq);
      end
    end
  endfunction

  // Cost of eq. (12) summed over the phases; weights have 8 fractional bits.
  function automatic longint cost(input int nlev, input ph_t iref,
                                  input cap_t vref, input longint w [3],
                                  input ph_t i, input cap_t vc);
    longint g, e;
    g = 0;
    for (int x = 0; x < 3; x++) begin
      e = iref[x] - i[x];
      g = g + e * e;
      for (int j = 0; j < nlev - 2; j++) begin
        e = vref[x][j] - vc[x][j];
        g = g + ((e * e * w[j]) >>> 8);
      end
    end
    return g;
  endfunction


  // Sign-extend an 18-bit quantity word.
  function automatic longint sx(input logic [17:0] v);
    return longint'($signed(v));
  endfunction

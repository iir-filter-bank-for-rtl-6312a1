// iir_ref_pkg: reference model of the filter bank arithmetic for the testbenches.
//
// Computes one filter step the straightforward way: section by section, with the
// products, shifts and clamps written out as sums of 128-bit integers, and the
// histories kept as plain arrays that are shifted after every step. It models the
// same number formats as the RTL (53-bit coefficients with 51 fraction bits, 52-bit
// section values, 8 guard bits and 67 significant bits in the accumulator) but none
// of its pipeline, odd/even addressing or microcode.
package iir_ref_pkg;

  typedef logic signed [127:0] wide_t;

  localparam int MAXS = 127;

  function automatic wide_t lim(input int bits);
    return (wide_t'(1) <<< (bits - 1));
  endfunction

  // clamp to a signed width, flag when clamped
  function automatic wide_t clamp(input wide_t v, input int bits, inout bit ovf);
    if (v >= lim(bits))  begin ovf = 1; return lim(bits) - 1; end
    if (v < -lim(bits))  begin ovf = 1; return -lim(bits);    end
    return v;
  endfunction

  // coefficient (51 fraction bits) times section value, in accumulator units (8 guard bits)
  function automatic wide_t term(input wide_t c, input wide_t d);
    return (c * d) >>> 43;
  endfunction

  // memory word for a coefficient given as a real number, with an optional shift field
  function automatic logic [63:0] coef_word(input real v, input int c0 = 0);
    logic signed [52:0] q;
    q = 53'(longint'(v * 2.0**51));
    return {q, 3'b000, 8'(c0)};
  endfunction

  function automatic wide_t coef_of(input logic [63:0] w);
    return wide_t'($signed(w[63:11]));
  endfunction

  class iir_model;
    int    nsos;
    wide_t g, galt [MAXS];
    wide_t b1 [MAXS], b2 [MAXS], a1 [MAXS], a2 [MAXS];
    int    c0 [MAXS];
    bit    off [MAXS];
    bit    gain_off;
    wide_t h1 [MAXS+1], h2 [MAXS+1];
    int    frac;

    function new(int n, int filter_width);
      nsos = n;
      frac = 52 - filter_width;
      g = 0; gain_off = 0;
      for (int i = 0; i < MAXS; i++) begin
        b1[i] = 0; b2[i] = 0; a1[i] = 0; a2[i] = 0; c0[i] = 0; off[i] = 0; galt[i] = 0;
      end
      clear();
    endfunction

    function void clear();
      for (int i = 0; i <= MAXS; i++) begin h1[i] = 0; h2[i] = 0; end
    endfunction

    // one filter step: returns the output; ovf_in is the input's overflow flag
    function wide_t step(input wide_t x, input bit ovf_in, output bit ovf);
      wide_t xe, gg, gx, acc, y [MAXS], t;
      bit    o;
      o  = ovf_in;
      xe = x <<< frac;
      gg = gain_off ? 0 : g;
      gx = clamp((gg * xe) >>> 51, 52, o);
      acc = 0;
      if (!off[0]) begin
        acc = clamp(acc + term(b2[0], h2[0]), 67, o);
        acc = clamp(acc + term(b1[0], h1[0]), 67, o);
      end
      acc = clamp(acc + term(gg, xe), 67, o);
      for (int n = 0; n < nsos; n++) begin
        if (!off[n]) begin
          if (c0[n] >= 0) t = acc <<< c0[n];
          else            t = acc >>> (-c0[n]);
          acc = clamp(t, 67, o);
          acc = clamp(acc + term(a2[n], h2[n+1]), 67, o);
          acc = clamp(acc + term(a1[n], h1[n+1]), 67, o);
        end else if (n == 0) begin
          acc = clamp(acc + term(galt[0], xe), 67, o);
        end else begin
          begin
            bit dummy;
            t = clamp(acc >>> 8, 52, dummy);
          end
          acc = clamp(acc + term(galt[n], t), 67, o);
        end
        y[n] = clamp(acc >>> 8, 52, o);
        if (n < nsos - 1 && !off[n+1]) begin
          acc = clamp(acc + term(b2[n+1], h2[n+1]), 67, o);
          acc = clamp(acc + term(b1[n+1], h1[n+1]), 67, o);
        end
      end
      h2[0] = h1[0]; h1[0] = gx;
      for (int n = 0; n < nsos; n++) begin h2[n+1] = h1[n+1]; h1[n+1] = y[n]; end
      ovf = o;
      return y[nsos-1] >>> frac;
    endfunction
  endclass

endpackage

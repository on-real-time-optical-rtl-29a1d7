// owc_ref_pkg: reference models used by the emulator testbenches.
//
// Integer models, written from the block specifications, of the K-lane
// FIR (full convolution over every accepted sample, arithmetic right
// shift, saturation), the look-up table addressing, the photodetector
// transfer and the noise generator's LFSR and noise mapping.
package owc_ref_pkg;

  function automatic longint sat_to(longint v, int unsigned w, ref bit s);
    longint mx = (longint'(1) <<< (w - 1)) - 1;
    longint mn = -(longint'(1) <<< (w - 1));
    if (v > mx) begin s = 1'b1; return mx; end
    if (v < mn) begin s = 1'b1; return mn; end
    return v;
  endfunction

  // Output n of a FIR over the sample history xs (xs[i] for i < 0 is 0).
  function automatic longint fir_at(ref longint xs [$], ref longint h [$], input int n,
                                    input int sh, input int unsigned w, ref bit s);
    longint acc = 0;
    for (int j = 0; j < h.size(); j++)
      if (n - j >= 0) acc += h[j] * xs[n - j];
    return sat_to(acc >>> sh, w, s);
  endfunction

  // One right shift of the Galois LFSR x^32+x^22+x^2+x+1.
  function automatic logic [31:0] lfsr_shift(logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  function automatic logic [31:0] lfsr_step(logic [31:0] s);
    for (int i = 0; i < 32; i++) s = lfsr_shift(s);
    return s;
  endfunction

  function automatic logic [31:0] lfsr_seed(logic [31:0] seed, int p);
    logic [31:0] s = seed ^ (32'(p) * 32'h9E37_79B9);
    return (s == 0) ? 32'd1 : s;
  endfunction

  function automatic int noise_of(logic [31:0] s);
    return int'(s[7:0]) + int'(s[15:8]) + int'(s[23:16]) + int'(s[31:24]) - 510;
  endfunction

  // Photodetector transfer of one sample.
  function automatic longint pd_ref(longint x, longint gain, int sh, int noise,
                                    longint amp, int unsigned w, ref bit s);
    longint v = ((x * gain) >>> sh) + ((longint'(noise) * amp) >>> 8);
    return sat_to(v, w, s);
  endfunction

endpackage

// vq_pkg: constants and helper functions shared by the vector-quantiser
// encoder modules.
//
// A pixel is PIX_W = 8 bits, as in the 8-bit-per-pixel images the encoder is
// specified for. The squared distortion of a K-dimensional vector against one
// codevector is at most K * (2^PIX_W - 1)^2, so dist_width(K) gives the
// number of bits a distortion needs without overflow. Distortion differences
// are formed one bit wider, so their most significant bit is the sign that the
// winner-selection logic uses as its "less than" flag.
package vq_pkg;

  localparam int unsigned PIX_W = 8;

  typedef logic [PIX_W-1:0] pixel_t;

  // Bits for a squared distortion summed over k dimensions.
  function automatic int unsigned dist_width(input int unsigned k);
    longint unsigned maxval;
    int unsigned w;
    maxval = longint'(k) * ((longint'(1) << PIX_W) - 1) * ((longint'(1) << PIX_W) - 1);
    w = 1;
    while ((longint'(1) << w) <= maxval) w++;
    return w;
  endfunction

  // Bits needed to index n items (at least 1).
  function automatic int unsigned idx_width(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // True when n is a power of four (n = 4, 16, 64, 256, ...).
  function automatic bit is_pow4(input int unsigned n);
    int unsigned v;
    v = n;
    if (v < 4) return 1'b0;
    while (v > 1) begin
      if (v % 4 != 0) return 1'b0;
      v = v / 4;
    end
    return 1'b1;
  endfunction

endpackage

// lobam_pkg: types and constants shared by the leading-one-bit approximate
// multipliers (LOBAM0, LOBAM1) and by the image smoothing filter that embeds
// them.
//
// variant_e selects which of the two multipliers a wrapper instantiates:
//   LOBAM0 keeps the three upper partial products XH*YH, XH*YL and XL*YH;
//   LOBAM1 also keeps XL*YL.
// The encoding of the enum is this design's own choice.
package lobam_pkg;

  typedef enum logic [0:0] {
    LOBAM0 = 1'b0,
    LOBAM1 = 1'b1
  } variant_e;

  // Width of a binary index into a W-bit vector (at least one bit).
  function automatic int idx_w(input int w);
    return (w > 1) ? $clog2(w) : 1;
  endfunction

endpackage

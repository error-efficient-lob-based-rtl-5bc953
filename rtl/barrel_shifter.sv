// barrel_shifter: logarithmic left shifter, W_IN bits in, W_OUT bits out.
//
// In a LOB multiplier every product with a leading-one mask is a product by
// a power of two, i.e. a shift: B * 2^k = B << k. The shifter has one
// 2:1-multiplexer level per bit of the shift amount; level s shifts by 2^s
// when amt[s] is set. The input is zero-extended to W_OUT bits first, so
// nothing is lost as long as W_IN + max(amt) <= W_OUT. At the defaults
// (8 bits shifted by at most 7) the top output bit is always zero; the AU
// still takes 2W bits so that its products need no extension.
// The published LOBAM design names a barrel shifter and refers to the literature for its
// gates; the log-stage form is this design's choice.
// Purely combinational; no clock.
module barrel_shifter #(
  parameter int W_IN  = 8,
  parameter int W_OUT = 16,
  parameter int SH_W  = 3
) (
  input  logic [W_IN-1:0]  din,
  input  logic [SH_W-1:0]  amt,
  output logic [W_OUT-1:0] dout
);

  logic [W_OUT-1:0] lvl [0:SH_W];

  assign lvl[0] = W_OUT'(din);

  for (genvar s = 0; s < SH_W; s++) begin : g_lvl
    assign lvl[s+1] = amt[s] ? (lvl[s] << (1 << s)) : lvl[s];
  end

  assign dout = lvl[SH_W];

endmodule

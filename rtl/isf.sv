// isf: image smoothing filter datapath built on a LOB approximate multiplier.
//
// One output pixel is the 3x3 neighbourhood of an input pixel convolved with
// a fixed smoothing mask:
//   out = sat8( (sum_k  AM(window[k], KERNEL[k]) + 2^(SHIFT-1)) >> SHIFT )
// where AM is an 8 x 8 LOBAM0 or LOBAM1 multiplier (pixel as multiplicand,
// mask coefficient as multiplier), chosen by VARIANT. The nine approximate
// products are summed exactly, rounded, divided by 2^SHIFT (the mask sum)
// and clipped to 8 bits.
//
// The published LOBAM evaluation embeds the multipliers in an image smoothing filter that
// convolves each image sub-matrix with a standard mask, on 8-bit grey-scale
// pictures; it does not print the mask. The default mask here is this
// design's choice: a 3x3 mean filter in Q8 fixed point (eight coefficients
// of 28 and a centre of 32, summing to 256), which keeps the coefficients
// away from powers of two so that the multipliers' approximation shows. The
// rounding, the saturation and the output register are also this design's
// own.
//
// Interface: window[k] is pixel k of the 3x3 window in raster order
// (k = 3*row + column, centre k = 4); KERNEL[k] is its coefficient.
// Timing: in_valid and window are sampled on a rising clock edge; out_pix
// and out_valid appear one cycle later. One window per cycle, no stalls.
// rst_n is an active-low synchronous reset that clears out_valid.
module isf
  import lobam_pkg::*;
#(
  parameter variant_e        VARIANT = LOBAM1,
  parameter logic [8:0][7:0] KERNEL  = {8'd28, 8'd28, 8'd28,
                                        8'd28, 8'd32, 8'd28,
                                        8'd28, 8'd28, 8'd28},
  parameter int              SHIFT   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [8:0][7:0] window,
  output logic            out_valid,
  output logic [7:0]      out_pix
);

  localparam int SUM_W = 20;  // 9 products of at most 16 bits

  logic [8:0][15:0] prod;

  for (genvar k = 0; k < 9; k++) begin : g_mul
    if (VARIANT == LOBAM0) begin : g_am0
      lobam0 #(.N(8)) u_am (.x(window[k]), .y(KERNEL[k]), .z(prod[k]));
    end else begin : g_am1
      lobam1 #(.N(8)) u_am (.x(window[k]), .y(KERNEL[k]), .z(prod[k]));
    end
  end

  logic [SUM_W-1:0] acc;
  logic [SUM_W-1:0] scaled;
  logic [7:0]       pix_next;

  always_comb begin
    acc = SUM_W'(1) << (SHIFT - 1);
    for (int k = 0; k < 9; k++) begin
      acc = acc + SUM_W'(prod[k]);
    end
    scaled   = acc >> SHIFT;
    pix_next = (scaled > SUM_W'(255)) ? 8'd255 : scaled[7:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pix <= pix_next;
    end
  end

endmodule

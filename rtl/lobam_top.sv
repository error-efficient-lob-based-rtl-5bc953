// lobam_top: the two leading-one-bit approximate multipliers and the image
// smoothing filter that uses them, side by side.
//
// * lobam0 and lobam1 at the full operand width N (16 by default; 8 is the
//   other size the design was published for) share the operands x and y and give the products
//   z0 (three partial products) and z1 (four partial products). They are
//   combinational.
// * Two image smoothing filters share one 3x3 window stream: isf0 uses eight-
//   bit LOBAM0 multipliers, isf1 eight-bit LOBAM1 multipliers, so the two
//   smoothed pixels can be compared cycle by cycle. Each has one cycle of
//   latency (see isf).
// Running both variants on the same data mirrors how the published evaluation compares
// them; instantiating them together in one top is this design's choice.
module lobam_top
  import lobam_pkg::*;
#(
  parameter int N = 16
) (
  // approximate multipliers
  input  logic [N-1:0]    x,
  input  logic [N-1:0]    y,
  output logic [2*N-1:0]  z0,
  output logic [2*N-1:0]  z1,
  // image smoothing filters
  input  logic            clk,
  input  logic            rst_n,
  input  logic            win_valid,
  input  logic [8:0][7:0] window,
  output logic            pix0_valid,
  output logic [7:0]      pix0,
  output logic            pix1_valid,
  output logic [7:0]      pix1
);

  lobam0 #(.N(N)) u_lobam0 (.x(x), .y(y), .z(z0));
  lobam1 #(.N(N)) u_lobam1 (.x(x), .y(y), .z(z1));

  isf #(.VARIANT(LOBAM0)) u_isf0 (
    .clk(clk), .rst_n(rst_n), .in_valid(win_valid), .window(window),
    .out_valid(pix0_valid), .out_pix(pix0)
  );
  isf #(.VARIANT(LOBAM1)) u_isf1 (
    .clk(clk), .rst_n(rst_n), .in_valid(win_valid), .window(window),
    .out_valid(pix1_valid), .out_pix(pix1)
  );

endmodule

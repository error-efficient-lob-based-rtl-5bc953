// lobam0: N x N unsigned leading-one-bit approximate multiplier, variant 0.
//
// Each operand is split into n/2-bit halves, X = XH*2^(N/2) + XL and
// Y = YH*2^(N/2) + YL (the extractor is just these part-selects). A LOB unit
// finds the leading-one mask and position of each of the four halves. Three
// arithmetic units approximate the partial products
//   AU-1: XH*YH    AU-2: XH*YL    AU-3: XL*YH
// each as Ald*B + A*Bld - Ald*Bld, and the least significant partial product
// XL*YL is dropped. Two Han-Carlson adders combine them:
//   A1 = AU-2 + AU-3                           (N+1 bits)
//   A2 = AU-1 * 2^N + A1 * 2^(N/2)             (2N bits)
// so Z0 ~ XH*YH*2^N + (XH*YL + XL*YH)*2^(N/2). The result never exceeds the
// exact product X*Y.
// The split, the LOB units, the three AUs and the two adders follow the
// published design; N must be even. Purely combinational: Z0 follows X and Y after
// the gate delay, with no clock and no handshake.
module lobam0 #(
  parameter int N = 16
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);

  localparam int H  = N / 2;
  localparam int PW = lobam_pkg::idx_w(H);

  if (N % 2 != 0 || N < 2) begin : g_bad_n
    $error("lobam0: N must be even and at least 2");
  end

  // n/2-bit extractor
  logic [H-1:0] xh, xl, yh, yl;
  assign {xh, xl} = x;
  assign {yh, yl} = y;

  // LOB units
  logic [H-1:0]  xh_ld, xl_ld, yh_ld, yl_ld;
  logic [PW-1:0] xh_pos, xl_pos, yh_pos, yl_pos;

  lob_unit #(.W(H)) u_lob_xh (.a(xh), .ld(xh_ld), .pos(xh_pos));
  lob_unit #(.W(H)) u_lob_xl (.a(xl), .ld(xl_ld), .pos(xl_pos));
  lob_unit #(.W(H)) u_lob_yh (.a(yh), .ld(yh_ld), .pos(yh_pos));
  lob_unit #(.W(H)) u_lob_yl (.a(yl), .ld(yl_ld), .pos(yl_pos));

  // Arithmetic units
  logic [N-1:0] p_hh, p_hl, p_lh;

  lob_au #(.W(H)) u_au1 (
    .a(xh), .a_ld(xh_ld), .a_pos(xh_pos),
    .b(yh), .b_ld(yh_ld), .b_pos(yh_pos), .p(p_hh)
  );
  lob_au #(.W(H)) u_au2 (
    .a(xh), .a_ld(xh_ld), .a_pos(xh_pos),
    .b(yl), .b_ld(yl_ld), .b_pos(yl_pos), .p(p_hl)
  );
  lob_au #(.W(H)) u_au3 (
    .a(xl), .a_ld(xl_ld), .a_pos(xl_pos),
    .b(yh), .b_ld(yh_ld), .b_pos(yh_pos), .p(p_lh)
  );

  // Adder A1: middle partial products
  logic [N-1:0] mid;
  logic         mid_c;
  hc_adder #(.W(N)) u_a1 (
    .a(p_hl), .b(p_lh), .cin(1'b0), .sum(mid), .cout(mid_c)
  );

  // Adder A2: high partial product plus the middle sum at weight 2^(N/2)
  logic [2*N-1:0] hi_term, mid_term;
  logic           z_c;
  assign hi_term  = {p_hh, {N{1'b0}}};
  assign mid_term = (2*N)'({mid_c, mid}) << H;

  hc_adder #(.W(2*N)) u_a2 (
    .a(hi_term), .b(mid_term), .cin(1'b0), .sum(z), .cout(z_c)
  );

  // Z0 never exceeds X*Y < 2^(2N), so the final adder never carries out.
  always_comb begin
    assert (z_c == 1'b0) else $error("lobam0: product overflow");
  end

endmodule

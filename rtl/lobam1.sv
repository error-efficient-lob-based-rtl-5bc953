// lobam1: N x N unsigned leading-one-bit approximate multiplier, variant 1.
//
// Same datapath as LOBAM0 (extractor, four LOB units, arithmetic units of
// shifters, adder and subtractor), with a fourth arithmetic unit that also
// approximates the least significant partial product:
//   AU-1: XH*YH    AU-2: XH*YL    AU-3: XL*YH    AU-4: XL*YL
// each as Ald*B + A*Bld - Ald*Bld. Three Han-Carlson adders combine them:
//   A1 = AU-2 + AU-3                           (N+1 bits)
//   A2 = AU-1 * 2^N + A1 * 2^(N/2)             (2N bits)
//   A3 = A2 + AU-4                             (2N bits)
// so Z1 ~ XH*YH*2^N + (XH*YL + XL*YH)*2^(N/2) + XL*YL. The error of Z1 is the
// sum of the four AU errors a'*b' at their weights; Z1 never exceeds X*Y.
// The structure follows the published design; the order in which the adders combine
// the partial products is this design's reading of its block diagram. N must
// be even. Purely combinational: no clock and no handshake.
module lobam1 #(
  parameter int N = 16
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] z
);

  localparam int H  = N / 2;
  localparam int PW = lobam_pkg::idx_w(H);

  if (N % 2 != 0 || N < 2) begin : g_bad_n
    $error("lobam1: N must be even and at least 2");
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
  logic [N-1:0] p_hh, p_hl, p_lh, p_ll;

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
  lob_au #(.W(H)) u_au4 (
    .a(xl), .a_ld(xl_ld), .a_pos(xl_pos),
    .b(yl), .b_ld(yl_ld), .b_pos(yl_pos), .p(p_ll)
  );

  // Adder A1: middle partial products
  logic [N-1:0] mid;
  logic         mid_c;
  hc_adder #(.W(N)) u_a1 (
    .a(p_hl), .b(p_lh), .cin(1'b0), .sum(mid), .cout(mid_c)
  );

  // Adder A2: high partial product plus the middle sum at weight 2^(N/2)
  logic [2*N-1:0] hi_term, mid_term, upper;
  logic           upper_c;
  assign hi_term  = {p_hh, {N{1'b0}}};
  assign mid_term = (2*N)'({mid_c, mid}) << H;

  hc_adder #(.W(2*N)) u_a2 (
    .a(hi_term), .b(mid_term), .cin(1'b0), .sum(upper), .cout(upper_c)
  );

  // Adder A3: low partial product
  logic z_c;
  hc_adder #(.W(2*N)) u_a3 (
    .a(upper), .b((2*N)'(p_ll)), .cin(1'b0), .sum(z), .cout(z_c)
  );

  // Z1 never exceeds X*Y < 2^(2N), so no adder carries out.
  always_comb begin
    assert (upper_c == 1'b0 && z_c == 1'b0)
      else $error("lobam1: product overflow");
  end

endmodule

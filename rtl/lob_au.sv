// lob_au: arithmetic unit (AU) of a LOB multiplier.
//
// It approximates the W x W product of two half-width operands A and B from
// their leading-one masks Ald and Bld:
//   A*B ~ Ald*B + A*Bld - Ald*Bld
// Writing A = Ald + a' and B = Bld + b', the right-hand side equals
// A*B - a'*b', so the result never exceeds the exact product, is exact when
// either operand is zero or a power of two, and fits in 2W bits.
// Every product on the right has a power of two as one factor, so it is a
// shift:
//   Ald*B   = B   << pos(A)   (zero when A = 0)
//   A*Bld   = A   << pos(B)   (zero when B = 0)
//   Ald*Bld = Ald << pos(B)   (zero when B = 0)
// Three barrel shifters form these terms, a Han-Carlson adder adds the first
// two (2W bits plus carry) and a second one subtracts the third.
// The decomposition into shifters, an adder and a subtractor follows the
// published design; the zero gating (from the OR of the mask) and the use
// of the Han-Carlson adder for
// the subtractor too are this design's choices.
// The leading-one data of A and B come from lob_unit instances outside the
// AU, so that one LOB unit per operand half serves every AU that uses it.
// Purely combinational; no clock.
module lob_au #(
  parameter int W = 8
) (
  input  logic [W-1:0]                   a,
  input  logic [W-1:0]                   a_ld,
  input  logic [lobam_pkg::idx_w(W)-1:0] a_pos,
  input  logic [W-1:0]                   b,
  input  logic [W-1:0]                   b_ld,
  input  logic [lobam_pkg::idx_w(W)-1:0] b_pos,
  output logic [2*W-1:0]                 p
);

  localparam int PW = lobam_pkg::idx_w(W);

  // An operand is non-zero exactly when its leading-one mask is.
  logic a_nz, b_nz;
  assign a_nz = |a_ld;
  assign b_nz = |b_ld;

  logic [2*W-1:0] sh_ald_b, sh_a_bld, sh_ald_bld;
  logic [2*W-1:0] t1, t2, t3;
  logic [2*W-1:0] s12;
  logic           s12_c;
  logic [2*W:0]   diff;
  logic           diff_c;

  barrel_shifter #(.W_IN(W), .W_OUT(2*W), .SH_W(PW)) u_bs_ald_b (
    .din(b), .amt(a_pos), .dout(sh_ald_b)
  );
  barrel_shifter #(.W_IN(W), .W_OUT(2*W), .SH_W(PW)) u_bs_a_bld (
    .din(a), .amt(b_pos), .dout(sh_a_bld)
  );
  barrel_shifter #(.W_IN(W), .W_OUT(2*W), .SH_W(PW)) u_bs_ald_bld (
    .din(a_ld), .amt(b_pos), .dout(sh_ald_bld)
  );

  assign t1 = a_nz ? sh_ald_b   : '0;
  assign t2 = b_nz ? sh_a_bld   : '0;
  assign t3 = b_nz ? sh_ald_bld : '0;

  // Ald*B + A*Bld
  hc_adder #(.W(2*W)) u_add (
    .a(t1), .b(t2), .cin(1'b0), .sum(s12), .cout(s12_c)
  );

  // (Ald*B + A*Bld) - Ald*Bld, as sum + ~t3 + 1 on 2W+1 bits
  hc_adder #(.W(2*W+1)) u_sub (
    .a({s12_c, s12}), .b(~{1'b0, t3}), .cin(1'b1), .sum(diff), .cout(diff_c)
  );

  // The difference is A*B - a'*b' < 2^(2W): its top bit is always zero and
  // the borrow-free subtraction always carries out.
  assign p = diff[2*W-1:0];

  // The spare result bits are only checked, never used.
  always_comb begin
    assert (diff[2*W] == 1'b0 && diff_c == 1'b1)
      else $error("lob_au: approximate product out of range");
  end

endmodule

// lob_unit: leading-one-bit (LOB) unit.
//
// For a W-bit operand A it marks the most significant set bit:
//   ld[j] = A[j] & ~A[j+1] & ... & ~A[W-1]
// so ld is one-hot (all zero when A = 0). This is the published leading-one
// equation, built as in its gate-level figure from a chain of NOR/NOT terms
// ("no one above bit j") ANDed with A[j].
// Besides the one-hot mask the unit also gives the binary position pos of
// that bit (OR of the indices whose ld bit is set; 0 when A = 0). The
// position drives the barrel shifters of the arithmetic units; this encoder
// is this design's addition, since the shifters take a binary amount.
// Purely combinational; no clock.
module lob_unit #(
  parameter int W = 8
) (
  input  logic [W-1:0]                   a,
  output logic [W-1:0]                   ld,
  output logic [lobam_pkg::idx_w(W)-1:0] pos
);

  localparam int PW = lobam_pkg::idx_w(W);

  // none_above[j]: no bit above j is set.
  logic [W-1:0] none_above;

  always_comb begin
    none_above[W-1] = 1'b1;
    for (int j = W - 2; j >= 0; j--) begin
      none_above[j] = none_above[j+1] & ~a[j+1];
    end
    ld = a & none_above;
  end

  always_comb begin
    pos = '0;
    for (int j = 0; j < W; j++) begin
      if (ld[j]) pos = pos | PW'(j);
    end
  end

endmodule

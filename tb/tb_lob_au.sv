// tb_lob_au: exhaustive self-checking test of the arithmetic unit.
// The testbench works out the leading-one mask and position of each operand
// itself and drives them, as the LOB units would. The 4-bit AU (the one an
// 8 x 8 multiplier uses) and the default 8-bit AU (used by 16 x 16) see every
// operand pair. Each product is compared with
//   msb(A)*B + A*msb(B) - msb(A)*msb(B)
// computed with ordinary multiplication, and the testbench also checks that
// it equals A*B - (A-msb(A))*(B-msb(B)), never exceeds A*B, and is exact when
// an operand is a power of two or zero. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_lob_au;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int unsigned cycles = 0;
  int exact_cnt = 0;
  int approx_cnt = 0;

  logic [3:0] a4 = 0, b4 = 0, a4_ld = 0, b4_ld = 0;
  logic [1:0] a4_pos = 0, b4_pos = 0;
  logic [7:0] p4;
  logic [7:0] a8 = 0, b8 = 0, a8_ld = 0, b8_ld = 0;
  logic [2:0] a8_pos = 0, b8_pos = 0;
  logic [15:0] p8;

  lob_au #(.W(4)) dut4 (.a(a4), .a_ld(a4_ld), .a_pos(a4_pos),
                        .b(b4), .b_ld(b4_ld), .b_pos(b4_pos), .p(p4));
  lob_au dut8 (.a(a8), .a_ld(a8_ld), .a_pos(a8_pos),
               .b(b8), .b_ld(b8_ld), .b_pos(b8_pos), .p(p8));

  function automatic int msb(input int v);
    int m = 0;
    for (int j = 0; j < 31; j++) if (v >= (1 << j)) m = 1 << j;
    return m;
  endfunction

  function automatic int lg(input int v);
    for (int j = 0; j < 31; j++) if (v == (1 << j)) return j;
    return 0;
  endfunction

  task automatic check(input int a, input int b, input int got);
    int ma, mb, e, alt;
    ma  = msb(a);
    mb  = msb(b);
    e   = ma * b + a * mb - ma * mb;
    alt = a * b - (a - ma) * (b - mb);
    checks++;
    if (got != e || e != alt || e > a * b) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d = %0d, expected %0d", a, b, got, e);
    end
    if (a == ma || b == mb) begin
      checks++;
      if (got != a * b) begin
        failures++;
        if (failures < 10) $display("FAIL exact case %0d x %0d = %0d", a, b, got);
      end
      exact_cnt++;
    end else begin
      approx_cnt++;
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        @(posedge clk);
        a8 = 8'(a); a8_ld = 8'(msb(a)); a8_pos = 3'(lg(msb(a)));
        b8 = 8'(b); b8_ld = 8'(msb(b)); b8_pos = 3'(lg(msb(b)));
        a4 = 4'(a); a4_ld = 4'(msb(a % 16)); a4_pos = 2'(lg(msb(a % 16)));
        b4 = 4'(b); b4_ld = 4'(msb(b % 16)); b4_pos = 2'(lg(msb(b % 16)));
        #1;
        check(a, b, int'(p8));
        if (a < 16 && b < 16) check(a, b, int'(p4));
      end
    end
    $display("exact cases %0d, approximated cases %0d", exact_cnt, approx_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles == 200000) begin
      failures++;
      $display("watchdog: timeout");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule

// tb_lobam1: self-checking test of the LOBAM1 approximate multiplier.
// An 8 x 8 instance sees all 65,536 operand pairs and the default 16 x 16
// instance sees corner cases and 100,000 random pairs. Every product is
// compared with a reference worked out in the testbench from the defining
// equation: split both operands into halves, approximate XH*YH, XH*YL, XL*YH and
// XL*YL each as msb(A)*B + A*msb(B) - msb(A)*msb(B) with ordinary
// multiplication, weight them by 2^N, 2^(N/2), 2^(N/2), 1 and add. The test also
// checks that no product exceeds the exact one. It prints the error metrics
// (MED, MRED, WCE, NMED) of both sizes. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_lobam1;

  localparam bit VAR1 = 1'b1;  // this testbench checks the four-product variant

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int unsigned cycles = 0;

  logic [7:0]  x8, y8;
  logic [15:0] z8;
  logic [15:0] x16, y16;
  logic [31:0] z16;

  lobam1 #(.N(8)) dut8 (.x(x8), .y(y8), .z(z8));
  lobam1 dut16 (.x(x16), .y(y16), .z(z16));

  function automatic longint msb(input longint v);
    longint m = 0;
    for (int j = 0; j < 62; j++) if (v >= (longint'(1) << j)) m = longint'(1) << j;
    return m;
  endfunction

  function automatic longint half_approx(input longint a, input longint b);
    return msb(a) * b + a * msb(b) - msb(a) * msb(b);
  endfunction

  function automatic longint ref_mul(input longint x, input longint y, input int n,
                                     input bit with_ll);
    longint h, xh, xl, yh, yl, r;
    h  = longint'(1) << (n / 2);
    xh = x / h; xl = x % h;
    yh = y / h; yl = y % h;
    r  = half_approx(xh, yh) * h * h + (half_approx(xh, yl) + half_approx(xl, yh)) * h;
    if (with_ll) r += half_approx(xl, yl);
    return r;
  endfunction

  // error statistics per size
  longint ed_sum [2];
  real    red_sum [2];
  longint wce [2];
  int     cnt [2];
  int     cnt_nz [2];

  task automatic check(input int sz, input longint x, input longint y, input longint got,
                       input int n);
    longint e, ex, ed;
    e  = ref_mul(x, y, n, VAR1);
    ex = x * y;
    checks++;
    if (got != e || e > ex) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d %0d x %0d = %0d, expected %0d", n, x, y, got, e);
    end
    ed = ex - got;
    ed_sum[sz] += ed;
    if (ed > wce[sz]) wce[sz] = ed;
    cnt[sz]++;
    if (ex != 0) begin
      red_sum[sz] += real'(ed) / real'(ex);
      cnt_nz[sz]++;
    end
  endtask

  task automatic report(input int sz, input int n);
    real med, cmax;
    cmax = real'(((longint'(1) << n) - 1) * ((longint'(1) << n) - 1));
    med  = real'(ed_sum[sz]) / real'(cnt[sz]);
    $display("n=%0d: samples %0d  ED(sum) %0d  MED %0.2f  MRED %0.3e  WCE %0d  NMED %0.3e",
             n, cnt[sz], ed_sum[sz], med, red_sum[sz] / real'(cnt_nz[sz]), wce[sz], med / cmax);
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin
      ed_sum[i] = 0; red_sum[i] = 0.0; wce[i] = 0; cnt[i] = 0; cnt_nz[i] = 0;
    end
    x16 = 16'hffff; y16 = 16'hffff;
    // 8 x 8, exhaustive
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        @(posedge clk);
        x8 = 8'(x); y8 = 8'(y);
        #1 check(0, longint'(x), longint'(y), longint'(z8), 8);
      end
    end
    // 16 x 16, corner cases then random
    for (int i = 0; i < 100016; i++) begin
      @(posedge clk);
      case (i)
        0: begin x16 = 16'hffff; y16 = 16'hffff; end
        1: begin x16 = 16'h0000; y16 = 16'hffff; end
        2: begin x16 = 16'h8000; y16 = 16'h1234; end
        3: begin x16 = 16'h7f7f; y16 = 16'h7f7f; end
        4: begin x16 = 16'h00ff; y16 = 16'h00ff; end
        5: begin x16 = 16'h0101; y16 = 16'hfefe; end
        default: begin x16 = 16'($urandom); y16 = 16'($urandom); end
      endcase
      #1 check(1, longint'(x16), longint'(y16), longint'(z16), 16);
    end
    report(0, 8);
    report(1, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles == 400000) begin
      failures++;
      $display("watchdog: timeout");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule

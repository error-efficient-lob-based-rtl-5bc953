// tb_lobam_top: end-to-end test of the whole design at its default sizes.
//
// Part 1, multipliers: 16 x 16 LOBAM0 and LOBAM1 get corner cases and random
// operands. Each product is compared with a reference computed here from
// the multipliers' defining equation, and the testbench checks that
// z0 <= z1 <= x*y for every pair (LOBAM1 adds a non-negative fourth partial
// product to LOBAM0, and neither ever overshoots).
//
// Part 2, image smoothing: two synthetic 256 x 256 grey-scale images (a
// gradient with blocks, and a noisy texture) are filtered pixel by pixel.
// The testbench forms each 3x3 window (edges replicated), streams one window
// per cycle with random idle cycles, and checks every output pixel of both
// filters against its own model, checks the one-cycle latency, and checks
// pix0 <= pix1 <= exact-filter pixel. It prints the PSNR and a global SSIM
// (one window covering the whole image) of both filters against the exact
// filter.
//
// Every mechanism is counted: exact products (an operand half zero or a
// power of two), approximated products, products where LOBAM1 beats LOBAM0,
// filtered pixels of each variant, idle cycles in the pixel stream, a reset
// during streaming. One that never happens is a failure. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_lobam_top;

  localparam int N     = 16;
  localparam int IMG   = 256;
  localparam logic [8:0][7:0] K = {8'd28, 8'd28, 8'd28,
                                   8'd28, 8'd32, 8'd28,
                                   8'd28, 8'd28, 8'd28};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int unsigned cycles = 0;

  // mechanism counters
  int n_exact = 0, n_approx = 0, n_better1 = 0;
  int n_pix0 = 0, n_pix1 = 0, n_idle = 0, n_reset = 0;

  logic [N-1:0]    x, y;
  logic [2*N-1:0]  z0, z1;
  logic            rst_n, win_valid;
  logic [8:0][7:0] window;
  logic            pix0_valid, pix1_valid;
  logic [7:0]      pix0, pix1;

  lobam_top dut (
    .x(x), .y(y), .z0(z0), .z1(z1),
    .clk(clk), .rst_n(rst_n), .win_valid(win_valid), .window(window),
    .pix0_valid(pix0_valid), .pix0(pix0), .pix1_valid(pix1_valid), .pix1(pix1)
  );

  // ---------------------------------------------------------------- models
  function automatic longint msb(input longint v);
    longint m = 0;
    for (int j = 0; j < 62; j++) if (v >= (longint'(1) << j)) m = longint'(1) << j;
    return m;
  endfunction

  function automatic longint half_approx(input longint a, input longint b);
    return msb(a) * b + a * msb(b) - msb(a) * msb(b);
  endfunction

  function automatic longint ref_mul(input longint xv, input longint yv, input int n,
                                     input bit with_ll);
    longint h, xh, xl, yh, yl, r;
    h  = longint'(1) << (n / 2);
    xh = xv / h; xl = xv % h;
    yh = yv / h; yl = yv % h;
    r  = half_approx(xh, yh) * h * h + (half_approx(xh, yl) + half_approx(xl, yh)) * h;
    if (with_ll) r += half_approx(xl, yl);
    return r;
  endfunction

  function automatic bit is_pow2_or_zero(input longint v);
    return v == msb(v);
  endfunction

  // 0: LOBAM0, 1: LOBAM1, 2: exact multiplication
  function automatic int ref_pix(input logic [8:0][7:0] w, input int mode);
    longint acc = 128;
    for (int k = 0; k < 9; k++) begin
      if (mode == 2) acc += longint'(w[k]) * longint'(K[k]);
      else           acc += ref_mul(longint'(w[k]), longint'(K[k]), 8, mode == 1);
    end
    acc = acc / 256;
    return (acc > 255) ? 255 : int'(acc);
  endfunction

  // ---------------------------------------------------------- multipliers
  task automatic check_mul(input logic [N-1:0] xv, input logic [N-1:0] yv);
    longint e0, e1, ex;
    x = xv; y = yv;
    #1;
    e0 = ref_mul(longint'(xv), longint'(yv), N, 1'b0);
    e1 = ref_mul(longint'(xv), longint'(yv), N, 1'b1);
    ex = longint'(xv) * longint'(yv);
    checks += 3;
    if (longint'(z0) != e0) begin
      failures++;
      if (failures < 10) $display("FAIL z0 %0d x %0d = %0d, expected %0d", xv, yv, z0, e0);
    end
    if (longint'(z1) != e1) begin
      failures++;
      if (failures < 10) $display("FAIL z1 %0d x %0d = %0d, expected %0d", xv, yv, z1, e1);
    end
    if (!(longint'(z0) <= longint'(z1) && longint'(z1) <= ex)) begin
      failures++;
      if (failures < 10) $display("FAIL ordering %0d x %0d: z0 %0d z1 %0d exact %0d", xv, yv, z0, z1, ex);
    end
    if (longint'(z1) == ex) n_exact++; else n_approx++;
    if (longint'(z1) > longint'(z0)) n_better1++;
  endtask

  // ---------------------------------------------------------------- images
  logic [7:0] img [IMG][IMG];

  function automatic logic [7:0] px(input int r, input int c);
    int rr, cc;
    rr = (r < 0) ? 0 : (r >= IMG) ? IMG - 1 : r;
    cc = (c < 0) ? 0 : (c >= IMG) ? IMG - 1 : c;
    return img[rr][cc];
  endfunction

  task automatic make_image(input int kind);
    for (int r = 0; r < IMG; r++) begin
      for (int c = 0; c < IMG; c++) begin
        int v;
        if (kind == 0) v = (r + c) / 2 + ((((r / 32) + (c / 32)) % 2) * 60) + int'($urandom % 16);
        else           v = 128 + ((r * 7 + c * 3) % 64) - 32 + int'($urandom % 64) - 32;
        img[r][c] = (v > 255) ? 8'd255 : (v < 0) ? 8'd0 : 8'(v);
      end
    end
  endtask

  logic [8:0][7:0] sent_window;
  logic            sent_valid;
  real             se0, se1;
  int              npix_img;
  // sums for a global (whole-image) SSIM against the exact filter:
  // index 0 = LOBAM0 output, 1 = LOBAM1 output, 2 = exact output
  real             s1 [3];
  real             s2 [3];
  real             sx [2];

  function automatic real ssim(input int v);
    real n, mu_a, mu_b, var_a, var_b, cov, c1, c2;
    n     = real'(npix_img);
    mu_a  = s1[2] / n;
    mu_b  = s1[v] / n;
    var_a = s2[2] / n - mu_a * mu_a;
    var_b = s2[v] / n - mu_b * mu_b;
    cov   = sx[v] / n - mu_a * mu_b;
    c1    = (0.01 * 255.0) * (0.01 * 255.0);
    c2    = (0.03 * 255.0) * (0.03 * 255.0);
    return ((2.0 * mu_a * mu_b + c1) * (2.0 * cov + c2)) /
           ((mu_a * mu_a + mu_b * mu_b + c1) * (var_a + var_b + c2));
  endfunction

  always @(posedge clk) begin
    sent_window <= window;
    sent_valid  <= win_valid & rst_n;
  end

  // Output checker: results belong to the window of the previous cycle.
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      checks++;
      if (pix0_valid !== sent_valid || pix1_valid !== sent_valid) begin
        failures++;
        if (failures < 10) $display("FAIL valid timing");
      end
      if (sent_valid) begin
        int r0, r1, rx;
        r0 = ref_pix(sent_window, 0);
        r1 = ref_pix(sent_window, 1);
        rx = ref_pix(sent_window, 2);
        checks += 3;
        if (int'(pix0) != r0) begin
          failures++;
          if (failures < 10) $display("FAIL pix0 %0d expected %0d", pix0, r0);
        end
        if (int'(pix1) != r1) begin
          failures++;
          if (failures < 10) $display("FAIL pix1 %0d expected %0d", pix1, r1);
        end
        if (!(pix0 <= pix1 && int'(pix1) <= rx)) begin
          failures++;
          if (failures < 10) $display("FAIL pixel order %0d %0d %0d", pix0, pix1, rx);
        end
        n_pix0++;
        n_pix1++;
        se0 += real'((rx - int'(pix0)) * (rx - int'(pix0)));
        se1 += real'((rx - int'(pix1)) * (rx - int'(pix1)));
        npix_img++;
        s1[0] += real'(pix0);  s2[0] += real'(pix0) * real'(pix0);
        s1[1] += real'(pix1);  s2[1] += real'(pix1) * real'(pix1);
        s1[2] += real'(rx);    s2[2] += real'(rx) * real'(rx);
        sx[0] += real'(pix0) * real'(rx);
        sx[1] += real'(pix1) * real'(rx);
      end
    end
  end

  task automatic filter_image(input int kind, input bit with_reset);
    real psnr0, psnr1;
    se0 = 0.0; se1 = 0.0; npix_img = 0;
    for (int i = 0; i < 3; i++) begin s1[i] = 0.0; s2[i] = 0.0; end
    sx[0] = 0.0; sx[1] = 0.0;
    make_image(kind);
    for (int r = 0; r < IMG; r++) begin
      for (int c = 0; c < IMG; c++) begin
        // idle cycles in the stream
        while (($urandom % 16) == 0) begin
          @(negedge clk);
          win_valid = 1'b0;
          n_idle++;
        end
        @(negedge clk);
        win_valid = 1'b1;
        for (int k = 0; k < 9; k++) window[k] = px(r + k / 3 - 1, c + k % 3 - 1);
        if (with_reset && r == IMG / 2 && c == 0) begin
          // a reset mid-frame drops the window in flight; resend it after
          rst_n = 1'b0;
          @(posedge clk) #1;
          checks++;
          if (pix0_valid !== 1'b0 || pix1_valid !== 1'b0) begin
            failures++;
            $display("FAIL reset does not clear the valid flags");
          end
          n_reset++;
          @(negedge clk);
          rst_n = 1'b1;
        end
      end
    end
    @(negedge clk) win_valid = 1'b0;
    @(posedge clk) #2;
    psnr0 = (se0 == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * real'(npix_img) / se0);
    psnr1 = (se1 == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * real'(npix_img) / se1);
    $display("image %0d: %0d pixels, PSNR against the exact filter: LOBAM0 %0.2f dB, LOBAM1 %0.2f dB",
             kind, npix_img, psnr0, psnr1);
    $display("image %0d: global SSIM against the exact filter: LOBAM0 %0.4f, LOBAM1 %0.4f",
             kind, ssim(0), ssim(1));
    checks++;
    if (npix_img != IMG * IMG || psnr1 < psnr0 || ssim(1) > 1.0001 || ssim(0) > 1.0001) begin
      failures++;
      $display("FAIL image %0d: %0d pixels filtered", kind, npix_img);
    end
  endtask

  initial begin
    rst_n = 1'b0; win_valid = 1'b0; window = '0; x = '0; y = '0;
    // multipliers
    check_mul(16'hffff, 16'hffff);
    check_mul(16'h0000, 16'h1234);
    check_mul(16'h8000, 16'h8000);
    check_mul(16'h0100, 16'habcd);
    check_mul(16'h7777, 16'h7777);
    for (int i = 0; i < 50000; i++) begin
      check_mul(16'($urandom), 16'($urandom));
    end
    // image smoothing
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    filter_image(0, 1'b0);
    filter_image(1, 1'b1);

    $display("mechanisms: exact %0d, approximated %0d, lobam1 closer %0d, pixels %0d/%0d, idle %0d, reset %0d",
             n_exact, n_approx, n_better1, n_pix0, n_pix1, n_idle, n_reset);
    checks++;
    if (n_exact == 0 || n_approx == 0 || n_better1 == 0 || n_pix0 == 0 ||
        n_pix1 == 0 || n_idle == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles == 1000000) begin
      failures++;
      $display("watchdog: timeout");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule

// tb_isf: self-checking test of the image smoothing filter datapath.
// Two filters, the default one (LOBAM1 multipliers) and one with LOBAM0
// multipliers, get the same stream of random 3x3 windows, with random gaps
// in in_valid and a reset in the middle. The testbench computes each output
// pixel itself: the nine approximate products from the multipliers'
// defining equation, the rounded division by 256 and the clip to 8 bits.
// It checks that each result appears exactly one cycle after its window
// (the filter's latency), that out_valid follows in_valid and that reset
// clears out_valid. It also checks a flat window (every pixel equal) against
// a hand-worked value. A watchdog ends the run with a failure if it does not
// finish in time.
module tb_isf;

  import lobam_pkg::*;

  localparam logic [8:0][7:0] K = {8'd28, 8'd28, 8'd28,
                                   8'd28, 8'd32, 8'd28,
                                   8'd28, 8'd28, 8'd28};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int unsigned cycles = 0;
  int n_out = 0;
  int n_gap = 0;

  logic            rst_n;
  logic            in_valid;
  logic [8:0][7:0] window;
  logic            v1, v0;
  logic [7:0]      p1, p0;

  isf dut1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .window(window),
            .out_valid(v1), .out_pix(p1));
  isf #(.VARIANT(LOBAM0)) dut0 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
            .window(window), .out_valid(v0), .out_pix(p0));

  function automatic int msb(input int v);
    int m = 0;
    for (int j = 0; j < 31; j++) if (v >= (1 << j)) m = 1 << j;
    return m;
  endfunction

  function automatic int half_approx(input int a, input int b);
    return msb(a) * b + a * msb(b) - msb(a) * msb(b);
  endfunction

  function automatic int am8(input int x, input int y, input bit with_ll);
    int r;
    r = half_approx(x / 16, y / 16) * 256
      + (half_approx(x / 16, y % 16) + half_approx(x % 16, y / 16)) * 16;
    if (with_ll) r += half_approx(x % 16, y % 16);
    return r;
  endfunction

  function automatic int ref_pix(input logic [8:0][7:0] w, input bit with_ll);
    int acc = 128;
    for (int k = 0; k < 9; k++) acc += am8(int'(w[k]), int'(K[k]), with_ll);
    acc = acc / 256;
    return (acc > 255) ? 255 : acc;
  endfunction

  logic [8:0][7:0] prev_window;
  logic            prev_valid;

  // Compare each output with the window sampled one cycle earlier.
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      checks++;
      if (v1 !== prev_valid || v0 !== prev_valid) begin
        failures++;
        $display("FAIL valid timing: in %b out %b/%b", prev_valid, v1, v0);
      end
      if (prev_valid) begin
        checks += 2;
        n_out++;
        if (int'(p1) != ref_pix(prev_window, 1'b1)) begin
          failures++;
          if (failures < 10) $display("FAIL lobam1 pixel %0d expected %0d", p1, ref_pix(prev_window, 1'b1));
        end
        if (int'(p0) != ref_pix(prev_window, 1'b0)) begin
          failures++;
          if (failures < 10) $display("FAIL lobam0 pixel %0d expected %0d", p0, ref_pix(prev_window, 1'b0));
        end
      end else begin
        n_gap++;
      end
    end
  end

  always @(posedge clk) begin
    prev_window <= window;
    prev_valid  <= in_valid & rst_n;
  end

  task automatic drive(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      for (int k = 0; k < 9; k++) window[k] = 8'($urandom);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b1; window = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (v1 !== 1'b0 || v0 !== 1'b0) begin
      failures++;
      $display("FAIL reset does not clear out_valid");
    end
    @(negedge clk) rst_n = 1'b1;
    // Flat window of 200: each product 200*28 or 200*32 in LOBAM1 is
    //   200 = 0xC8, 28 = 0x1C: XH*YH = 12*1 exact, XH*YL = 12*12 ~ 8*12+12*8-64 = 128,
    //   XL*YH = 8*1 exact, XL*YL = 8*12 exact (8 is a power of two)
    //   -> 12*256 + (128+8)*16 + 96 = 5344 (exact 5600); 200*32 = 6400 exact.
    //   (8*5344 + 6400 + 128) / 256 = 192.5 -> 192.
    for (int k = 0; k < 9; k++) window[k] = 8'd200;
    @(posedge clk);
    #2;
    checks++;
    if (p1 !== 8'd192) begin
      failures++;
      $display("FAIL flat window: %0d, expected 192", p1);
    end
    drive(3000);
    // reset in the middle of the stream
    @(negedge clk) rst_n = 1'b0;
    @(posedge clk) #1;
    checks++;
    if (v1 !== 1'b0 || v0 !== 1'b0) begin
      failures++;
      $display("FAIL reset in stream does not clear out_valid");
    end
    @(negedge clk) rst_n = 1'b1;
    drive(3000);
    @(negedge clk) in_valid = 1'b0;
    @(posedge clk);
    @(posedge clk);
    #2;
    checks++;
    if (n_out < 1000 || n_gap < 100) begin
      failures++;
      $display("FAIL too few outputs (%0d) or gaps (%0d)", n_out, n_gap);
    end
    $display("outputs %0d, idle cycles %0d", n_out, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles == 20000) begin
      failures++;
      $display("watchdog: timeout");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule

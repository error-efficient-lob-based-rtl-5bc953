// tb_lob_unit: exhaustive self-checking test of the leading-one-bit unit.
// The default 8-bit unit and a 5-bit one see every input value; the one-hot
// mask and the binary position are compared with a reference that scans the
// input from its top bit down. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_lob_unit;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int unsigned cycles = 0;

  logic [7:0] a8, ld8;
  logic [2:0] pos8;
  logic [4:0] a5, ld5;
  logic [2:0] pos5;

  lob_unit dut8 (.a(a8), .ld(ld8), .pos(pos8));
  lob_unit #(.W(5)) dut5 (.a(a5), .ld(ld5), .pos(pos5));

  function automatic int top_bit(input int v, input int w);
    for (int j = w - 1; j >= 0; j--) if (v[j]) return j;
    return -1;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      int t8, t5;
      @(posedge clk);
      a8 = 8'(v);
      a5 = 5'(v);
      #1;
      t8 = top_bit(v, 8);
      t5 = top_bit(v % 32, 5);
      checks += 2;
      if (ld8 !== ((t8 < 0) ? 8'd0 : 8'(1) << t8) || pos8 !== ((t8 < 0) ? 3'd0 : 3'(t8))) begin
        failures++;
        $display("FAIL w8 a=%b ld=%b pos=%0d", a8, ld8, pos8);
      end
      if (ld5 !== ((t5 < 0) ? 5'd0 : 5'(1) << t5) || pos5 !== ((t5 < 0) ? 3'd0 : 3'(t5))) begin
        failures++;
        $display("FAIL w5 a=%b ld=%b pos=%0d", a5, ld5, pos5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles == 10000) begin
      failures++;
      $display("watchdog: timeout");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule

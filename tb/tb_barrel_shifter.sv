// tb_barrel_shifter: exhaustive self-checking test of the barrel shifter.
// Every 8-bit input and every 3-bit amount of the default instance, and a
// 4-bit-in, 12-bit-out instance with a 4-bit amount, are compared with the
// shift computed as a multiplication by a power of two. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_barrel_shifter;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int unsigned cycles = 0;

  logic [7:0]  d8;
  logic [2:0]  s8;
  logic [15:0] q8;
  logic [3:0]  d4;
  logic [3:0]  s4;
  logic [11:0] q4;

  barrel_shifter dut (.din(d8), .amt(s8), .dout(q8));
  barrel_shifter #(.W_IN(4), .W_OUT(12), .SH_W(4)) dut4 (.din(d4), .amt(s4), .dout(q4));

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int s = 0; s < 16; s++) begin
        int unsigned e8, e4;
        @(posedge clk);
        d8 = 8'(v); s8 = 3'(s);
        d4 = 4'(v); s4 = 4'(s);
        #1;
        e8 = v * (2 ** (s % 8));
        e4 = ((v % 16) * (2 ** s)) % 4096;
        checks += 2;
        if (q8 !== 16'(e8)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d << %0d = %0d", d8, s8, q8);
        end
        if (q4 !== 12'(e4)) begin
          failures++;
          if (failures < 10) $display("FAIL4 %0d << %0d = %0d", d4, s4, q4);
        end
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

// tb_hc_adder: self-checking test of the Han-Carlson adder.
// Two instances, the default 16-bit one and a 33-bit one (odd width, more
// prefix levels), get corner cases (all ones plus one, alternating bits,
// carry in) and random operands; sum and carry out are compared with the
// exact sum a + b + cin computed by the testbench. A watchdog ends the run
// with a failure if it does not finish in time.
module tb_hc_adder;

  localparam int WA = 16;
  localparam int WB = 33;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int unsigned cycles = 0;

  logic [WA-1:0] a16, b16, s16;
  logic          ci16, co16;
  logic [WB-1:0] a33, b33, s33;
  logic          ci33, co33;

  hc_adder dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  hc_adder #(.W(WB)) dut33 (.a(a33), .b(b33), .cin(ci33), .sum(s33), .cout(co33));

  task automatic check;
    logic [WA:0] e16;
    logic [WB:0] e33;
    e16 = {1'b0, a16} + {1'b0, b16} + (WA+1)'(ci16);
    e33 = {1'b0, a33} + {1'b0, b33} + (WB+1)'(ci33);
    checks += 2;
    if ({co16, s16} !== e16) begin
      failures++;
      if (failures < 10) $display("FAIL w16 %h+%h+%b = %h, expected %h", a16, b16, ci16, {co16, s16}, e16);
    end
    if ({co33, s33} !== e33) begin
      failures++;
      if (failures < 10) $display("FAIL w33 %h+%h+%b = %h, expected %h", a33, b33, ci33, {co33, s33}, e33);
    end
  endtask

  initial begin
    // corner cases
    a16 = '1; b16 = '0; ci16 = 1'b1; a33 = '1; b33 = '0; ci33 = 1'b1; #1 check();
    a16 = '1; b16 = '1; ci16 = 1'b1; a33 = '1; b33 = '1; ci33 = 1'b1; #1 check();
    a16 = 16'h5555; b16 = 16'haaaa; ci16 = 1'b1;
    a33 = {1'b0, {16{2'b01}}}; b33 = {1'b1, {16{2'b10}}}; ci33 = 1'b1; #1 check();
    a16 = '0; b16 = '0; ci16 = 1'b0; a33 = '0; b33 = '0; ci33 = 1'b0; #1 check();
    for (int i = 0; i < WB; i++) begin
      a16 = WA'(1) << (i % WA); b16 = '1; ci16 = 1'b0;
      a33 = WB'(1) << i;        b33 = '1; ci33 = 1'b0; #1 check();
    end
    // random operands
    repeat (20000) begin
      @(posedge clk);
      a16 = WA'($urandom); b16 = WA'($urandom); ci16 = 1'($urandom);
      a33 = {1'($urandom), $urandom}; b33 = {1'($urandom), $urandom}; ci33 = 1'($urandom);
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles == 100000) begin
      failures++;
      $display("watchdog: timeout");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule

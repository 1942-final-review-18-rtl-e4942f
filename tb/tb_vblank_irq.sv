// tb_vblank_irq: frame interrupt. A vsync pulse (from an unrelated clock)
// must raise int_n low within 3 CPU cycles, hold it until acknowledged, put the
// restart vector on the bus only during the acknowledge, and raise one request
// per vsync; an acknowledge without a request must not drive the bus.
`timescale 1ns/1ps
module tb_vblank_irq;
  logic clk = 0, rst = 1; always #80 clk = ~clk;
  logic vs = 0, m1_n = 1, iorq_n = 1, int_n, oe; logic [7:0] vec;
  vblank_irq dut (.clk, .rst, .vsync(vs), .m1_n, .iorq_n, .int_n, .vec, .vec_oe(oe));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk); check(int_n && !oe, "idle");
    @(negedge clk); m1_n = 0; iorq_n = 0; @(negedge clk); check(!oe, "no vector without request");
    m1_n = 1; iorq_n = 1;
    for (int f = 0; f < 4; f++) begin
      int lat;
      #37 vs = 1; lat = 0;
      while (int_n) begin @(negedge clk); lat++; end
      check(lat <= 4, $sformatf("interrupt latency %0d", lat));
      #2000 vs = 0;
      repeat (10) @(negedge clk); check(!int_n, "held until acknowledged");
      m1_n = 0; @(negedge clk); check(!oe, "M1 alone is not an acknowledge");
      iorq_n = 0; #1 check(oe && vec == 8'hD7, "vector on acknowledge");
      @(negedge clk); check(oe, "vector held through acknowledge");
      m1_n = 1; iorq_n = 1; #1 check(!oe, "bus released");
      @(negedge clk); check(int_n, "request cleared");
      repeat (20) @(negedge clk); check(int_n, "only one request per vsync");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

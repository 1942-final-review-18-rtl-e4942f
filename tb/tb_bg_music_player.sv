// tb_bg_music_player: the slave board's music. Turning the link on must start
// at sample 0 and step one sample per request, wrapping at the ROM end (small
// depth here); turning it off must give silence; on again restarts.
`timescale 1ns/1ps
module tb_bg_music_player;
  localparam int D = 32;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic on = 0, req = 0, playing; logic [4:0] ra; logic [15:0] q, smp;
  bg_music_player #(.DEPTH(D), .WIDTH(16)) dut (.clk, .rst, .music_on(on), .sample_req(req), .rom_addr(ra), .rom_q(q), .sample(smp), .playing);
  always_ff @(posedge clk) q <= 16'h4000 + 16'(ra);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  task automatic tick(); @(negedge clk); req = 1; @(negedge clk); req = 0; @(negedge clk); endtask
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    tick(); check(smp == 0, "silent");
    on = 1; repeat (4) @(negedge clk);
    for (int i = 0; i < 2 * D + 5; i++) begin tick(); check(smp == 16'h4000 + 16'(i % D), $sformatf("sample %0d", i)); end
    on = 0; repeat (4) @(negedge clk); tick(); check(smp == 0 && !playing, "off");
    on = 1; repeat (4) @(negedge clk); tick(); check(smp == 16'h4000, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_sound_controller: every sound code of the table. Each foreground code
// must select its own ROM and play from sample 0, one sample per request;
// a new code restarts; a sound stops after its last sample (small ROM depth
// here); codes 11/10 switch the music link; unknown codes change nothing.
`timescale 1ns/1ps
module tb_sound_controller;
  import arcade_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst = 1; always #5 clk = ~clk;
  logic cwr = 0, req = 0, playing, mus; logic [7:0] code = 0; logic [5:0] ra; logic [15:0] q [6], smp;
  fg_sound_e cur;
  sound_controller #(.DEPTH(D), .WIDTH(16)) dut (.clk, .rst, .code_wr(cwr), .code, .sample_req(req),
    .rom_addr(ra), .rom_q(q), .sample(smp), .playing, .current(cur), .bg_music_on(mus));
  // six ROMs: sound k word a = k*1000 + a + 1
  always_ff @(posedge clk) for (int k = 0; k < 6; k++) q[k] <= 16'(k * 1000 + ra + 1);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  task automatic send(input logic [7:0] c); @(negedge clk); code = c; cwr = 1; @(negedge clk); cwr = 0; @(negedge clk); endtask
  task automatic tick(); @(negedge clk); req = 1; @(negedge clk); req = 0; @(negedge clk); endtask
  logic [7:0] codes [6] = '{8'h04, 8'h06, 8'h02, 8'h0D, 8'h12, 8'h07};
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    tick(); check(smp == 0 && !playing, "silent after reset");
    for (int k = 0; k < 6; k++) begin
      send(codes[k]); check(playing, "playing after code");
      for (int i = 0; i < 5; i++) begin tick(); check(smp == 16'(k * 1000 + i + 1), $sformatf("code %h sample %0d = %0d", codes[k], i, smp)); end
    end
    send(8'h04); for (int i = 0; i < 3; i++) tick();
    send(8'h04); tick(); check(smp == 16'd1, "restart at sample 0");
    for (int i = 1; i < D; i++) tick();
    check(smp == 16'(D), "last sample"); check(!playing, "stopped after last sample");
    tick(); check(smp == 0, "silent after the end");
    send(8'h33); check(!playing && !mus, "unknown code ignored");
    send(8'h11); check(mus, "music on");
    send(8'h04); check(mus, "music unaffected by effect");
    send(8'h10); check(!mus, "music off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

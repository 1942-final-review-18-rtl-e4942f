// tb_tdp_ram: dual-clock true dual-port RAM. Port A (slow clock) writes and
// reads random words while port B (fast, unrelated clock) reads; both ports
// are checked against a reference array, including data written through one
// port and read through the other.
`timescale 1ns/1ps
module tb_tdp_ram;
  logic ca = 0, cb = 0; always #80 ca = ~ca; always #20 cb = ~cb;
  logic wa = 0, wb = 0; logic [10:0] aa = 0, ab = 0; logic [7:0] da = 0, db = 0, qa, qb;
  tdp_ram dut (.clk_a(ca), .we_a(wa), .addr_a(aa), .d_a(da), .q_a(qa), .clk_b(cb), .we_b(wb), .addr_b(ab), .d_b(db), .q_b(qb));
  logic [7:0] m [2048];
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 2048; i++) begin @(negedge ca); wa = 1; aa = 11'(i); da = 8'(i * 7); m[i] = da; end
    @(negedge ca); wa = 0;
    // port B writes the top quarter, port A reads it back
    for (int i = 1536; i < 2048; i++) begin @(negedge cb); wb = 1; ab = 11'(i); db = 8'(i ^ 8'h3C); m[i] = db; end
    @(negedge cb); wb = 0;
    fork
      for (int i = 0; i < 400; i++) begin
        @(negedge ca); aa = 11'($urandom); @(negedge ca);
        checks++; if (qa !== m[aa]) begin failures++; $display("FAIL A %0d", aa); end
      end
      for (int i = 0; i < 1600; i++) begin
        @(negedge cb); ab = 11'($urandom); @(negedge cb);
        checks++; if (qb !== m[ab]) begin failures++; $display("FAIL B %0d", ab); end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_sram: self-checking test of the static RAM model at the program RAM size
// (128k x 48). Writes a pattern computed from the address across the whole
// array, reads it back with the one-clock read latency, and checks that a
// deselected cycle neither writes nor changes the read data.
module tb_sram;
  localparam int DEPTH = 131072;
  logic clk = 0, cs = 0, we = 0;
  logic [16:0] addr = '0;
  logic [47:0] d = '0, q;
  int checks = 0, failures = 0;

  sram dut (.*);

  always #5 clk = ~clk;

  function automatic logic [47:0] pat(input int a);
    return {16'(a * 40503), 16'(a ^ 16'h5A5A), 16'(a)};
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      cs <= 1; we <= 1; addr <= 17'(a); d <= pat(a);
      @(posedge clk);
    end
    // deselected write must not change memory
    cs <= 0; we <= 1; addr <= 17'd77; d <= '1;
    @(posedge clk);
    for (int a = 0; a < DEPTH; a += 37) begin
      cs <= 1; we <= 0; addr <= 17'(a);
      @(posedge clk); #1;
      checks++;
      if (q !== pat(a)) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d read %h expected %h", a, q, pat(a));
      end
    end
    cs <= 1; we <= 0; addr <= 17'd77; @(posedge clk); #1;
    checks++; if (q !== pat(77)) begin failures++; $display("FAIL: deselected write"); end
    cs <= 0; addr <= 17'd5; @(posedge clk); #1;
    checks++; if (q !== pat(77)) begin failures++; $display("FAIL: q changed while deselected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

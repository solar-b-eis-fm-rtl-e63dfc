// tb_watchdog: self-checking test of the watchdog with a short period (1000
// clocks in place of 16 s). Checks that regular counter resets prevent a trip,
// that a missed reset trips exactly PERIOD clocks after the last one with a
// REBOOT_LEN-clock reboot pulse, that the WARM-REBOOT flag is set, readable and
// clearable, that disabling stops the counter, and that only por clears it.
module tb_watchdog;
  localparam int PERIOD = 1000, RLEN = 16;
  logic clk = 0, por = 1, wr = 0, rd = 0;
  logic [7:0] wdata = '0, rdata;
  logic reboot, flag, enabled;
  int checks = 0, failures = 0, n_reboot = 0;
  longint cyc = 0, t_kick, t_trip;

  watchdog #(.PERIOD(PERIOD), .REBOOT_LEN(RLEN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (!por && reboot && !$past(reboot)) begin n_reboot++; t_trip = cyc; end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wreg(input logic [7:0] v);
    wr <= 1; wdata <= v; @(posedge clk); wr <= 0; wdata <= '0;
  endtask
  task automatic rreg(output logic [7:0] v);
    rd <= 1; @(posedge clk); rd <= 0; #1; v = rdata;
  endtask

  initial begin
    logic [7:0] v;
    repeat (3) @(posedge clk);
    por <= 0;
    rreg(v);
    check(v[1:0] == 2'b10, "enabled, flag clear after power-on");
    // kick every 900 clocks: no trip
    for (int i = 0; i < 5; i++) begin repeat (899) @(posedge clk); wreg(8'h01); end
    check(n_reboot == 0, "no trip while kicked");
    t_kick = cyc;
    repeat (PERIOD + 5) @(posedge clk);
    check(n_reboot == 1, "trip after a missed kick");
    check(t_trip - t_kick >= PERIOD && t_trip - t_kick <= PERIOD + 2,
          $sformatf("trip %0d clocks after the kick", t_trip - t_kick));
    check(flag, "WARM-REBOOT flag set");
    repeat (RLEN + 2) @(posedge clk);
    check(!reboot, "reboot pulse ended");
    rreg(v);
    check(v[0] == 1'b1, "flag readable");
    wreg(8'h02);
    rreg(v);
    check(v[0] == 1'b0, "flag cleared by software");
    // disable: no trip
    wreg(8'h04);
    rreg(v);
    check(v[1] == 1'b0, "disabled flag readable");
    repeat (3 * PERIOD) @(posedge clk);
    check(n_reboot == 1, "no trip while disabled");
    wreg(8'h0C); #1;
    check(enabled, "re-enabled");
    repeat (PERIOD + 5) @(posedge clk);
    check(n_reboot == 2, "trips again once enabled");
    por <= 1; @(posedge clk); por <= 0; @(posedge clk);
    check(!flag && enabled, "power-on reset clears the flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

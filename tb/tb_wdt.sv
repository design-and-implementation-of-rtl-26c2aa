// tb_wdt: watchdog with a short limit (20 ticks of the 8 ms strobe, 5 ms
// pulse) and fast strobes generated here. Checks: the pulse comes exactly
// WDT_LIMIT 8 ms strobes after counting starts; it lasts PULSE_MS 1 ms strobes;
// it sets the occurred status, which a clear telecommand resets; regular
// data-ready pulses keep it quiet; a disabled watchdog never fires; reset
// clears the status.
`timescale 1ns/1ps
module tb_wdt;
  localparam int LIMIT = 20, PMS = 5;
  localparam int P1MS = 10, P8MS = 80;   // strobe periods in clocks
  logic clk = 1'b0, rst = 1'b1;
  logic tick_8ms, tick_1ms, drdy_pulse = 1'b0, tc_wdt_en = 1'b0, tc_wdt_clr = 1'b0;
  logic wdt_occ_sts, wdt_en_sts, wdt_pulse;
  int checks = 0, failures = 0;
  int c1 = 0, c8 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    c1 <= (c1 == P1MS - 1) ? 0 : c1 + 1;
    c8 <= (c8 == P8MS - 1) ? 0 : c8 + 1;
  end
  assign tick_1ms = (c1 == P1MS - 1);
  assign tick_8ms = (c8 == P8MS - 1);

  wdt #(.WDT_LIMIT(LIMIT), .PULSE_MS(PMS)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n8, n1;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(!wdt_occ_sts && !wdt_pulse, "quiet after reset");
    check(!wdt_en_sts, "disabled after reset");
    // disabled: no pulse over 3x the limit
    repeat (3 * LIMIT * P8MS) @(posedge clk);
    check(!wdt_pulse && !wdt_occ_sts, "disabled watchdog stays quiet");
    // enable right after an 8 ms strobe, count strobes until the pulse
    while (!tick_8ms) @(posedge clk);
    tc_wdt_en <= 1'b1;
    n8 = 0;
    @(posedge clk);
    check(wdt_en_sts, "enable status follows telecommand");
    while (!wdt_pulse) begin @(posedge clk); if (tick_8ms) n8++; end
    check(n8 == LIMIT, $sformatf("fired after %0d 8 ms strobes, expected %0d", n8, LIMIT));
    check(wdt_occ_sts, "occurred status set");
    n1 = 0;
    while (wdt_pulse) begin if (tick_1ms) n1++; @(posedge clk); end
    check(n1 == PMS, $sformatf("pulse lasted %0d 1 ms strobes, expected %0d", n1, PMS));
    check(wdt_occ_sts, "occurred status sticky");
    // clear by telecommand
    tc_wdt_clr <= 1'b1; @(posedge clk); tc_wdt_clr <= 1'b0; @(posedge clk);
    check(!wdt_occ_sts, "occurred status cleared");
    // data ready every LIMIT/2 strobes keeps it quiet
    for (int k = 0; k < 8; k++) begin
      repeat (LIMIT / 2 * P8MS) begin @(posedge clk); check(!wdt_pulse, "no pulse while data ready arrives"); end
      drdy_pulse <= 1'b1; @(posedge clk); drdy_pulse <= 1'b0;
    end
    // stop data ready: fires again within LIMIT+1 strobes
    n8 = 0;
    while (!wdt_pulse && n8 <= LIMIT + 1) begin @(posedge clk); if (tick_8ms) n8++; end
    check(wdt_pulse, "fires again when data ready stops");
    check(n8 == LIMIT, $sformatf("second firing after %0d strobes", n8));
    // disabling mid-count: back to idle, no pulse
    while (wdt_pulse) @(posedge clk);
    repeat (LIMIT / 2 * P8MS) @(posedge clk);
    tc_wdt_en <= 1'b0;
    repeat (2 * LIMIT * P8MS) begin @(posedge clk); check(!wdt_pulse, "no pulse after disable"); end
    // reset clears status
    rst <= 1'b1; @(posedge clk); @(posedge clk); rst <= 1'b0; @(posedge clk);
    check(!wdt_occ_sts, "reset clears occurred status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

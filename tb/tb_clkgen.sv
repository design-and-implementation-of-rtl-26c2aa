// tb_clkgen: checks the periods of every strobe and divided clock of clkgen
// at its default (24 MHz) settings, that each strobe is one cycle wide, and
// that reset restarts the counters (first 1 us strobe 24 cycles after reset).
`timescale 1ns/1ps
module tb_clkgen;
  logic clk = 1'b0, rst = 1'b1;
  logic tick_1us, tick_26us, tick_500us, tick_1ms, tick_8ms;
  logic clk12m, clk1m, clk26us, clk2k, clk1ms, clk8ms;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #20.833 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  clkgen dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // measure the distance between rising edges of a signal, after a warm-up
  longint last [12];
  int     seen [12];
  longint expect_p [12] = '{24, 624, 12000, 24000, 192000, 2, 24, 624, 12000, 24000, 192000, 0};
  logic [10:0] sig, sig_q;
  assign sig = {clk8ms, clk1ms, clk2k, clk26us, clk1m, clk12m,
                tick_8ms, tick_1ms, tick_500us, tick_26us, tick_1us};

  initial for (int i = 0; i < 12; i++) begin last[i] = -1; seen[i] = 0; end

  always @(posedge clk) if (!rst) begin
    sig_q <= sig;
    for (int i = 0; i < 11; i++) begin
      if (sig[i] && !sig_q[i]) begin
        if (last[i] >= 0) begin
          check(cyc - last[i] == expect_p[i],
                $sformatf("signal %0d period %0d expected %0d", i, cyc - last[i], expect_p[i]));
          seen[i]++;
        end
        last[i] = cyc;
      end
    end
    // strobes are one cycle wide
    for (int i = 0; i < 5; i++) if (sig[i] && sig_q[i]) check(0, $sformatf("strobe %0d wider than one cycle", i));
  end

  initial begin
    sig_q = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // first 1 us strobe: one full period after release
    begin
      longint t0;
      @(posedge clk); t0 = cyc;
      while (!tick_1us) @(posedge clk);
      check(cyc - t0 == 24, $sformatf("first 1us tick after %0d cycles", cyc - t0));
    end
    repeat (420000) @(posedge clk);
    for (int i = 0; i < 11; i++) check(seen[i] > 0, $sformatf("signal %0d never repeated", i));
    // reset in the middle restarts
    rst <= 1'b1; @(posedge clk); @(posedge clk);
    check(!tick_1us && !tick_1ms && !clk12m, "outputs cleared in reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

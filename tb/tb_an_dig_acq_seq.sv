// tb_an_dig_acq_seq: acquisition sequencer with the 26 us strobe replaced by
// one strobe every 4 clocks. A model ADC returns a value made of the channel
// and the sequence number. Checks: every channel's latch holds its own
// sample; SOC pulses once per channel for one strobe, 23 strobes apart (about
// 600 us at 26 us); a full sequence is 8 x 23 = 184 strobes (about 4.8 ms);
// the digital inputs are those present when the sequence started; dropping
// the enable stops the sequencer.
`timescale 1ns/1ps
module tb_an_dig_acq_seq;
  import trrt_pkg::*;
  localparam int TP = 4;
  logic clk = 1'b0, rst = 1'b1, tick, en = 1'b0;
  adc_t adc_data;
  logic [N_DIG-1:0] digital_in = 4'h0;
  logic soc, seq_done;
  logic [2:0] amux_sel;
  adc_t an_latch [N_ANCH];
  logic [N_DIG-1:0] dig_latch;
  int checks = 0, failures = 0;
  int tc = 0, seqno = 0;
  longint ticks = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tc <= (tc == TP - 1) ? 0 : tc + 1;
  assign tick = (tc == TP - 1);
  always @(posedge clk) if (tick) ticks <= ticks + 1;

  // ADC model: sample = {sequence number, channel}, valid at all times
  assign adc_data = adc_t'((seqno << 4) | amux_sel) ^ 12'hA50;

  an_dig_acq_seq dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // SOC spacing and width
  longint last_soc = -1; int soc_cnt = 0; logic soc_q = 0;
  always @(posedge clk) if (!rst) begin
    soc_q <= soc;
    if (soc && !soc_q) begin
      if (last_soc >= 0 && amux_sel != 0)
        check(ticks - last_soc == 23, $sformatf("SOC spacing %0d strobes", ticks - last_soc));
      last_soc = ticks; soc_cnt++;
    end
  end
  longint soc_hi = 0;
  always @(posedge clk) if (soc) soc_hi <= soc_hi + 1;

  longint t_start, t_done, t_prev;
  logic [N_DIG-1:0] dig_at_start;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 4; s++) begin
      digital_in <= 4'(s * 3 + 5);
      @(posedge clk);
      if (s == 0) begin
        en <= 1'b1;
        while (!(tick && dut.state == dut.IDLE)) @(posedge clk);
      end
      dig_at_start = digital_in;
      t_start = ticks;
      // change the digital inputs in the middle
      repeat (50 * TP) @(posedge clk);
      digital_in <= ~digital_in;
      while (!seq_done) @(posedge clk);
      t_done = ticks;
      if (s > 0)
        check(t_done - t_prev == 8 * 23,
              $sformatf("sequence took %0d strobes", t_done - t_prev));
      t_prev = t_done;
      @(posedge clk);
      for (int ch = 0; ch < N_ANCH; ch++)
        check(an_latch[ch] == (adc_t'((seqno << 4) | ch) ^ 12'hA50),
              $sformatf("seq %0d ch %0d latch %h", s, ch, an_latch[ch]));
      check(dig_latch == dig_at_start, $sformatf("digital latch %h expected %h", dig_latch, dig_at_start));
      seqno++;
    end
    check(soc_cnt >= 4 * 8, $sformatf("SOC count %0d", soc_cnt));
    check(soc_hi == longint'(soc_cnt) * TP, $sformatf("SOC high %0d clocks for %0d pulses", soc_hi, soc_cnt));
    // drop enable: stops
    repeat (5 * TP) @(posedge clk);
    en <= 1'b0;
    repeat (30 * TP) @(posedge clk);
    begin
      int c0;
      c0 = soc_cnt;
      repeat (400 * TP) @(posedge clk);
      check(soc_cnt == c0, $sformatf("no conversions while disabled %0d %0d", soc_cnt, c0));
      check(dut.state == dut.IDLE, "idle while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

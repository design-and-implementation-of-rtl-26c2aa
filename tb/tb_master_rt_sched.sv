// tb_master_rt_sched: master scheduler with a 500 us strobe every 10 clocks
// and a model data-ready scheduler that answers each start with `dr_eof`,
// usually within the same strobe period and sometimes several periods later.
// Checks: nothing starts before `eof_prominit`; the flags follow RDDRDY,
// then TC_UPDT, with REFRESH in place of TC_UPDT on every RF_EN-th (40th)
// round; RDDRDY waits for `dr_eof`; with a quick `dr_eof` the data-ready word
// is polled every 2 strobes (1 ms); a falling `eof_prominit` stops everything.
`timescale 1ns/1ps
module tb_master_rt_sched;
  import trrt_pkg::*;
  localparam int TP = 10;
  localparam int RF = 40;
  logic clk = 1'b0, rst = 1'b1, tick, eof_prominit = 1'b0, dr_eof = 1'b0;
  subseq_e subseq;
  logic drdy_start, tc_start, refresh_start, an_seq_en, busy;
  int checks = 0, failures = 0;
  int tcnt = 0;
  longint ticks = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tcnt <= (tcnt == TP - 1) ? 0 : tcnt + 1;
  assign tick = (tcnt == TP - 1);
  always @(posedge clk) if (tick) ticks <= ticks + 1;

  master_rt_sched dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // model data-ready scheduler
  int slow_every = 7;
  int n_drdy = 0;
  bit pending = 0;
  longint eof_tick = 0;
  initial forever begin
    @(posedge clk);
    if (drdy_start) begin
      n_drdy++;
      check(subseq == DRDY_FLAG, "SubSeqFlag is DRDY while data ready runs");
      pending = 1;
      fork begin
        automatic int d = (n_drdy % slow_every == 0) ? 3 * TP + 2 : 2;
        repeat (d) @(posedge clk);
        dr_eof <= 1'b1; @(posedge clk); dr_eof <= 1'b0;
        eof_tick = ticks;
      end join_none
    end
  end

  // flag sequence recorder
  string seq = "";
  longint last_drdy = -1;
  int n_tc = 0, n_rf = 0, n_fast_gap = 0, k_drdy = 0;
  bit prev_slow = 0;
  int tc_at_rf3 = 0;
  always @(posedge clk) if (!rst) begin
    check(int'(drdy_start) + int'(tc_start) + int'(refresh_start) <= 1, "one flag at a time");
    if (tc_start) begin seq = {seq, "T"}; n_tc++; check(subseq == TC_FLAG, "TC flag level"); end
    if (refresh_start) begin seq = {seq, "R"}; n_rf++; check(subseq == REFRESH_FLAG, "REFRESH flag level"); end
    if (drdy_start) begin
      seq = {seq, "D"};
      k_drdy++;
      if (last_drdy >= 0 && !prev_slow) begin
        check(ticks - last_drdy == 2, $sformatf("poll gap %0d strobes", ticks - last_drdy));
        n_fast_gap++;
      end
      last_drdy = ticks;
      prev_slow = (k_drdy % slow_every == 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (20 * TP) @(posedge clk);
    check(seq.len() == 0 && !an_seq_en && !busy, "idle before end of init");
    eof_prominit <= 1'b1;
    @(posedge clk);
    while (!drdy_start) @(posedge clk);
    check(an_seq_en && busy, "acquisition enabled once running");
    // run 3 refresh periods
    while (n_rf < 3) @(posedge clk);
    tc_at_rf3 = n_tc;
    repeat (3 * TP) @(posedge clk);
    // check the recorded sequence: D then T or R, R on every 40th round
    begin
      automatic int round = 0;
      automatic bit ok = 1;
      for (int i = 0; i + 1 < seq.len(); i += 2) begin
        round++;
        if (seq[i] != "D") ok = 0;
        if (seq[i + 1] != ((round % RF == 0) ? "R" : "T")) ok = 0;
      end
      check(ok, "flag order D,T,...,D,R every 40th round");
      check(tc_at_rf3 == 3 * (RF - 1), $sformatf("%0d TC updates for 3 refreshes", tc_at_rf3));
    end
    check(n_fast_gap > 50, "1 ms polling observed");
    // slow dr_eof: RDDRDY waits (no T right after a slow D)
    // (covered by the order check: a slow D is never followed early)
    eof_prominit <= 1'b0;
    repeat (2) @(posedge clk);
    check(!busy && !an_seq_en && subseq == SUB_NONE, "back to MASIDLE on re-init");
    begin
      automatic int l = seq.len();
      repeat (30 * TP) @(posedge clk);
      check(seq.len() == l, "no flags while not initialised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

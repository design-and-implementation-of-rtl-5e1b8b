// obs_scheduler_tb: end-to-end test of the 16-channel scheduler at its
// default parameters.
//
// Bursts are issued back to back whenever ready allows (one every five
// cycles), first the 18 requests shown in the published waveforms, then
// episodes of random traffic of the same shape (arrival 45000..95000,
// length 9000..25000) mixed with bursts aimed at existing voids. For every
// request the testbench searches sixteen reference channel models
// (obs_ref_pkg), picks the LAUC-VF channel itself (smallest gap between void
// start and arrival, lowest channel on a tie, 0 if none) and compares it with
// sel_ch_no; it checks that finish comes exactly five cycles after the
// accepting edge, that the booked burst overlaps no burst already on that
// channel, and the per-channel drop flags. It counts each mechanism of the
// design (booking, blocking, void filling, back-to-back requests, choice
// among several feasible channels, tie, removed and dropped voids) and fails
// if one never happened.
module obs_scheduler_tb;
  import obs_ref_pkg::*;
  localparam int unsigned NC = 16, NS = 64, TW = 17, SH = 11;
  localparam int unsigned TMAX = (1 << TW) - 1;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [TW-1:0] bhp_arr = 0, bhp_dep = 0;
  logic          ready, finish;
  logic [4:0]    sel_ch_no;
  logic [NC-1:0] void_drop;

  int checks = 0, failures = 0, cycles = 0;
  int n_req = 0, n_booked = 0, n_blocked = 0, n_fill = 0, n_b2b = 0;
  int n_multi = 0, n_tie = 0, n_left_gone = 0, n_drop = 0;

  obs_channel_model #(NS, TW, SH) ch [NC];

  obs_scheduler dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 400000) begin
      failures++;
      $display("watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycles, msg);
  endtask

  // Issue one request at the next edge where ready is high, then check the
  // result at finish. Returns when the update cycle is in progress, so the
  // next call can start in that same cycle.
  task automatic schedule(input int unsigned ta, input int unsigned te);
    int unsigned gap, best_gap;
    int          best, n_ok, n_best, waited;
    bit          ok, exp_drop;
    bit          was_update;
    // wait for ready (sampled at negedge)
    while (!ready) @(negedge clk);
    was_update = finish;
    start   = 1;
    bhp_arr = TW'(ta);
    bhp_dep = TW'(te);
    @(negedge clk);
    start = 0;
    if (was_update) n_b2b++;
    n_req++;
    // reference LAUC-VF choice on the current state
    best = 0; best_gap = 0; n_ok = 0; n_best = 0;
    for (int c = 0; c < NC; c++) begin
      ok = ch[c].search(ta, te, gap);
      if (ok) begin
        n_ok++;
        if (best == 0 || gap < best_gap) begin
          best = c + 1; best_gap = gap; n_best = 1;
        end else if (gap == best_gap) n_best++;
      end
    end
    if (n_ok > 1) n_multi++;
    if (n_best > 1) n_tie++;
    // finish must come exactly five cycles after the accepting edge
    waited = 1;
    while (!finish && waited < 10) begin
      @(negedge clk);
      waited++;
    end
    checks++;
    if (waited != 5) fail($sformatf("finish after %0d cycles", waited));
    checks++;
    if (int'(sel_ch_no) != best) fail($sformatf("burst %0d..%0d: channel %0d expected %0d", ta, te, sel_ch_no, best));
    if (best == 0) n_blocked++;
    else begin
      n_booked++;
      // re-run the search on the chosen channel to point at its candidate
      void'(ch[best-1].search(ta, te, gap));
      if (ch[best-1].vend[ch[best-1].cand] != TMAX) n_fill++;
      if (ch[best-1].vstart[ch[best-1].cand] == ta) n_left_gone++;
      checks++;
      if (ch[best-1].overlaps(ta, te)) fail("booked burst overlaps an earlier one");
      exp_drop = ch[best-1].book(ta, te);
      if (exp_drop) n_drop++;
      checks++;
      if (void_drop[best-1] !== exp_drop) fail("drop flag");
    end
    checks++;
    if ((best == 0 && void_drop != '0) || (best != 0 && (void_drop & ~(NC'(1) << (best - 1))) != '0))
      fail("drop flag on a channel not updated");
  endtask

  task automatic restart();
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    foreach (ch[c]) ch[c].reset();
    checks++;
    if (ready) fail("ready during init");
    @(negedge clk);
  endtask

  // the 18 requests of the published waveforms
  int unsigned fig_a[18] = '{59930, 50040, 60050, 62860, 61170, 59080, 60191, 54732, 62134,
                             48679, 64830, 64521, 60150, 61253, 92610, 87820, 93867, 90040};
  int unsigned fig_e[18] = '{78930, 69140, 70050, 78960, 75870, 72580, 78465, 70100, 75110,
                             67830, 79630, 76598, 70150, 78974, 116817, 110820, 112569, 100040};

  initial begin
    foreach (ch[c]) ch[c] = new();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 18; i++) schedule(fig_a[i], fig_e[i]);
    for (int ep = 0; ep < 30; ep++) begin
      restart();
      for (int i = 0; i < 150; i++) begin
        int unsigned ta, te;
        int          c, s;
        c = $urandom % NC;
        s = $urandom % NS;
        while (!ch[c].used[s] && s > 0) s--;
        if (ch[c].used[s] && ($urandom % 3) == 0) begin
          // aim at an existing void
          int unsigned vs, ve;
          vs = ch[c].vstart[s];
          ve = ch[c].vend[s];
          ta = (($urandom % 2) == 0) ? vs : vs + $urandom % (ve - vs + 1);
          te = ta + 1000 + $urandom % 15000;
          if (($urandom % 3) == 0 || te > ve) te = ve;
        end else begin
          ta = 45000 + $urandom % 50000;
          te = ta + 9000 + $urandom % 16000;
        end
        if (te > TMAX) te = TMAX;
        schedule(ta, te);
      end
    end
    $display("requests=%0d booked=%0d blocked=%0d void_filled=%0d back_to_back=%0d",
             n_req, n_booked, n_blocked, n_fill, n_b2b);
    $display("several_feasible=%0d ties=%0d left_void_removed=%0d void_dropped=%0d",
             n_multi, n_tie, n_left_gone, n_drop);
    checks++;
    if (n_booked == 0 || n_blocked == 0 || n_fill == 0 || n_b2b == 0 || n_multi == 0 ||
        n_tie == 0 || n_left_gone == 0 || n_drop == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

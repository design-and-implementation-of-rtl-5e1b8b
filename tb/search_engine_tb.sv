// search_engine_tb: runs one channel's search engine through the published
// request timing (locate, read, verify, select, update) for random bursts,
// many of them aimed at an existing void so that exact fits and void splits
// happen. Every request compares avail and the void info with the reference
// model (obs_ref_pkg); every booking compares the index vector and the drop
// flag, and checks against the list of booked bursts that the new burst
// overlaps none of them. Counts fits, misses, removed and dropped voids and
// fails if any of them never happened.
module search_engine_tb;
  import obs_ref_pkg::*;
  localparam int unsigned NS = 64, TW = 17, SH = 11;

  logic          clk = 0, rst_n = 0, init = 0, en_search = 0, update = 0;
  logic [TW-1:0] bdp_arr = 0, bdp_dep = 0, void_start, void_end;
  logic          avail, drop_event;
  logic [NS-1:0] index_vec;
  int            checks = 0, failures = 0, cycles = 0;
  int            n_fit = 0, n_miss = 0, n_left_gone = 0, n_drop = 0, n_split = 0;

  obs_channel_model #(NS, TW, SH) model;

  search_engine #(.NUM_SLOTS(NS), .TIME_W(TW), .SLOT_SHIFT(SH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycles, msg);
  endtask

  task automatic request(input int unsigned ta, input int unsigned te, input bit want_book);
    int unsigned gap;
    bit          exp_avail, exp_drop;
    bdp_arr   = TW'(ta);
    bdp_dep   = TW'(te);
    en_search = 1;
    @(negedge clk);        // locate
    en_search = 0;
    @(negedge clk);        // read
    exp_avail = model.search(ta, te, gap);
    checks++;
    if (avail !== exp_avail) fail($sformatf("avail=%0d expected %0d for %0d..%0d", avail, exp_avail, ta, te));
    if (exp_avail) begin
      checks++;
      if (void_start !== TW'(model.vstart[model.cand]) || void_end !== TW'(model.vend[model.cand]))
        fail("void info");
      checks++;
      if (model.overlaps(ta, te)) fail($sformatf("fitting burst %0d..%0d overlaps a booked one", ta, te));
    end
    @(negedge clk);        // verify
    @(negedge clk);        // select
    if (exp_avail) n_fit++; else n_miss++;
    if (exp_avail && want_book) begin
      if (ta == model.vstart[model.cand]) n_left_gone++;
      if (te != model.vend[model.cand]) n_split++;
      update = 1;
      exp_drop = model.book(ta, te);
      #1;
      checks++;
      if (drop_event !== exp_drop) fail("drop flag");
      if (exp_drop) n_drop++;
    end
    @(negedge clk);        // update
    update = 0;
    checks++;
    if (index_vec !== model.vector()) fail($sformatf("index vector %h expected %h", index_vec, model.vector()));
  endtask

  initial begin
    model = new();
    repeat (2) @(negedge clk);
    rst_n = 1;
    init = 1;
    @(negedge clk);
    init = 0;
    checks++;
    if (index_vec !== NS'(1)) fail("initial index vector");
    // Published example shape: bursts booked so voids start in slots 1, 3, 9.
    request(1 * 2048 + 100, 2 * 2048 + 300, 1);
    request(7 * 2048 + 10, 8 * 2048 + 700, 1);
    checks++;
    if (index_vec[8:0] !== 9'b100000101) fail("example voids in slots 1, 3, 9");
    // A burst inside void 2 that starts in slot 6: candidate is slot 3.
    request(5 * 2048 + 20, 5 * 2048 + 900, 1);
    checks++;
    if (!index_vec[5] || !index_vec[2]) fail("example update: slots 3 and 6");
    repeat (6) begin
      automatic int unsigned a = $urandom % (1 << TW);
      request(a, a, 0);  // probes only
    end
    for (int i = 0; i < 1500; i++) begin
      int unsigned ta, te, len;
      int          s;
      if (i % 200 == 0) begin
        // restart from an empty channel
        model.reset();
        init = 1;
        @(negedge clk);
        init = 0;
      end
      s = $urandom % NS;
      while (!model.used[s] && s > 0) s--;
      if (model.used[s] && ($urandom % 4) != 0) begin
        int unsigned vs, ve;
        vs  = model.vstart[s];
        ve  = model.vend[s];
        ta  = (($urandom % 3) == 0) ? vs : vs + $urandom % (ve - vs + 1);
        len = $urandom % 4000;
        te  = (($urandom % 3) == 0 || ta + len > ve) ? ve : ta + len;
      end else begin
        ta = $urandom % (1 << TW);
        te = ta + $urandom % 3000;
        if (te >= (1 << TW)) te = (1 << TW) - 1;
      end
      request(ta, te, ($urandom % 5) != 0);
    end
    checks++;
    if (n_fit == 0 || n_miss == 0 || n_left_gone == 0 || n_drop == 0 || n_split == 0) fail("coverage");
    $display("fit=%0d miss=%0d left_removed=%0d split=%0d dropped=%0d", n_fit, n_miss, n_left_gone, n_split, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

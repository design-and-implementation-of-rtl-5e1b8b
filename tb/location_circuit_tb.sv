// location_circuit_tb: random index vectors and arrival times. The expected
// arrival slot is t / 2048 and the expected candidate the highest set bit of
// the index vector at or below it, found by a downward scan. Starts with the
// published example: voids in slots 1, 3 and 9, arrival in slot 5 -> slot 3.
module location_circuit_tb;
  localparam int unsigned NS = 64, TW = 17, SH = 11;
  logic [NS-1:0] index_vec;
  logic [TW-1:0] arr_time;
  logic [5:0]    arr_slot, cand_idx;
  logic          cand_found, clk = 0;
  int            checks = 0, failures = 0, cycles = 0;

  location_circuit #(.NUM_SLOTS(NS), .TIME_W(TW), .SLOT_SHIFT(SH)) dut (
    .index_vec(index_vec), .arr_time(arr_time), .arr_slot(arr_slot),
    .cand_idx(cand_idx), .cand_found(cand_found));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input logic [NS-1:0] v, input logic [TW-1:0] t);
    int m0 = int'(t) / (1 << SH);
    int exp_idx = -1;
    index_vec = v;
    arr_time  = t;
    @(posedge clk);
    for (int b = m0; b >= 0; b--) if (v[b]) begin exp_idx = b; break; end
    checks++;
    if (int'(arr_slot) != m0 || cand_found !== (exp_idx >= 0) ||
        (exp_idx >= 0 && int'(cand_idx) != exp_idx)) begin
      failures++;
      $display("FAIL v=%h t=%0d slot=%0d cand=%0d/%0d expect %0d/%0d",
               v, t, arr_slot, cand_idx, cand_found, m0, exp_idx);
    end
  endtask

  initial begin
    // 1-based slots 1, 3, 9 are bits 0, 2, 8; arrival in 1-based slot 5.
    check(NS'(9'b100000101), TW'(4 * 2048 + 100));
    checks++;
    if (cand_idx != 6'd2) begin
      failures++;
      $display("FAIL published example cand=%0d", cand_idx);
    end
    check(NS'(9'b100000101), TW'(8 * 2048));        // arrival in slot 9
    check(NS'(9'b100000100), TW'(1 * 2048 + 5));    // nothing at or before
    for (int i = 0; i < 400; i++) begin
      automatic logic [NS-1:0] v = {$urandom, $urandom};
      if (i % 2 == 0) v = v & {$urandom, $urandom} & {$urandom, $urandom};
      check(v, TW'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// verification_circuit_tb: the burst fits iff the candidate exists, starts
// no later than the arrival and ends no earlier than the departure. Random
// cases plus the boundary cases where the times are equal.
module verification_circuit_tb;
  localparam int unsigned TW = 17;
  logic          clk = 0, cand_found, avail;
  logic [TW-1:0] void_start, void_end, arr_time, dep_time;
  int            checks = 0, failures = 0, cycles = 0;

  verification_circuit #(.TIME_W(TW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input bit f, input int unsigned vs, ve, ta, te);
    bit exp_avail = f && (vs <= ta) && (te <= ve);
    cand_found = f; void_start = TW'(vs); void_end = TW'(ve);
    arr_time = TW'(ta); dep_time = TW'(te);
    @(posedge clk);
    checks++;
    if (avail !== exp_avail) begin
      failures++;
      $display("FAIL f=%0d void %0d..%0d burst %0d..%0d avail=%0d", f, vs, ve, ta, te, avail);
    end
  endtask

  initial begin
    check(1, 100, 200, 100, 200);   // exact fit
    check(1, 100, 200, 99, 150);    // starts before void
    check(1, 100, 200, 150, 201);   // ends after void
    check(0, 100, 200, 150, 160);   // no candidate
    check(1, 100, 200, 150, 160);
    for (int i = 0; i < 500; i++) begin
      automatic int unsigned vs = $urandom % 1000, ve = vs + $urandom % 1000;
      automatic int unsigned ta = $urandom % 2000, te = ta + $urandom % 500;
      check(($urandom % 8) != 0, vs, ve, ta, te);
    end
    // arrival or departure on the void boundary, one time unit either side
    for (int i = 0; i < 200; i++) begin
      automatic int unsigned vs = 10 + $urandom % 1000, ve = vs + 20 + $urandom % 1000;
      automatic int unsigned ta = vs - 1 + $urandom % 3, te = ve - 1 + $urandom % 3;
      if (i % 2 == 0) te = ta + $urandom % 10;
      else            ta = te - $urandom % 10;
      check(1, vs, ve, ta, te);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

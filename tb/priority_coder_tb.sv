// priority_coder_tb: random and corner vectors; the expected index is found
// by scanning from the top bit down.
module priority_coder_tb;
  localparam int unsigned NS = 64;
  logic [NS-1:0] req;
  logic [5:0]    idx;
  logic          found, clk = 0;
  int            checks = 0, failures = 0, cycles = 0;

  priority_coder #(.NUM_SLOTS(NS)) dut (.req(req), .idx(idx), .found(found));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input logic [NS-1:0] v);
    int exp_idx = -1;
    req = v;
    @(posedge clk);
    for (int b = NS - 1; b >= 0; b--) if (v[b]) begin exp_idx = b; break; end
    checks++;
    if (found !== (exp_idx >= 0) || (exp_idx >= 0 && int'(idx) != exp_idx)) begin
      failures++;
      $display("FAIL req=%h idx=%0d found=%0d expect=%0d", v, idx, found, exp_idx);
    end
  endtask

  initial begin
    check('0);
    check('1);
    check(NS'(1));
    check(NS'(9'b100000101));   // index vector of the published example
    check(NS'(3'b101));         // after masking with slot 5: candidate slot 3
    for (int b = 0; b < NS; b++) check(NS'(1) << b);
    for (int i = 0; i < 300; i++) begin
      automatic logic [NS-1:0] v = {$urandom, $urandom};
      if (i % 3 == 0) v = v >> ($urandom % NS);
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

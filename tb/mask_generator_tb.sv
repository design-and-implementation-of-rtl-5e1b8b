// mask_generator_tb: checks the mask for every arrival slot against the
// closed form 2**(m) - 1 (m = slot_idx + 1 ones from the bottom), including
// the published example m = 5 -> ...00011111.
module mask_generator_tb;
  localparam int unsigned NS = 64;
  logic [5:0]    slot_idx;
  logic [NS-1:0] mask, expect_mask;
  logic          clk = 0;
  int            checks = 0, failures = 0, cycles = 0;

  mask_generator #(.NUM_SLOTS(NS)) dut (.slot_idx(slot_idx), .mask(mask));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int m = 0; m < NS; m++) begin
      slot_idx = 6'(m);
      @(posedge clk);
      expect_mask = (m == NS - 1) ? '1 : ((NS'(1) << (m + 1)) - 1);
      checks++;
      if (mask !== expect_mask) begin
        failures++;
        $display("FAIL m0=%0d mask=%h expect=%h", m, mask, expect_mask);
      end
    end
    slot_idx = 6'd4;  // slot 5 in the 1-based numbering
    @(posedge clk);
    checks++;
    if (mask !== NS'(5'b11111)) begin
      failures++;
      $display("FAIL example mask=%h", mask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

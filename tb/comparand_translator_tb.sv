// comparand_translator_tb: loads random per-channel results and checks each
// comparand (gap t_a - void start for a feasible channel, all ones
// otherwise) and that the comparands hold while config_en is low.
module comparand_translator_tb;
  localparam int unsigned NC = 16, TW = 17, CW = TW + 1;
  logic                  clk = 0, rst_n = 0, config_en = 0;
  logic [TW-1:0]         bdp_arr;
  logic [NC-1:0]         avail;
  logic [NC-1:0][TW-1:0] void_start;
  logic [NC-1:0][CW-1:0] comparand;
  int                    checks = 0, failures = 0, cycles = 0;

  comparand_translator #(.NUM_CH(NC), .TIME_W(TW)) dut (.*);

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
    bdp_arr = '0; avail = '0; void_start = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      automatic int unsigned ta = $urandom % (1 << TW);
      logic [NC-1:0][CW-1:0] expect_c;
      @(negedge clk);
      bdp_arr = TW'(ta);
      avail = NC'($urandom);
      for (int c = 0; c < NC; c++) begin
        automatic int unsigned vs = (ta == 0) ? 0 : $urandom % (ta + 1);
        void_start[c] = TW'(vs);
        expect_c[c] = avail[c] ? CW'(ta - vs) : {CW{1'b1}};
      end
      config_en = 1;
      @(negedge clk);
      config_en = 0;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (comparand[c] !== expect_c[c]) begin
          failures++;
          $display("FAIL ch %0d got %h expect %h", c, comparand[c], expect_c[c]);
        end
      end
      avail = ~avail;
      @(negedge clk);
      checks++;
      if (comparand !== expect_c) begin
        failures++;
        $display("FAIL comparands changed without config_en");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

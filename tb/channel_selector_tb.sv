// channel_selector_tb: random comparands (with forced ties and channels
// without a void); the expected channel is the first minimum found by a
// linear scan, 0 if the minimum has its top bit set. Also runs a 5-channel
// selector to cover a channel count that is not a power of two.
module channel_selector_tb;
  localparam int unsigned NC = 16, CW = 18;
  logic                  clk = 0, rst_n = 0, en_sel = 0;
  logic [NC-1:0][CW-1:0] comparand;
  logic [4:0]            ch_no;
  logic [4:0][CW-1:0]    comparand5;
  logic [2:0]            ch_no5;
  int                    checks = 0, failures = 0, cycles = 0;

  channel_selector #(.NUM_CH(NC), .CMP_W(CW)) dut (.*);
  channel_selector #(.NUM_CH(5), .CMP_W(CW)) dut5 (
    .clk(clk), .rst_n(rst_n), .en_sel(en_sel), .comparand(comparand5), .ch_no(ch_no5));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int ref_sel(input logic [NC-1:0][CW-1:0] v, input int n);
    int best = 0;
    for (int c = 1; c < n; c++) if (v[c] < v[best]) best = c;
    return v[best][CW-1] ? 0 : best + 1;
  endfunction

  initial begin
    comparand = '1; comparand5 = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int e, e5;
      logic [NC-1:0][CW-1:0] tmp;
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        case ($urandom % 4)
          0:       comparand[c] = '1;
          1:       comparand[c] = CW'($urandom % 8);   // ties likely
          default: comparand[c] = CW'($urandom % (1 << (CW - 1)));
        endcase
      end
      if (i % 50 == 0) comparand = '1;
      for (int c = 0; c < 5; c++) comparand5[c] = comparand[c];
      en_sel = 1;
      @(negedge clk);
      en_sel = 0;
      e = ref_sel(comparand, NC);
      tmp = '1;
      for (int c = 0; c < 5; c++) tmp[c] = comparand[c];
      e5 = ref_sel(tmp, 5);
      checks += 2;
      if (int'(ch_no) != e) begin
        failures++;
        $display("FAIL 16ch got %0d expect %0d", ch_no, e);
      end
      if (int'(ch_no5) != e5) begin
        failures++;
        $display("FAIL 5ch got %0d expect %0d", ch_no5, e5);
      end
      comparand = ~comparand;
      @(negedge clk);
      checks++;
      if (int'(ch_no) != e) begin
        failures++;
        $display("FAIL result changed without en_sel");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

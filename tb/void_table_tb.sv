// void_table_tb: random writes on both ports and reads, compared with a
// shadow array kept by the testbench. Checks the one-cycle read latency and
// that the read data hold while rd_en is low.
module void_table_tb;
  localparam int unsigned NS = 64, TW = 17;
  logic          clk = 0;
  logic          rd_en = 0, wa_en = 0, wb_en = 0;
  logic [5:0]    rd_addr = 0, wa_addr = 0, wb_addr = 0;
  logic [TW-1:0] rd_start, rd_end, wa_start = 0, wa_end = 0, wb_start = 0, wb_end = 0;
  logic [TW-1:0] sh_s [NS], sh_e [NS];
  int            checks = 0, failures = 0, cycles = 0;

  void_table #(.NUM_SLOTS(NS), .TIME_W(TW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    // fill every entry through alternating ports
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      sh_s[i] = TW'($urandom); sh_e[i] = TW'($urandom);
      if (i % 2 == 0) begin
        wa_en = 1; wa_addr = 6'(i); wa_start = sh_s[i]; wa_end = sh_e[i]; wb_en = 0;
      end else begin
        wb_en = 1; wb_addr = 6'(i); wb_start = sh_s[i]; wb_end = sh_e[i]; wa_en = 0;
      end
    end
    @(negedge clk); wa_en = 0; wb_en = 0;
    for (int i = 0; i < 1000; i++) begin
      int a, b, r;
      @(negedge clk);
      a = $urandom % NS;
      b = (a + 1 + $urandom % (NS - 1)) % NS;
      r = $urandom % NS;
      rd_en = 1; rd_addr = 6'(r);
      wa_en = ($urandom % 2) == 1; wa_addr = 6'(a); wa_start = TW'($urandom); wa_end = TW'($urandom);
      wb_en = ($urandom % 2) == 1; wb_addr = 6'(b); wb_start = TW'($urandom); wb_end = TW'($urandom);
      @(negedge clk);
      // read returns the contents before this edge's writes
      checks++;
      if (rd_start !== sh_s[r] || rd_end !== sh_e[r]) begin
        failures++;
        $display("FAIL read %0d got %0d/%0d expect %0d/%0d", r, rd_start, rd_end, sh_s[r], sh_e[r]);
      end
      if (wa_en) begin sh_s[a] = wa_start; sh_e[a] = wa_end; end
      if (wb_en) begin sh_s[b] = wb_start; sh_e[b] = wb_end; end
      rd_en = 0; wa_en = 0; wb_en = 0;
    end
    // read data hold while rd_en is low
    @(negedge clk); rd_en = 1; rd_addr = 6'd7;
    @(negedge clk); rd_en = 0; rd_addr = 6'd9;
    @(negedge clk); @(negedge clk);
    checks++;
    if (rd_start !== sh_s[7] || rd_end !== sh_e[7]) begin
      failures++;
      $display("FAIL hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

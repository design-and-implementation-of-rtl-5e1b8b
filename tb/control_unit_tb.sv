// control_unit_tb: drives random Start pulses (some while busy, some in the
// update cycle) and compares every control output, every cycle, with a
// cycle counter model of the five-cycle process: en_search in cycle 1,
// config in 3, en_sel in 4, finish and the one-hot update in 5, counted from
// the accepting edge. Also checks the init cycle after reset, the latched
// burst times and the request period of five cycles.
module control_unit_tb;
  localparam int unsigned NC = 16, TW = 17;
  logic            clk = 0, rst_n = 0, start = 0;
  logic [TW-1:0]   bhp_arr = 0, bhp_dep = 0, bdp_arr, bdp_dep;
  logic            ready, finish, init, en_search, config_en, en_sel;
  logic [4:0]      sel_ch_no, ch_no = 0;
  logic [NC-1:0]   update;
  int              checks = 0, failures = 0, cycles = 0;
  int              phase = 0, finishes = 0, back_to_back = 0, ignored = 0;
  int              last_accept = -100;
  logic [TW-1:0]   exp_arr = 0, exp_dep = 0;

  control_unit #(.NUM_CH(NC), .TIME_W(TW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_bit(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL cycle %0d phase %0d: %s=%0d expected %0d", cycles, phase, what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_bit("init", init, 1);
    expect_bit("ready", ready, 0);
    @(negedge clk);
    expect_bit("init", init, 0);
    for (int i = 0; i < 3000; i++) begin
      // outputs of the current cycle
      logic [NC-1:0] exp_upd;
      exp_upd = '0;
      if (phase == 5 && ch_no != 0) exp_upd[ch_no - 1] = 1'b1;
      expect_bit("ready", ready, phase == 0 || phase == 5);
      expect_bit("en_search", en_search, phase == 1);
      expect_bit("config", config_en, phase == 3);
      expect_bit("en_sel", en_sel, phase == 4);
      expect_bit("finish", finish, phase == 5);
      expect_bit("init", init, 0);
      checks++;
      if (update !== exp_upd || (phase == 5 && sel_ch_no !== ch_no)) begin
        failures++;
        $display("FAIL update=%h expected %h ch_no=%0d", update, exp_upd, ch_no);
      end
      if (phase != 0) begin
        checks++;
        if (bdp_arr !== exp_arr || bdp_dep !== exp_dep) begin
          failures++;
          $display("FAIL held burst times");
        end
      end
      if (phase == 5) finishes++;
      // stimulus for the next edge
      start   = ($urandom % 3) == 0;
      bhp_arr = TW'($urandom);
      bhp_dep = bhp_arr + TW'($urandom % 100);
      if (bhp_dep < bhp_arr) bhp_dep = bhp_arr;
      if (phase == 4) ch_no = 5'($urandom % (NC + 1));
      @(negedge clk);
      // model the edge that just happened
      if ((phase == 0 || phase == 5) && start) begin
        if (phase == 5) begin
          back_to_back++;
          checks++;
          if (cycles - last_accept != 5) begin
            failures++;
            $display("FAIL request period %0d", cycles - last_accept);
          end
        end
        last_accept = cycles;
        exp_arr = bhp_arr;
        exp_dep = bhp_dep;
        phase = 1;
      end else if (phase >= 1 && phase <= 4) begin
        if (start) ignored++;
        phase++;
      end else begin
        phase = 0;
      end
    end
    checks++;
    if (finishes == 0 || back_to_back == 0 || ignored == 0) begin
      failures++;
      $display("FAIL coverage finishes=%0d back_to_back=%0d ignored=%0d", finishes, back_to_back, ignored);
    end
    $display("finishes=%0d back_to_back=%0d ignored=%0d", finishes, back_to_back, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

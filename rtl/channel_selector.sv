// channel_selector: pairwise comparator tree picking the optimal channel.
//
// The comparands of all channels enter a tree of two-input comparators,
// ceil(log2(NUM_CH)) stages deep (four for 16 channels); each comparator
// passes on the smaller comparand and its channel number, the lower channel
// on a tie (own choice). The tree is combinational and its result is
// registered while en_sel is high (the select cycle). ch_no is 1-based, as in
// the published waveforms, and 0 when no channel has a feasible void (the
// winning comparand has its top bit set).
module channel_selector #(
  parameter int unsigned NUM_CH = obs_pkg::NUM_CH,
  parameter int unsigned CMP_W  = obs_pkg::TIME_W + 1,
  localparam int unsigned CH_W  = $clog2(NUM_CH + 1),
  localparam int unsigned LEVELS = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned LEAVES = 1 << LEVELS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en_sel,     // En_Sel: register result
  input  logic [NUM_CH-1:0][CMP_W-1:0] comparand,
  output logic [CH_W-1:0]              ch_no       // Ch_No, 1-based, 0 = none
);

  // Stage s holds LEAVES >> s comparands; stage 0 are the inputs, padded
  // with all-ones comparands up to a power of two.
  logic [CMP_W-1:0] val [LEVELS+1][LEAVES];
  logic [CH_W-1:0]  num [LEVELS+1][LEAVES];
  logic [CH_W-1:0]  ch_no_d;

  always_comb begin
    val = '{default: '1};
    num = '{default: '0};
    for (int unsigned c = 0; c < LEAVES; c++) begin
      if (c < NUM_CH) begin
        val[0][c] = comparand[c];
        num[0][c] = CH_W'(c + 1);
      end
    end
    for (int unsigned s = 0; s < LEVELS; s++) begin
      for (int unsigned p = 0; p < (LEAVES >> (s + 1)); p++) begin
        if (val[s][2*p+1] < val[s][2*p]) begin
          val[s+1][p] = val[s][2*p+1];
          num[s+1][p] = num[s][2*p+1];
        end else begin
          val[s+1][p] = val[s][2*p];
          num[s+1][p] = num[s][2*p];
        end
      end
    end
    ch_no_d = val[LEVELS][0][CMP_W-1] ? '0 : num[LEVELS][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ch_no <= '0;
    else if (en_sel) ch_no <= ch_no_d;
  end

endmodule

// comparand_translator: turns the per-channel search results into comparands.
//
// For LAUC-VF the best channel is the one whose feasible void started latest
// before the burst, i.e. with the smallest gap t_a - void_start. The
// translator therefore outputs, per channel, the gap with a leading 0 for a
// feasible void, and all ones for a channel without one, so the channel
// selector only has to find the minimum. The comparands are registered while
// config is high (the verify cycle); config is the control unit's strobe to
// this block, whose meaning the published block diagram does not spell out.
// Other void-filling policies would only change the gap formula here.
module comparand_translator #(
  parameter int unsigned NUM_CH = obs_pkg::NUM_CH,
  parameter int unsigned TIME_W = obs_pkg::TIME_W,
  localparam int unsigned CMP_W = TIME_W + 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           config_en,   // Config: load comparands
  input  logic [TIME_W-1:0]              bdp_arr,     // burst arrival time
  input  logic [NUM_CH-1:0]              avail,       // per-channel feasibility
  input  logic [NUM_CH-1:0][TIME_W-1:0]  void_start,  // per-channel void start
  output logic [NUM_CH-1:0][CMP_W-1:0]   comparand    // {!avail, gap} or all ones
);

  logic [NUM_CH-1:0][CMP_W-1:0] comparand_d;

  always_comb begin
    for (int unsigned c = 0; c < NUM_CH; c++) begin
      if (avail[c]) comparand_d[c] = {1'b0, bdp_arr - void_start[c]};
      else          comparand_d[c] = '1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         comparand <= '1;
    else if (config_en) comparand <= comparand_d;
  end

endmodule

// control_unit: sequences the scheduling process and faces the outside.
//
// One burst header (BHP_info: arrival and departure time of the data burst)
// is accepted with a one-cycle Start pulse while ready is high. The request
// then runs through five cycles, four to find the optimal void and one to
// update the data structure, as published (33.3 ns at 150 MHz):
//   LOCATE  en_search high: every search engine locates its candidate void
//   READ    the search engines read their void tables
//   VERIFY  config high: the comparand translator loads the comparands
//   SELECT  en_sel high: the channel selector loads the winning channel
//   UPDATE  finish high with sel_ch_no (Sel_Ch_info, 1-based, 0 = burst not
//           schedulable); update[c] high for the chosen channel only
// ready is high in IDLE and in UPDATE, so a new Start may coincide with the
// UPDATE cycle and requests can follow each other every five cycles. The
// burst times are held in bdp_arr/bdp_dep (BDP_time) for the whole process.
// After reset one INIT cycle (init high) lets every search engine load its
// initial void; ready is low during it. sel_ch_no is the channel selector's
// registered Ch_No, passed to the outside unchanged. The phase names and the ready and
// init signals are this design's own.
module control_unit #(
  parameter int unsigned NUM_CH = obs_pkg::NUM_CH,
  parameter int unsigned TIME_W = obs_pkg::TIME_W,
  localparam int unsigned CH_W  = $clog2(NUM_CH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // external interface
  input  logic               start,      // Start
  input  logic [TIME_W-1:0]  bhp_arr,    // BHP_info: burst arrival time
  input  logic [TIME_W-1:0]  bhp_dep,    // BHP_info: burst departure time
  output logic               ready,      // a Start is accepted this cycle
  output logic               finish,     // Finish
  output logic [CH_W-1:0]    sel_ch_no,  // Sel_Ch_info: chosen channel
  // to the search engines
  output logic               init,
  output logic               en_search,  // En_Search
  output logic [NUM_CH-1:0]  update,     // Update, one-hot or zero
  output logic [TIME_W-1:0]  bdp_arr,    // BDP_time
  output logic [TIME_W-1:0]  bdp_dep,
  // to the comparand translator and the channel selector
  output logic               config_en,  // Config
  output logic               en_sel,     // En_Sel
  input  logic [CH_W-1:0]    ch_no       // Ch_No from the channel selector
);

  import obs_pkg::*;

  sched_state_e state, state_next;
  logic         accept;

  assign ready  = (state == ST_IDLE) || (state == ST_UPDATE);
  assign accept = ready && start;

  always_comb begin
    unique case (state)
      ST_INIT:   state_next = ST_IDLE;
      ST_IDLE:   state_next = start ? ST_LOCATE : ST_IDLE;
      ST_LOCATE: state_next = ST_READ;
      ST_READ:   state_next = ST_VERIFY;
      ST_VERIFY: state_next = ST_SELECT;
      ST_SELECT: state_next = ST_UPDATE;
      ST_UPDATE: state_next = start ? ST_LOCATE : ST_IDLE;
      default:   state_next = ST_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_INIT;
      bdp_arr <= '0;
      bdp_dep <= '0;
    end else begin
      state <= state_next;
      if (accept) begin
        bdp_arr <= bhp_arr;
        bdp_dep <= bhp_dep;
      end
    end
  end

  assign init      = (state == ST_INIT);
  assign en_search = (state == ST_LOCATE);
  assign config_en = (state == ST_VERIFY);
  assign en_sel    = (state == ST_SELECT);
  assign finish    = (state == ST_UPDATE);
  assign sel_ch_no = ch_no;

  always_comb begin
    update = '0;
    for (int unsigned c = 0; c < NUM_CH; c++)
      update[c] = finish && (32'(ch_no) == c + 1);
  end

  // A burst must not depart before it arrives.
  a_burst_order: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (bhp_arr <= bhp_dep));
  a_update_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(update));

endmodule

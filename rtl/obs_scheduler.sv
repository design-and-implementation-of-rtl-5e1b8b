// obs_scheduler: index-based parallel LAUC-VF burst scheduler (top level).
//
// A burst header arrives with the arrival and departure time of its data
// burst; the scheduler picks the data channel whose idle gap (void) can hold
// the burst and, among those, the one whose void began latest before the
// burst (LAUC-VF, latest available unused channel with void filling). It
// consists of the control unit, NUM_CH search engines working in parallel
// (one per channel, each finding at most one feasible void with a constant-
// time index search), the comparand translator and the channel selector.
//
// Interface and timing: pulse start for one cycle with bhp_arr/bhp_dep while
// ready is high. Five cycles later finish is high for one cycle and sel_ch_no
// gives the channel (1..NUM_CH) the burst was booked on, or 0 if no channel
// could take it; the booking itself is written in that same cycle, during
// which the next start is already accepted. One request therefore completes
// every five cycles (33.3 ns at the published 150 MHz). After reset ready
// stays low for one cycle while every channel is set up as one free void
// covering the whole window [0, 2**TIME_W - 1].
//
// Structure, channel count, timing and selection rule follow the published
// design; window size, slot count and time width are this design's choices
// (see obs_pkg). drop_count counts voids lost because their slot already
// held a void, a loss this implementation accepts.
module obs_scheduler #(
  parameter int unsigned NUM_CH     = obs_pkg::NUM_CH,
  parameter int unsigned NUM_SLOTS  = obs_pkg::NUM_SLOTS,
  parameter int unsigned TIME_W     = obs_pkg::TIME_W,
  parameter int unsigned SLOT_SHIFT = obs_pkg::SLOT_SHIFT,
  localparam int unsigned CH_W      = $clog2(NUM_CH + 1),
  localparam int unsigned CMP_W     = TIME_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,       // Start
  input  logic [TIME_W-1:0] bhp_arr,     // BHP_info: arrival time
  input  logic [TIME_W-1:0] bhp_dep,     // BHP_info: departure time
  output logic              ready,
  output logic              finish,      // Finish
  output logic [CH_W-1:0]   sel_ch_no,   // Sel_Ch_info: 1..NUM_CH, 0 = none
  output logic [NUM_CH-1:0] void_drop    // per channel: update dropped a void
);

  logic                         init, en_search, config_en, en_sel;
  logic [NUM_CH-1:0]            update, avail;
  logic [TIME_W-1:0]            bdp_arr, bdp_dep;
  logic [CH_W-1:0]              ch_no;
  logic [NUM_CH-1:0][TIME_W-1:0] void_start, void_end;
  logic [NUM_CH-1:0][CMP_W-1:0]  comparand;

  control_unit #(
    .NUM_CH(NUM_CH),
    .TIME_W(TIME_W)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .bhp_arr  (bhp_arr),
    .bhp_dep  (bhp_dep),
    .ready    (ready),
    .finish   (finish),
    .sel_ch_no(sel_ch_no),
    .init     (init),
    .en_search(en_search),
    .update   (update),
    .bdp_arr  (bdp_arr),
    .bdp_dep  (bdp_dep),
    .config_en(config_en),
    .en_sel   (en_sel),
    .ch_no    (ch_no)
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_engine
    logic [NUM_SLOTS-1:0] index_vec;
    search_engine #(
      .NUM_SLOTS (NUM_SLOTS),
      .TIME_W    (TIME_W),
      .SLOT_SHIFT(SLOT_SHIFT)
    ) u_engine (
      .clk       (clk),
      .rst_n     (rst_n),
      .init      (init),
      .en_search (en_search),
      .update    (update[c]),
      .bdp_arr   (bdp_arr),
      .bdp_dep   (bdp_dep),
      .avail     (avail[c]),
      .void_start(void_start[c]),
      .void_end  (void_end[c]),
      .index_vec (index_vec),
      .drop_event(void_drop[c])
    );
  end

  comparand_translator #(
    .NUM_CH(NUM_CH),
    .TIME_W(TIME_W)
  ) u_translator (
    .clk       (clk),
    .rst_n     (rst_n),
    .config_en (config_en),
    .bdp_arr   (bdp_arr),
    .avail     (avail),
    .void_start(void_start),
    .comparand (comparand)
  );

  channel_selector #(
    .NUM_CH(NUM_CH),
    .CMP_W (CMP_W)
  ) u_selector (
    .clk      (clk),
    .rst_n    (rst_n),
    .en_sel   (en_sel),
    .comparand(comparand),
    .ch_no    (ch_no)
  );

endmodule

// location_circuit: finds the candidate void of one channel for a new burst.
//
// Step 1 turns the burst's arrival time into its slot: slot m-1 (zero-based)
// is floor((t_a - t_s) / tau) with t_s = 0 and tau = 2**SLOT_SHIFT, i.e. the
// upper bits of the time stamp, limited to the last slot. Step 2 masks the
// channel's index vector with the mask generator (slots 1..m), ANDs the two
// (the "filter" gate array) and lets the priority coder pick the highest
// remaining index: the void that starts latest at or before the arrival slot.
// Purely combinational; the search engine registers the result.
module location_circuit #(
  parameter int unsigned NUM_SLOTS  = obs_pkg::NUM_SLOTS,
  parameter int unsigned TIME_W     = obs_pkg::TIME_W,
  parameter int unsigned SLOT_SHIFT = obs_pkg::SLOT_SHIFT,
  localparam int unsigned IDX_W     = $clog2(NUM_SLOTS)
) (
  input  logic [NUM_SLOTS-1:0] index_vec,  // bit b set: a void starts in slot b
  input  logic [TIME_W-1:0]    arr_time,   // burst arrival time t_a
  output logic [IDX_W-1:0]     arr_slot,   // zero-based arrival slot m-1
  output logic [IDX_W-1:0]     cand_idx,   // zero-based index of the candidate
  output logic                 cand_found  // some void starts at or before m
);

  logic [NUM_SLOTS-1:0] mask;
  logic [NUM_SLOTS-1:0] filtered;

  slot_of_time #(
    .NUM_SLOTS (NUM_SLOTS),
    .TIME_W    (TIME_W),
    .SLOT_SHIFT(SLOT_SHIFT)
  ) u_slot (
    .t   (arr_time),
    .slot(arr_slot)
  );

  mask_generator #(.NUM_SLOTS(NUM_SLOTS)) u_mask (
    .slot_idx(arr_slot),
    .mask    (mask)
  );

  // Array of AND gates between mask code and index vector.
  assign filtered = mask & index_vec;

  priority_coder #(.NUM_SLOTS(NUM_SLOTS)) u_prio (
    .req  (filtered),
    .idx  (cand_idx),
    .found(cand_found)
  );

endmodule

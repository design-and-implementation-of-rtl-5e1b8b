// slot_of_time: zero-based index of the time slot that holds a time stamp.
//
// The scheduling window starts at t_s = 0 and is cut into NUM_SLOTS slots of
// tau = 2**SLOT_SHIFT time units, so the slot is t >> SLOT_SHIFT; times past
// the last slot are counted in the last slot. Combinational helper used for
// the arrival slot of a burst and for the index of a newly created void.
module slot_of_time #(
  parameter int unsigned NUM_SLOTS  = obs_pkg::NUM_SLOTS,
  parameter int unsigned TIME_W     = obs_pkg::TIME_W,
  parameter int unsigned SLOT_SHIFT = obs_pkg::SLOT_SHIFT,
  localparam int unsigned IDX_W     = $clog2(NUM_SLOTS)
) (
  input  logic [TIME_W-1:0] t,
  output logic [IDX_W-1:0]  slot
);

  logic [TIME_W-1:0] q;

  always_comb begin
    q = t >> SLOT_SHIFT;
    if (q > TIME_W'(NUM_SLOTS - 1)) slot = IDX_W'(NUM_SLOTS - 1);
    else                            slot = IDX_W'(q);
  end

endmodule

// mask_generator: builds the slot mask of the location circuit.
//
// For a burst whose arrival time lies in slot m (slots numbered 1..N), the
// mask M[N:1] has bit i set if and only if i <= m, so that ANDing it with a
// channel's index vector keeps exactly the voids that start no later than
// the arrival slot. Bit i of the index vector is held in bit i-1 of the
// vectors here, so the input is the zero-based slot m-1 and output bit b is
// set iff b <= m-1. Purely combinational (part of the locate cycle).
// The mask rule (i <= m) is the published one; the zero-based bit mapping is
// this design's own.
module mask_generator #(
  parameter int unsigned NUM_SLOTS = obs_pkg::NUM_SLOTS,
  localparam int unsigned IDX_W    = $clog2(NUM_SLOTS)
) (
  input  logic [IDX_W-1:0]     slot_idx,  // zero-based arrival slot, m-1
  output logic [NUM_SLOTS-1:0] mask       // bit b set iff b <= slot_idx
);

  always_comb begin
    for (int unsigned b = 0; b < NUM_SLOTS; b++)
      mask[b] = (b <= 32'(slot_idx));
  end

endmodule

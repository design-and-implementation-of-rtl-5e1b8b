// priority_coder: index of the highest set bit of the filtered index vector.
//
// After the AND filter, every set bit marks a void that starts no later than
// the arrival slot; the candidate is the latest of these, so the larger index
// has the higher priority. found is low when no bit is set (idx is then 0).
// Purely combinational. The published design gives the priority rule; the
// scan that implements it is this design's own.
module priority_coder #(
  parameter int unsigned NUM_SLOTS = obs_pkg::NUM_SLOTS,
  localparam int unsigned IDX_W    = $clog2(NUM_SLOTS)
) (
  input  logic [NUM_SLOTS-1:0] req,    // filtered index vector
  output logic [IDX_W-1:0]     idx,    // zero-based index of highest set bit
  output logic                 found   // at least one bit of req is set
);

  always_comb begin
    idx   = '0;
    found = 1'b0;
    // Scan upwards so that the last (highest) set bit wins.
    for (int unsigned b = 0; b < NUM_SLOTS; b++) begin
      if (req[b]) begin
        idx   = IDX_W'(b);
        found = 1'b1;
      end
    end
  end

endmodule

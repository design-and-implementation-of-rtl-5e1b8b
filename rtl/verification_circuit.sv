// verification_circuit: decides whether the candidate void can hold the burst.
//
// The burst [arr_time, dep_time] fits in the void [void_start, void_end] if
// the void has started by the arrival (void_start <= arr_time) and lasts to
// the departure (dep_time <= void_end). The two comparisons are ANDed,
// together with the locate result (a candidate exists), into avail.
// Purely combinational. Two comparators and an AND gate as published; that
// equal times count as a fit is this design's choice.
module verification_circuit #(
  parameter int unsigned TIME_W = obs_pkg::TIME_W
) (
  input  logic              cand_found,
  input  logic [TIME_W-1:0] void_start,
  input  logic [TIME_W-1:0] void_end,
  input  logic [TIME_W-1:0] arr_time,
  input  logic [TIME_W-1:0] dep_time,
  output logic              avail
);

  logic start_ok, end_ok;

  assign start_ok = (void_start <= arr_time);
  assign end_ok   = (dep_time   <= void_end);
  assign avail    = cand_found & start_ok & end_ok;

endmodule

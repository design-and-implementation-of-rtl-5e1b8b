// void_table: the N-entry void table of one channel, an on-chip RAM.
//
// Entry i holds the start and the end time of the void whose index is i
// (the slot its start lies in); whether the entry is live is recorded in the
// index vector, not here. One synchronous read port (data appear the cycle
// after rd_en) serves the search; two write ports serve the update, which may
// rewrite the shortened old void and create the void behind the new burst in
// the same cycle, as a true dual-port block RAM allows. The two write
// addresses are never equal when both write; if they were, port B wins.
// The table itself is published; its port arrangement is this design's own.
module void_table #(
  parameter int unsigned NUM_SLOTS = obs_pkg::NUM_SLOTS,
  parameter int unsigned TIME_W    = obs_pkg::TIME_W,
  localparam int unsigned IDX_W    = $clog2(NUM_SLOTS)
) (
  input  logic              clk,
  // read port
  input  logic              rd_en,
  input  logic [IDX_W-1:0]  rd_addr,
  output logic [TIME_W-1:0] rd_start,
  output logic [TIME_W-1:0] rd_end,
  // write port A
  input  logic              wa_en,
  input  logic [IDX_W-1:0]  wa_addr,
  input  logic [TIME_W-1:0] wa_start,
  input  logic [TIME_W-1:0] wa_end,
  // write port B
  input  logic              wb_en,
  input  logic [IDX_W-1:0]  wb_addr,
  input  logic [TIME_W-1:0] wb_start,
  input  logic [TIME_W-1:0] wb_end
);

  logic [2*TIME_W-1:0] mem [NUM_SLOTS];

  always_ff @(posedge clk) begin
    if (wa_en) mem[wa_addr] <= {wa_start, wa_end};
    if (wb_en) mem[wb_addr] <= {wb_start, wb_end};
    if (rd_en) {rd_start, rd_end} <= mem[rd_addr];
  end

endmodule

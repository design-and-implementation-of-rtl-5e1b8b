// search_engine: index-based feasible-void search for one data channel.
//
// The channel's voids are kept in two structures: the index vector, one flip-
// flop per slot, whose bit i is set iff a void starts in slot i, and the
// void table (on-chip RAM) with the start and end time of that void.
//
// Timing, driven by the control unit (one request every five cycles):
//   locate (en_search high): the location circuit masks the index vector with
//            the arrival slot and priority-codes the candidate index, which is
//            registered;
//   read   : the candidate's void table entry is read (synchronous RAM);
//   verify : the verification circuit compares the entry with the burst and
//            drives avail and the void start/end (Void_info) combinationally;
//   select : (channel selector works; outputs here stay stable);
//   update (update high, only on the chosen channel): the data structure is
//            rewritten as follows. The candidate void [vs, ve] at index k is
//            split by the burst [ta, te]. The part before the burst, [vs, ta],
//            keeps index k (entry k rewritten), or is removed (bit k cleared)
//            when ta = vs. The part after it, [te, ve], is entered at index
//            j = slot(te), unless te = ve or bit j is already set.
// A slot holds at most one void. The rule that an occupied slot keeps its
// void and the newer remainder is dropped is this design's own choice; the
// published description does not say what happens when two voids start in
// one slot. The structure and the split shown for the published example
// (old void shortened in place, new void indexed by the burst's end slot)
// follow the published design; the cycle split is this design's own.
// init (one cycle after reset) sets the whole window up as one void,
// [0, 2**TIME_W-1], at index 0 (slot 1).
module search_engine #(
  parameter int unsigned NUM_SLOTS  = obs_pkg::NUM_SLOTS,
  parameter int unsigned TIME_W     = obs_pkg::TIME_W,
  parameter int unsigned SLOT_SHIFT = obs_pkg::SLOT_SHIFT,
  localparam int unsigned IDX_W     = $clog2(NUM_SLOTS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,        // write the initial void
  input  logic                 en_search,   // locate cycle of a request
  input  logic                 update,      // this channel takes the burst
  input  logic [TIME_W-1:0]    bdp_arr,     // burst arrival time t_a
  input  logic [TIME_W-1:0]    bdp_dep,     // burst departure time t_e
  output logic                 avail,       // candidate void fits the burst
  output logic [TIME_W-1:0]    void_start,  // Void_info: candidate start
  output logic [TIME_W-1:0]    void_end,    // Void_info: candidate end
  output logic [NUM_SLOTS-1:0] index_vec,   // current index vector
  output logic                 drop_event   // an update dropped a remainder
);

  // ---------------------------------------------------------------- locate
  logic [IDX_W-1:0] arr_slot, cand_idx, cand_idx_q;
  logic             cand_found, cand_found_q, rd_en;

  location_circuit #(
    .NUM_SLOTS (NUM_SLOTS),
    .TIME_W    (TIME_W),
    .SLOT_SHIFT(SLOT_SHIFT)
  ) u_loc (
    .index_vec (index_vec),
    .arr_time  (bdp_arr),
    .arr_slot  (arr_slot),
    .cand_idx  (cand_idx),
    .cand_found(cand_found)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand_idx_q   <= '0;
      cand_found_q <= 1'b0;
      rd_en        <= 1'b0;
    end else begin
      rd_en <= en_search;
      if (en_search) begin
        cand_idx_q   <= cand_idx;
        cand_found_q <= cand_found;
      end
    end
  end

  // ------------------------------------------------------------ void table
  logic              wa_en, wb_en;
  logic [IDX_W-1:0]  wa_addr, wb_addr;
  logic [TIME_W-1:0] wa_start, wa_end, wb_start, wb_end;

  void_table #(
    .NUM_SLOTS(NUM_SLOTS),
    .TIME_W   (TIME_W)
  ) u_table (
    .clk     (clk),
    .rd_en   (rd_en),
    .rd_addr (cand_idx_q),
    .rd_start(void_start),
    .rd_end  (void_end),
    .wa_en   (wa_en),
    .wa_addr (wa_addr),
    .wa_start(wa_start),
    .wa_end  (wa_end),
    .wb_en   (wb_en),
    .wb_addr (wb_addr),
    .wb_start(wb_start),
    .wb_end  (wb_end)
  );

  // ---------------------------------------------------------- verification
  verification_circuit #(.TIME_W(TIME_W)) u_verify (
    .cand_found(cand_found_q),
    .void_start(void_start),
    .void_end  (void_end),
    .arr_time  (bdp_arr),
    .dep_time  (bdp_dep),
    .avail     (avail)
  );

  // ---------------------------------------------------------------- update
  logic [IDX_W-1:0]     dep_slot;
  logic [NUM_SLOTS-1:0] vec_after_left, vec_next;
  logic                 left_keep, right_len, right_keep;

  slot_of_time #(
    .NUM_SLOTS (NUM_SLOTS),
    .TIME_W    (TIME_W),
    .SLOT_SHIFT(SLOT_SHIFT)
  ) u_dep_slot (
    .t   (bdp_dep),
    .slot(dep_slot)
  );

  always_comb begin
    left_keep      = (bdp_arr != void_start);
    right_len      = (bdp_dep != void_end);
    vec_after_left = index_vec;
    if (!left_keep) vec_after_left[cand_idx_q] = 1'b0;
    right_keep     = right_len && !vec_after_left[dep_slot];
    vec_next       = vec_after_left;
    if (right_keep) vec_next[dep_slot] = 1'b1;

    wa_en    = 1'b0;
    wa_addr  = cand_idx_q;
    wa_start = void_start;
    wa_end   = bdp_arr;
    wb_en    = update && right_keep;
    wb_addr  = dep_slot;
    wb_start = bdp_dep;
    wb_end   = void_end;
    if (init) begin
      wa_en    = 1'b1;
      wa_addr  = '0;
      wa_start = '0;
      wa_end   = '1;
    end else if (update && left_keep) begin
      wa_en    = 1'b1;
    end
  end

  assign drop_event = update && right_len && !right_keep;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      index_vec <= '0;
    else if (init)   index_vec <= NUM_SLOTS'(1);
    else if (update) index_vec <= vec_next;
  end

  // The control unit only hands a burst to a channel whose void fits it.
  a_update_avail: assert property (@(posedge clk) disable iff (!rst_n)
    update |-> avail);

endmodule

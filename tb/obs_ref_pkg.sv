// obs_ref_pkg: reference model of one channel's index-based void search,
// used by the search engine and scheduler testbenches.
//
// The model keeps the voids of a channel as a list of slots, each holding at
// most one void (start, end), and applies the same booking rule as the RTL:
// the candidate is the latest void starting in a slot no later than the
// arrival slot; booking splits it into the part before and the part after
// the burst; a remainder of zero length vanishes and a remainder whose slot
// already holds a void is dropped. It also keeps every booked burst so the
// testbench can check that no two bursts on a channel overlap, a check that
// does not depend on the void bookkeeping at all.
package obs_ref_pkg;

  class obs_channel_model #(int NSLOT = 64, int TW = 17, int SHIFT = 11);
    bit          used  [NSLOT];
    int unsigned vstart[NSLOT];
    int unsigned vend  [NSLOT];
    int unsigned bursts_a[$];
    int unsigned bursts_e[$];
    int          cand;

    function new();
      reset();
    endfunction

    function void reset();
      foreach (used[i]) used[i] = 0;
      used[0]   = 1;
      vstart[0] = 0;
      vend[0]   = (1 << TW) - 1;
      bursts_a.delete();
      bursts_e.delete();
      cand = -1;
    endfunction

    static function int slot(int unsigned t);
      int unsigned s = t / (1 << SHIFT);
      return (s > NSLOT - 1) ? NSLOT - 1 : int'(s);
    endfunction

    // Search: returns 1 if the candidate void fits; gap = ta - void start.
    function bit search(int unsigned ta, int unsigned te, output int unsigned gap);
      cand = -1;
      gap  = 0;
      for (int i = slot(ta); i >= 0; i--) begin
        if (used[i]) begin
          cand = i;
          break;
        end
      end
      if (cand < 0) return 0;
      gap = ta - vstart[cand];
      return (vstart[cand] <= ta) && (te <= vend[cand]);
    endfunction

    // Book the burst into the candidate of the last search; returns 1 if the
    // remainder after the burst was dropped.
    function bit book(int unsigned ta, int unsigned te);
      int unsigned vs = vstart[cand];
      int unsigned ve = vend[cand];
      int          j  = slot(te);
      bit          dropped = 0;
      if (ta != vs) vend[cand] = ta;
      else          used[cand] = 0;
      if (te != ve) begin
        if (!used[j]) begin
          used[j]   = 1;
          vstart[j] = te;
          vend[j]   = ve;
        end else begin
          dropped = 1;
        end
      end
      bursts_a.push_back(ta);
      bursts_e.push_back(te);
      return dropped;
    endfunction

    // 1 if [ta, te] overlaps a burst already booked on this channel.
    function bit overlaps(int unsigned ta, int unsigned te);
      foreach (bursts_a[i])
        if (ta < bursts_e[i] && bursts_a[i] < te) return 1;
      return 0;
    endfunction

    function bit [NSLOT-1:0] vector();
      bit [NSLOT-1:0] v;
      foreach (used[i]) v[i] = used[i];
      return v;
    endfunction
  endclass

endpackage

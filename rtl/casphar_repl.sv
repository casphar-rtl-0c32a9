// casphar_repl: CASPHAr-aware LRU replacement for one set.
//
// Victim choice, in order of preference:
//   1. an invalid way;
//   2. (POL_CONSUMED, POL_EXT) the least recently used consumed line, i.e. a
//      shared line whose ready data has already been read by its consumer;
//   3. (POL_EXT) the least recently used line that is not ready, so that
//      produced-but-unconsumed lines stay resident as long as possible;
//   4. the least recently used line.
// POL_LRU disables steps 2 and 3 (the unmodified policy).
//
// LRU state is a per-way age, 0 = most recently used, WAYS-1 = least; the
// ages of a set always form a permutation. touch_way computes the ages after
// an access: the accessed way becomes 0 and every way that was younger than
// it ages by one. Purely combinational; the ages live in the tag array.
//
// The consumed-first and not-ready-before-ready rules follow the described
// policy extension on top of LRU; the age encoding is this design's choice.
module casphar_repl
  import casphar_pkg::*;
#(
  parameter int unsigned WAYS  = LLC_WAYS_DEFAULT,
  parameter int unsigned AGE_W = $clog2(WAYS)
) (
  input  policy_e               policy,
  input  logic [WAYS-1:0]       valid,
  input  logic [WAYS-1:0]       consumed,
  input  logic [WAYS-1:0]       ready,      // shared line produced, not yet consumed
  input  logic [WAYS*AGE_W-1:0] ages,
  output logic [$clog2(WAYS)-1:0] victim,
  output vreason_e              reason,
  // LRU update for an access to touch_way
  input  logic [$clog2(WAYS)-1:0] touch_way,
  output logic [WAYS*AGE_W-1:0] ages_next
);
  localparam int unsigned WAY_W = $clog2(WAYS);

  // Oldest way among those selected by mask; found = mask not empty.
  function automatic logic [WAY_W:0] oldest(input logic [WAYS-1:0] mask,
                                            input logic [WAYS*AGE_W-1:0] a);
    logic [WAY_W-1:0] best;
    logic [AGE_W-1:0] best_age;
    logic found;
    best = '0; best_age = '0; found = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (mask[w] && (!found || a[w*AGE_W +: AGE_W] > best_age)) begin
        best     = WAY_W'(w);
        best_age = a[w*AGE_W +: AGE_W];
        found    = 1'b1;
      end
    end
    return {found, best};
  endfunction

  logic [WAY_W:0] inv_pick, cons_pick, nr_pick, lru_pick;

  always_comb begin
    inv_pick = '0;
    for (int w = WAYS-1; w >= 0; w--)
      if (!valid[w]) inv_pick = {1'b1, WAY_W'(w)};
    cons_pick = oldest(valid & consumed, ages);
    nr_pick   = oldest(valid & ~ready, ages);
    lru_pick  = oldest(valid, ages);

    if (inv_pick[WAY_W]) begin
      victim = inv_pick[WAY_W-1:0];
      reason = VR_INVALID;
    end else if (policy != POL_LRU && cons_pick[WAY_W]) begin
      victim = cons_pick[WAY_W-1:0];
      reason = VR_CONSUMED;
    end else if (policy == POL_EXT && nr_pick[WAY_W]
                 && nr_pick[WAY_W-1:0] != lru_pick[WAY_W-1:0]) begin
      victim = nr_pick[WAY_W-1:0];
      reason = VR_NOTREADY;
    end else begin
      victim = lru_pick[WAY_W-1:0];
      reason = VR_LRU;
    end
  end

  always_comb begin
    logic [AGE_W-1:0] old_age;
    old_age = ages[touch_way*AGE_W +: AGE_W];
    for (int w = 0; w < WAYS; w++) begin
      if (WAY_W'(w) == touch_way)
        ages_next[w*AGE_W +: AGE_W] = '0;
      else if (ages[w*AGE_W +: AGE_W] < old_age)
        ages_next[w*AGE_W +: AGE_W] = ages[w*AGE_W +: AGE_W] + AGE_W'(1);
      else
        ages_next[w*AGE_W +: AGE_W] = ages[w*AGE_W +: AGE_W];
    end
  end
endmodule

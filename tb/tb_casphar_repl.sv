// tb_casphar_repl: self-checking test of the CASPHAr-aware LRU policy.
// Builds random sets (a random age permutation, random valid, consumed and
// ready bits) and checks the victim and its reason for all three policy
// modes against a reference that ranks the ways by age. Also checks the LRU
// update: the touched way becomes youngest and the ages stay a permutation
// with the relative order of the other ways kept.
module tb_casphar_repl;
  import casphar_pkg::*;
  localparam int WAYS = 16, AGE_W = 4;
  policy_e policy;
  logic [WAYS-1:0] valid, consumed, ready;
  logic [WAYS*AGE_W-1:0] ages, ages_next;
  logic [3:0] victim, touch_way;
  vreason_e reason;
  int checks = 0, failures = 0;
  int cnt_reason[4];

  casphar_repl #(.WAYS(WAYS)) dut (.*);

  function automatic int age_of(int w);
    return int'(ages[w*AGE_W +: AGE_W]);
  endfunction

  // oldest way in mask, -1 if none
  function automatic int ref_oldest(logic [WAYS-1:0] m);
    int best = -1;
    for (int a = WAYS-1; a >= 0 && best < 0; a--)
      for (int w = 0; w < WAYS; w++)
        if (m[w] && age_of(w) == a) best = w;
    return best;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int perm[WAYS];
      int exp_v; vreason_e exp_r;
      int inv, c, nr, l;
      for (int w = 0; w < WAYS; w++) perm[w] = w;
      perm.shuffle();
      for (int w = 0; w < WAYS; w++) ages[w*AGE_W +: AGE_W] = AGE_W'(perm[w]);
      valid    = (t % 4 == 0) ? WAYS'($urandom) : '1;
      consumed = (t % 5 == 0) ? '0 : WAYS'($urandom & $urandom);
      ready    = WAYS'($urandom) & ~consumed;
      if (t % 7 == 0) ready = '1;
      policy   = policy_e'(t % 3);
      touch_way = 4'($urandom_range(0, WAYS-1));
      #1;
      inv = -1;
      for (int w = WAYS-1; w >= 0; w--) if (!valid[w]) inv = w;
      c  = ref_oldest(valid & consumed);
      nr = ref_oldest(valid & ~ready);
      l  = ref_oldest(valid);
      if (inv >= 0) begin exp_v = inv; exp_r = VR_INVALID; end
      else if (policy != POL_LRU && c >= 0) begin exp_v = c; exp_r = VR_CONSUMED; end
      else if (policy == POL_EXT && nr >= 0 && nr != l) begin exp_v = nr; exp_r = VR_NOTREADY; end
      else begin exp_v = l; exp_r = VR_LRU; end
      checks++;
      if (int'(victim) != exp_v || reason != exp_r) begin
        failures++;
        $display("FAIL pol=%0d v=%h c=%h r=%h victim=%0d/%0d reason=%0d/%0d",
                 policy, valid, consumed, ready, victim, exp_v, reason, exp_r);
      end
      cnt_reason[int'(reason)]++;
      // LRU update
      checks++;
      for (int w = 0; w < WAYS; w++) begin
        int exp_age;
        if (w == int'(touch_way)) exp_age = 0;
        else if (perm[w] < perm[touch_way]) exp_age = perm[w] + 1;
        else exp_age = perm[w];
        if (int'(ages_next[w*AGE_W +: AGE_W]) != exp_age) begin
          failures++;
          $display("FAIL lru way %0d age %0d exp %0d", w, ages_next[w*AGE_W +: AGE_W], exp_age);
          break;
        end
      end
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (cnt_reason[r] == 0) begin failures++; $display("FAIL reason %0d never seen", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

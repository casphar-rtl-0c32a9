// tb_casphar_wait_table: self-checking test of the synchronization-miss table.
// Parks reads for random lines (until full), wakes random lines, and checks
// against a reference list: which entries become replayable, the replayed
// address/agent/id, lowest-index replay order, full and count, wake_hit,
// re-arming and freeing. Addresses with different offsets in the same line
// must match. One agent may hold at most DEPTH-1 entries.
module tb_casphar_wait_table;
  import casphar_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic park_valid = 0, wake_valid = 0, done_valid = 0, rearm_valid = 0;
  addr_t park_addr = '0, wake_addr = '0, replay_addr;
  src_e park_src = SRC_CPU, replay_src;
  id_t park_id = '0, replay_id;
  logic full, wake_hit, replay_valid;
  logic [2:0] count;
  logic [1:0] replay_idx, done_idx = '0, rearm_idx = '0;
  int checks = 0, failures = 0;

  typedef struct { bit v; bit w; addr_t a; src_e s; id_t id; } ent_t;
  ent_t rf [DEPTH];

  casphar_wait_table #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    int n = 0, rp = -1, ns = 0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (rf[i].v) n++;
      if (rf[i].v && rf[i].s == park_src) ns++;
      if (rf[i].v && !rf[i].w) rp = i;
    end
    checks++;
    if (count != 3'(n) || full != (n == DEPTH || ns >= DEPTH-1) || replay_valid != (rp >= 0) ||
        (rp >= 0 && (replay_idx != 2'(rp) || replay_addr != rf[rp].a ||
                     replay_src != rf[rp].s || replay_id != rf[rp].id))) begin
      failures++;
      $display("FAIL count=%0d/%0d full=%b rv=%b idx=%0d/%0d", count, n, full, replay_valid, replay_idx, rp);
    end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int wakes = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); compare();
    for (int t = 0; t < 3000; t++) begin
      int act;
      act = $urandom_range(0, 3);
      park_valid = 0; wake_valid = 0; done_valid = 0; rearm_valid = 0;
      park_src = src_e'($urandom_range(0, 1));
      #1 compare();
      if (act == 0 && !full) begin
        automatic int f = -1;
        for (int i = DEPTH-1; i >= 0; i--) if (!rf[i].v) f = i;
        park_valid = 1;
        park_addr = 64'h4000 + 64'($urandom_range(0, 5)) * 64 + 64'($urandom_range(0, 63));
        park_id = id_t'($urandom);
        rf[f] = '{1, 1, park_addr & ~64'h3F, park_src, park_id};
      end else if (act == 1) begin
        automatic bit exp_hit = 0;
        wake_valid = 1;
        wake_addr = 64'h4000 + 64'($urandom_range(0, 5)) * 64 + 64'($urandom_range(0, 63));
        for (int i = 0; i < DEPTH; i++)
          if (rf[i].v && rf[i].w && rf[i].a == (wake_addr & ~64'h3F)) begin
            rf[i].w = 0; exp_hit = 1;
          end
        #1;
        checks++;
        if (wake_hit !== exp_hit) begin failures++; $display("FAIL wake_hit"); end
        if (exp_hit) wakes++;
      end else if (act == 2 && replay_valid) begin
        done_valid = 1; done_idx = replay_idx; rf[replay_idx].v = 0;
      end else if (act == 3 && replay_valid) begin
        rearm_valid = 1; rearm_idx = replay_idx; rf[replay_idx].w = 1;
      end
      @(negedge clk);
      park_valid = 0; wake_valid = 0; done_valid = 0; rearm_valid = 0;
      #1 compare();
    end
    checks++;
    if (wakes < 50) begin failures++; $display("FAIL too few wakes %0d", wakes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_casphar_patterns: producer/consumer access patterns on a small LLC.
//
// The benefit of in-cache staging depends on the order in which producer
// and consumer touch the shared lines. This test stages 96 C2A lines (three
// times the capacity of an 8-set, 4-way LLC) from the CPU to the
// accelerator in four patterns and measures, per pattern, how many produced
// lines were evicted before being consumed (spills), memory traffic, and
// the average produce-to-consume lifetime:
//   matching   - both in ascending order, consumer eager (kmp, md);
//   irregular  - ascending producer, consumer in random order (spmv,
//                stencil, nw);
//   opposing   - producer ascending, consumer descending (fft);
//   coarse     - consumer starts only after everything is produced, the
//                classic coarse-grain staging.
// The irregular order is replayed with the eviction range disabled (the
// basic variant). A final round stages new data through the lines of the
// coarse run with both sides in random order. Checks: all data, and never
// delivered before produced; no spills when the number of lines alive at
// once stays below the capacity (matching); at least N - capacity spills
// when every line is alive at once (opposing, coarse); a much shorter
// lifetime for matching than for coarse staging; and more memory reads for
// the basic variant. Spilled lines come back through the F/E path and are
// still delivered correctly.
module tb_casphar_patterns;
  import casphar_pkg::*;

  localparam int SETS = 8, WAYS = 4, WAIT_DEPTH = 4, N = 96, CAP = SETS * WAYS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  cpu_req_valid = 0, cpu_req_ready, cpu_rsp_valid;
  req_t  cpu_req = '0;
  rsp_t  cpu_rsp;
  logic  acc_req_valid = 0, acc_req_ready, acc_rsp_valid;
  req_t  acc_req = '0;
  rsp_t  acc_rsp;
  logic  cfg_we = 0;
  logic [2:0]  cfg_addr = '0;
  logic [63:0] cfg_wdata = '0, cfg_rdata;
  logic  mem_req_valid, mem_req_ready, mem_req_we, mem_req_fe, mem_rsp_valid, mem_rsp_fe;
  addr_t mem_req_addr;
  line_t mem_req_wdata, mem_rsp_rdata;
  events_t events;

  casphar_llc #(.SETS(SETS), .WAYS(WAYS), .WAIT_DEPTH(WAIT_DEPTH)) dut (.*);
  tb_dram_model #(.LAT(12)) mem (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int spills = 0;
  always @(negedge clk) if (events.evict_ready) spills++;

  // per-pattern state
  addr_t  base;
  line_t  data_of [N];
  longint t_prod [N];
  bit     prod [N];
  int     order [N];
  int     porder [N];
  int     got;
  longint life_sum;

  function automatic line_t rnd_line();
    line_t l;
    for (int k = 0; k < LINE_W/32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  task automatic cfg_write(input logic [2:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // accelerator responses
  int id_line [16];
  bit id_busy [16];
  int acc_out;
  always @(negedge clk) begin
    if (acc_rsp_valid && acc_rsp.op == OP_READ) begin
      automatic int i = id_line[acc_rsp.id];
      check(prod[i], $sformatf("line %0d delivered before produced", i));
      check(acc_rsp.rdata == data_of[i], $sformatf("line %0d data", i));
      life_sum += cycle - t_prod[i];
      got++;
      acc_out--;
      id_busy[acc_rsp.id] = 0;
    end
  end

  task automatic producer(input int gap);
    for (int k = 0; k < N; k++) begin
      automatic int i = porder[k];
      repeat (gap) @(negedge clk);
      cpu_req = '{op: OP_FLUSH, addr: base + addr_t'(i) * 64, wdata: data_of[i], wmask: '1,
                  id: id_t'(i % 16)};
      cpu_req_valid = 1;
      while (!cpu_req_ready) @(negedge clk);
      prod[i] = 1;
      t_prod[i] = cycle;
      @(negedge clk);
      cpu_req_valid = 0;
    end
  endtask

  task automatic consumer(input int start_delay, input int gap);
    repeat (start_delay) @(negedge clk);
    acc_out = 0;
    for (int k = 0; k < N; k++) begin
      automatic int id = 0;
      while (acc_out >= WAIT_DEPTH - 1) @(negedge clk);
      repeat (gap) @(negedge clk);
      // parked reads stay outstanding while later ones hit: ids come from a free pool
      while (id_busy[id]) id++;
      id_busy[id] = 1;
      id_line[id] = order[k];
      acc_req = '{op: OP_READ, addr: base + addr_t'(order[k]) * 64, wdata: '0, wmask: '0,
                  id: id_t'(id)};
      acc_req_valid = 1;
      acc_out++;
      while (!acc_req_ready) @(negedge clk);
      @(negedge clk);
      acc_req_valid = 0;
    end
  endtask

  task automatic run(input string name, input int kind, input int region, input bit range_en,
                     output int sp, output longint life, output int rd);
    int s0, r0;
    base = 64'h100_0000 + addr_t'(region) * 64'h10_0000;
    for (int i = 0; i < N; i++) begin
      data_of[i] = rnd_line(); prod[i] = 0; porder[i] = i;
      if (kind != 5) order[i] = i;   // 5 repeats the previous consumer order
    end
    if (kind == 1 || kind == 4) order.shuffle();
    if (kind == 4) porder.shuffle();
    if (kind == 2) for (int i = 0; i < N; i++) order[i] = N - 1 - i;
    got = 0; life_sum = 0;
    cfg_write(CFG_CTRL, {61'd0, 2'(POL_CONSUMED), range_en});
    cfg_write(CFG_C2A_START, base);
    cfg_write(CFG_C2A_END, base + N * 64);
    cfg_addr = CFG_STATUS;
    repeat (2) @(negedge clk);
    while (cfg_rdata[0]) @(negedge clk);
    s0 = spills; r0 = mem.reads;
    fork
      producer(4);
      consumer(kind == 3 ? 8 * N : 0, kind == 3 ? 0 : 2);
    join
    while (got < N) @(negedge clk);
    sp = spills - s0;
    life = life_sum / N;
    rd = mem.reads - r0;
    $display("%-10s spills %3d  memory reads %3d  average lifetime %0d cycles", name, sp, rd, life);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sp_m, sp_i, sp_o, sp_c, sp_2, sp_b, rd_m, rd_i, rd_o, rd_c, rd_2, rd_b;
    longint lf_m, lf_i, lf_o, lf_c, lf_2, lf_b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_addr = CFG_STATUS;
    @(negedge clk);
    while (cfg_rdata[0]) @(negedge clk);
    run("matching",  0, 0, 1, sp_m, lf_m, rd_m);
    run("irregular", 1, 1, 1, sp_i, lf_i, rd_i);
    // the basic variant: no eviction range, every consumer miss is fetched;
    // same consumer order as the irregular run
    run("irr. base", 5, 5, 0, sp_b, lf_b, rd_b);
    run("opposing",  2, 2, 1, sp_o, lf_o, rd_o);
    run("coarse",    3, 3, 1, sp_c, lf_c, rd_c);
    // second staging round through the lines of the coarse run: lines that
    // were spilled, fetched back and consumed must not leave a stale F/E bit
    // in memory that releases the consumer before the new data exists
    run("round 2",   4, 3, 1, sp_2, lf_2, rd_2);
    check(sp_m == 0, "matching order spills nothing");
    check(rd_m == N, "matching order: one fill per line, no refetch");
    check(sp_o >= N - CAP, "opposing order spills at least N - capacity lines");
    check(sp_c >= N - CAP, "coarse staging spills at least N - capacity lines");
    check(rd_o > N && rd_c > N, "spilled lines are fetched back");
    check(lf_m * 10 < lf_c, "matching order lifetime far below coarse staging");
    check(sp_m < sp_i, "irregular consumer spills more than matching order");
    check(rd_b > rd_i, "without the eviction range, early consumer misses go to memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

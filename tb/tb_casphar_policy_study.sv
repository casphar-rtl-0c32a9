// tb_casphar_policy_study: replacement modes under a slow consumer.
//
// When the consumer runs slower than the producer, produced lines pile up
// in the LLC and eventually exceed it; the replacement policy then decides
// how many of them spill to memory and have to be fetched back. This test
// stages 64 C2A lines through an 8-set, 4-way LLC while the CPU also keeps
// touching a private working set of 12 unshared lines between produces.
// The accelerator reads the staged lines in order, once every R producer
// periods, for the rates 1:4 and 1:8. The cache is 2048 times smaller than
// the full-size one, so these stand for much slower consumers, such as
// 1:64 and 1:128, on the full-size cache.
// Each rate runs under plain LRU, consumed-first and extended replacement.
// Per run it reports spills (produced lines evicted before being consumed),
// memory reads and the cycles until the last line is consumed.
// Checks: all staged and private data; consumed-first spills fewer lines
// than LRU and extended no more than consumed-first, at both rates; and
// the slower consumer spills more under every policy.
module tb_casphar_policy_study;
  import casphar_pkg::*;

  localparam int SETS = 8, WAYS = 4, WAIT_DEPTH = 4, N = 64, PRIV = 12;
  localparam int PERIOD = 48;   // producer period in cycles

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

  addr_t  base, priv_base;
  line_t  data_of [N];
  bit     prod [N];
  int     got;
  longint t_last;
  addr_t  cpu_rd_addr;
  bit     cpu_rd_pending;

  function automatic line_t rnd_line();
    line_t l;
    for (int k = 0; k < LINE_W/32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  task automatic cfg_write(input logic [2:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  always @(negedge clk) begin
    if (acc_rsp_valid && acc_rsp.op == OP_READ) begin
      automatic int i = int'(acc_rsp.id) + 16 * (got / 16);
      check(prod[i], $sformatf("line %0d delivered before produced", i));
      check(acc_rsp.rdata == data_of[i], $sformatf("line %0d data", i));
      got++;
      t_last = cycle;
    end
    if (cpu_rsp_valid && cpu_rsp.op == OP_READ) begin
      check(cpu_rsp.rdata == mem.pattern(cpu_rd_addr), "private line data");
      cpu_rd_pending = 0;
    end
  end

  task automatic cpu_op(input req_t r);
    @(negedge clk);
    cpu_req = r;
    cpu_req_valid = 1;
    while (!cpu_req_ready) @(negedge clk);
    @(negedge clk);
    cpu_req_valid = 0;
  endtask

  // one line produced per PERIOD cycles, with three private reads after it
  task automatic producer();
    for (int i = 0; i < N; i++) begin
      automatic longint t0 = cycle;
      cpu_op('{op: OP_FLUSH, addr: base + addr_t'(i) * 64, wdata: data_of[i], wmask: '1,
               id: id_t'(i % 16)});
      prod[i] = 1;
      for (int k = 0; k < 3; k++) begin
        cpu_rd_addr = priv_base + addr_t'((3 * i + k) % PRIV) * 64;
        cpu_rd_pending = 1;
        cpu_op('{op: OP_READ, addr: cpu_rd_addr, wdata: '0, wmask: '0, id: '0});
        while (cpu_rd_pending) @(negedge clk);
      end
      while (cycle < t0 + PERIOD) @(negedge clk);
    end
  endtask

  // in-order reads, one every rate producer periods, one outstanding
  task automatic consumer(input int rate);
    for (int k = 0; k < N; k++) begin
      automatic longint t0 = cycle;
      acc_req = '{op: OP_READ, addr: base + addr_t'(k) * 64, wdata: '0, wmask: '0,
                  id: id_t'(k % 16)};
      acc_req_valid = 1;
      while (!acc_req_ready) @(negedge clk);
      @(negedge clk);
      acc_req_valid = 0;
      while (got <= k) @(negedge clk);
      while (cycle < t0 + rate * PERIOD) @(negedge clk);
    end
  endtask

  task automatic run(input int run_no, input policy_e pol, input int rate, output int sp,
                     output int rd, output longint cyc);
    int s0, r0;
    longint c0;
    base      = 64'h200_0000 + addr_t'(run_no) * 64'h10_0000;
    priv_base = 64'h800_0000 + addr_t'(run_no) * 64'h10_0000;
    for (int i = 0; i < N; i++) begin data_of[i] = rnd_line(); prod[i] = 0; end
    got = 0;
    cfg_write(CFG_CTRL, {61'd0, 2'(pol), 1'b1});
    cfg_write(CFG_C2A_START, base);
    cfg_write(CFG_C2A_END, base + N * 64);
    cfg_addr = CFG_STATUS;
    repeat (2) @(negedge clk);
    while (cfg_rdata[0]) @(negedge clk);
    s0 = spills; r0 = mem.reads; c0 = cycle;
    fork
      producer();
      consumer(rate);
    join
    sp  = spills - s0;
    rd  = mem.reads - r0;
    cyc = t_last - c0;
    $display("rate 1:%0d %-12s spills %3d  memory reads %3d  cycles %0d", rate, pol.name(), sp,
             rd, cyc);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sp [2][3], rd [2][3];
    longint cyc [2][3];
    policy_e pols [3] = '{POL_LRU, POL_CONSUMED, POL_EXT};
    int rates [2] = '{4, 8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_addr = CFG_STATUS;
    @(negedge clk);
    while (cfg_rdata[0]) @(negedge clk);
    for (int r = 0; r < 2; r++)
      for (int p = 0; p < 3; p++)
        run(3 * r + p, pols[p], rates[r], sp[r][p], rd[r][p], cyc[r][p]);
    for (int r = 0; r < 2; r++) begin
      check(sp[r][1] < sp[r][0], $sformatf("1:%0d consumed-first spills fewer than LRU", rates[r]));
      check(sp[r][2] <= sp[r][1], $sformatf("1:%0d extended spills no more than consumed-first",
                                            rates[r]));
    end
    for (int p = 0; p < 3; p++)
      check(sp[1][p] > sp[0][p], $sformatf("%s: slower consumer spills more", pols[p].name()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

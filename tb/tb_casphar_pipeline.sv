// tb_casphar_pipeline: a CPU -> accelerator -> CPU kernel chain, pipelined
// through the LLC versus coarse-grain staging.
//
// The CPU pre-processes 48 input lines and produces each into the C2A
// region with a clflush. The accelerator reads each line and multiplies it
// as a 4 x 4 matrix of 32-bit words by a fixed 4 x 4 matrix (a small GEMM).
// It then writes the result line into the A2C region. The CPU
// post-processes every result line and marks it consumed with a clflush.
// The chain runs twice on an 8-set, 4-way LLC:
//   pipelined - the accelerator is started with the CPU, and every line
//               moves on as soon as it is produced;
//   coarse    - the accelerator starts after all input is staged, and the
//               CPU post-processes after the accelerator has finished.
// Per run it reports cycles, memory reads and writes, and spills. Checks:
// every result equals the product computed from the original input; the
// pipelined chain takes at most 3/4 of the coarse chain's cycles; and it
// causes less memory traffic and fewer spills, because far fewer lines are
// alive at once.
module tb_casphar_pipeline;
  import casphar_pkg::*;

  localparam int SETS = 8, WAYS = 4, WAIT_DEPTH = 4, N = 48;
  localparam int PRE = 20, ACC = 12, POST = 16;   // compute cycles per line

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

  // C = A x B for 4 x 4 matrices of 32-bit words, row-major in a line;
  // B[k][c] = k + 2c + 1
  function automatic line_t gemm(input line_t a);
    line_t c;
    for (int r = 0; r < 4; r++)
      for (int col = 0; col < 4; col++) begin
        logic [31:0] s = '0;
        for (int k = 0; k < 4; k++) s += a[(4*r + k)*32 +: 32] * 32'(k + 2*col + 1);
        c[(4*r + col)*32 +: 32] = s;
      end
    return c;
  endfunction

  addr_t c2a, a2c;
  line_t in_data [N];

  bit    cpu_got, acc_got;
  line_t cpu_data, acc_data;
  always @(negedge clk) begin
    if (cpu_rsp_valid && cpu_rsp.op == OP_READ) begin cpu_got = 1; cpu_data = cpu_rsp.rdata; end
    if (acc_rsp_valid && acc_rsp.op == OP_READ) begin acc_got = 1; acc_data = acc_rsp.rdata; end
  end

  task automatic cfg_write(input logic [2:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic cpu_op(input op_e op, input addr_t a, input line_t d, input bmask_t m);
    @(negedge clk);
    cpu_req = '{op: op, addr: a, wdata: d, wmask: m, id: '0};
    cpu_req_valid = 1;
    while (!cpu_req_ready) @(negedge clk);
    @(negedge clk);
    cpu_req_valid = 0;
  endtask

  task automatic acc_op(input op_e op, input addr_t a, input line_t d);
    @(negedge clk);
    acc_req = '{op: op, addr: a, wdata: d, wmask: (op == OP_READ) ? '0 : '1, id: '0};
    acc_req_valid = 1;
    while (!acc_req_ready) @(negedge clk);
    @(negedge clk);
    acc_req_valid = 0;
  endtask

  task automatic cpu_pre();
    for (int i = 0; i < N; i++) begin
      repeat (PRE) @(negedge clk);
      cpu_op(OP_FLUSH, c2a + addr_t'(i) * 64, in_data[i], '1);
    end
  endtask

  task automatic accel();
    for (int i = 0; i < N; i++) begin
      acc_got = 0;
      acc_op(OP_READ, c2a + addr_t'(i) * 64, '0);
      while (!acc_got) @(negedge clk);
      repeat (ACC) @(negedge clk);
      acc_op(OP_WRITE, a2c + addr_t'(i) * 64, gemm(acc_data));
    end
  endtask

  task automatic cpu_post();
    for (int i = 0; i < N; i++) begin
      cpu_got = 0;
      cpu_op(OP_READ, a2c + addr_t'(i) * 64, '0, '0);
      while (!cpu_got) @(negedge clk);
      check(cpu_data == gemm(in_data[i]), $sformatf("result line %0d", i));
      repeat (POST) @(negedge clk);
      cpu_op(OP_FLUSH, a2c + addr_t'(i) * 64, '0, '0);   // consumed
    end
  endtask

  task automatic run(input bit pipelined, output longint cyc, output int traffic,
                     output int sp);
    longint c0;
    int t0, s0;
    c2a = pipelined ? 64'h300_0000 : 64'h400_0000;
    a2c = c2a + 64'h8_0000;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < LINE_W/32; k++) in_data[i][k*32 +: 32] = $urandom;
    cfg_write(CFG_C2A_START, c2a);
    cfg_write(CFG_C2A_END, c2a + N * 64);
    cfg_write(CFG_A2C_START, a2c);
    cfg_write(CFG_A2C_END, a2c + N * 64);
    cfg_addr = CFG_STATUS;
    repeat (2) @(negedge clk);
    while (cfg_rdata[0]) @(negedge clk);
    c0 = cycle; t0 = mem.reads + mem.writes; s0 = spills;
    if (pipelined) begin
      fork
        begin cpu_pre(); cpu_post(); end
        accel();
      join
    end else begin
      cpu_pre();
      accel();
      cpu_post();
    end
    cyc = cycle - c0;
    traffic = mem.reads + mem.writes - t0;
    sp = spills - s0;
    $display("%-9s cycles %0d  memory reads+writes %0d  spills %0d",
             pipelined ? "pipelined" : "coarse", cyc, traffic, sp);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cyc_p, cyc_c;
    int tr_p, tr_c, sp_p, sp_c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_addr = CFG_STATUS;
    @(negedge clk);
    while (cfg_rdata[0]) @(negedge clk);
    run(1, cyc_p, tr_p, sp_p);
    run(0, cyc_c, tr_c, sp_c);
    check(cyc_p * 4 <= cyc_c * 3, "pipelined chain at most 3/4 of the coarse chain's cycles");
    check(tr_p < tr_c, "pipelined chain causes less memory traffic");
    check(sp_p < sp_c, "pipelined chain spills fewer lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

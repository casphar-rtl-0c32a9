// tb_casphar_cfg_regs: self-checking test of the configuration registers.
// Checks reset values, write/readback of the region and control registers,
// the read-only eviction range and status words, that region writes raise
// reconfig_req until acknowledged and control or read-only writes do not
// (and leave the regions alone), and that a
// write in the acknowledge cycle keeps the request raised.
module tb_casphar_cfg_regs;
  import casphar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0, cfg_rdata;
  regions_t regions;
  logic evict_en, reconfig_req, reconfig_ack = 0, ev_valid = 0, busy = 0;
  policy_e policy;
  addr_t ev_min = 64'h1111, ev_max = 64'h2222;
  int checks = 0, failures = 0;

  casphar_cfg_regs dut (.*);
  always #5 clk = ~clk;

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  task automatic wr(input logic [2:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic rd(input logic [2:0] a, input logic [63:0] exp);
    cfg_addr = a; #1; expect_eq(cfg_rdata, exp, $sformatf("read %0d", a));
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] v[4];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq(regions, '0, "reset regions");
    expect_eq(evict_en, 1, "reset evict_en");
    expect_eq(policy, POL_CONSUMED, "reset policy");
    expect_eq(reconfig_req, 0, "reset req");
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 4; i++) begin
        v[i] = {$urandom, $urandom};
        wr(3'(i), v[i]);
        expect_eq(reconfig_req, 1, "req after region write");
        @(negedge clk); reconfig_ack = 1; @(negedge clk); reconfig_ack = 0;
        expect_eq(reconfig_req, 0, "req after ack");
      end
      for (int i = 0; i < 4; i++) rd(3'(i), v[i]);
      expect_eq(regions.c2a_start, v[0], "c2a_start");
      expect_eq(regions.c2a_end, v[1], "c2a_end");
      expect_eq(regions.a2c_start, v[2], "a2c_start");
      expect_eq(regions.a2c_end, v[3], "a2c_end");
    end
    wr(CFG_CTRL, 64'b100);       // evict range off, POL_EXT
    expect_eq(reconfig_req, 0, "ctrl write does not reconfigure");
    expect_eq(evict_en, 0, "evict_en off");
    expect_eq(policy, POL_EXT, "policy ext");
    rd(CFG_CTRL, 64'b100);
    wr(CFG_CTRL, 64'b001);
    expect_eq(policy, POL_LRU, "policy lru");
    // random writes to the control and read-only words: no reconfiguration,
    // regions untouched, control fields follow the written value
    for (int t = 0; t < 60; t++) begin
      automatic logic [2:0]  a = 3'(4 + $urandom_range(0, 3));
      automatic logic [63:0] d = {$urandom, $urandom};
      automatic logic        exp_en = evict_en;
      automatic policy_e     exp_pol = policy;
      if (a == CFG_CTRL) begin
        exp_en  = d[0];
        exp_pol = (d[2:1] == 2'd3) ? POL_EXT : policy_e'(d[2:1]);
      end
      wr(a, d);
      expect_eq(reconfig_req, 0, $sformatf("write to %0d does not reconfigure", a));
      expect_eq(evict_en, exp_en, "evict_en after write");
      expect_eq(policy, exp_pol, "policy after write");
      expect_eq(regions.a2c_end, v[3], "regions kept");
    end
    wr(CFG_CTRL, 64'b001);
    rd(CFG_EV_MIN, 64'h1111);
    rd(CFG_EV_MAX, 64'h2222);
    busy = 1; ev_valid = 1; rd(CFG_STATUS, 64'b11);
    busy = 0; rd(CFG_STATUS, 64'b10);
    // write in the same cycle as the acknowledge wins
    @(negedge clk); cfg_we = 1; cfg_addr = CFG_A2C_END; cfg_wdata = 64'h55; reconfig_ack = 1;
    @(negedge clk); cfg_we = 0; reconfig_ack = 0;
    expect_eq(reconfig_req, 1, "write beats ack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

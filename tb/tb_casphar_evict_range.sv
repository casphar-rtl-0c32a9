// tb_casphar_evict_range: self-checking test of the Min/Max eviction registers.
// Records random evictions, keeps its own minimum and maximum, and checks
// ev_min/ev_max/valid and the in-range answer for addresses inside, at and
// beyond both bounds, before the first eviction and after clear. Offsets
// within a line must not matter.
module tb_casphar_evict_range;
  import casphar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, upd_valid = 0, chk_in_range, valid;
  addr_t upd_addr = '0, chk_addr = '0, ev_min, ev_max;
  int checks = 0, failures = 0;
  longint unsigned rmin, rmax;
  bit rvalid;

  casphar_evict_range dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input addr_t a, input bit exp);
    chk_addr = a; #1;
    checks++;
    if (chk_in_range !== exp) begin
      failures++; $display("FAIL range check %h exp %b", a, exp);
    end
  endtask

  task automatic chk_regs();
    checks++;
    if (valid !== rvalid || (rvalid && (ev_min !== rmin || ev_max !== rmax))) begin
      failures++; $display("FAIL regs v=%b min=%h max=%h exp %b %h %h", valid, ev_min, ev_max, rvalid, rmin, rmax);
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rvalid = 0; chk_regs();
    chk(64'hE000, 0);
    for (int round = 0; round < 3; round++) begin
      rvalid = 0;
      for (int i = 0; i < 40; i++) begin
        addr_t a;
        a = 64'h0010_0000 + 64'($urandom_range(0, 4095)) * 64 + 64'($urandom_range(0, 63));
        @(negedge clk); upd_valid = 1; upd_addr = a;
        @(negedge clk); upd_valid = 0;
        if (!rvalid) begin rmin = a & ~64'h3F; rmax = a & ~64'h3F; rvalid = 1; end
        else begin
          if ((a & ~64'h3F) < rmin) rmin = a & ~64'h3F;
          if ((a & ~64'h3F) > rmax) rmax = a & ~64'h3F;
        end
        chk_regs();
        chk(rmin, 1); chk(rmax + 63, 1); chk(rmin - 1, 0); chk(rmax + 64, 0);
        chk((rmin + rmax) / 2, 1);
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      rvalid = 0; chk_regs(); chk(rmin, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

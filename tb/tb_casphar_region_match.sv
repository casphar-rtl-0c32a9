// tb_casphar_region_match: self-checking test of the shared-region classifier.
// Drives random and boundary addresses against random [start, end) windows
// and compares in_c2a / in_a2c / shared with an independent reference that
// works on line numbers. Includes empty windows and the first and last line
// of each window.
module tb_casphar_region_match;
  import casphar_pkg::*;
  addr_t addr;
  regions_t regions;
  logic in_c2a, in_a2c, shared;
  int checks = 0, failures = 0;

  casphar_region_match dut (.addr, .regions, .in_c2a, .in_a2c, .shared);

  function automatic logic ref_in(addr_t a, addr_t s, addr_t e);
    longint unsigned ln, sl, el;
    ln = a >> 6; sl = s >> 6; el = e >> 6;
    // windows here are line aligned
    return (ln >= sl) && (ln < el);
  endfunction

  task automatic check_one();
    logic rc, ra;
    #1;
    rc = ref_in(addr, regions.c2a_start, regions.c2a_end);
    ra = ref_in(addr, regions.a2c_start, regions.a2c_end);
    checks++;
    if (in_c2a !== rc || in_a2c !== ra || shared !== (rc | ra)) begin
      failures++;
      $display("FAIL addr=%h c2a=%b/%b a2c=%b/%b sh=%b", addr, in_c2a, rc, in_a2c, ra, shared);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      regions.c2a_start = {$urandom_range(0, 1000), 6'd0} + 64'h1_0000_0000;
      regions.c2a_end   = regions.c2a_start + {$urandom_range(0, 64), 6'd0};
      regions.a2c_start = {$urandom_range(0, 1000), 6'd0} + 64'h1_0000_0000;
      regions.a2c_end   = regions.a2c_start + {$urandom_range(0, 64), 6'd0};
      // boundaries
      addr = regions.c2a_start;        check_one();
      addr = regions.c2a_end - 1;      check_one();
      addr = regions.c2a_end;          check_one();
      addr = regions.a2c_start - 1;    check_one();
      addr = regions.a2c_start + 63;   check_one();
      addr = regions.a2c_end;          check_one();
      for (int k = 0; k < 10; k++) begin
        addr = 64'h1_0000_0000 + 64'($urandom_range(0, 1100*64));
        check_one();
      end
    end
    // a window in the top of the address space
    regions = '{c2a_start: 64'hFFFF_FFFF_FFFF_0000, c2a_end: 64'hFFFF_FFFF_FFFF_FFC0,
                a2c_start: 0, a2c_end: 64'h40};
    addr = 64'hFFFF_FFFF_FFFF_FF80; check_one();
    addr = 64'hFFFF_FFFF_FFFF_FFC1; check_one();
    addr = 64'h3F; check_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

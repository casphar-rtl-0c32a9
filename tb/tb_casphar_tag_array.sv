// tb_casphar_tag_array: self-checking test of the set-wide tag store.
// Writes random entries to random sets of a small array, keeps a reference
// copy, and checks one-cycle read latency, that rd_data holds without rd_en,
// and that a write is seen by a read issued in a later cycle.
module tb_casphar_tag_array;
  localparam int SETS = 64, W = 200;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [5:0] rd_idx = 0, wr_idx = 0;
  logic [W-1:0] rd_data, wr_data = '0;
  logic [W-1:0] ref_mem [SETS];
  bit written [SETS];
  int checks = 0, failures = 0;

  casphar_tag_array #(.SETS(SETS), .ENTRY_W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk); wr_en = 1; wr_idx = 6'(s); wr_data = rnd(); ref_mem[s] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      int s;
      s = $urandom_range(0, SETS-1);
      @(negedge clk);
      wr_en = ($urandom_range(0, 1) == 1);
      wr_idx = 6'($urandom_range(0, SETS-1));
      wr_data = rnd();
      rd_en = 1; rd_idx = 6'(s);
      @(negedge clk);
      if (wr_en) ref_mem[wr_idx] = wr_data;
      wr_en = 0; rd_en = 0;
      checks++;
      // the read was issued together with a write: old data unless other set
      if (rd_data !== ref_mem[s] && !(wr_idx == 6'(s))) begin
        failures++; $display("FAIL set %0d", s);
      end
      @(negedge clk);
      checks++;
      if (rd_data !== ref_mem[s] && !(wr_idx == 6'(s))) begin
        failures++; $display("FAIL hold set %0d", s);
      end
      rd_en = 1; rd_idx = 6'(s);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data !== ref_mem[s]) begin failures++; $display("FAIL reread set %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

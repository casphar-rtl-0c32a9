// tb_casphar_data_array: self-checking test of the LLC data store.
// Performs random byte-masked writes to a small array, mirrors them in a
// reference byte array, and checks every line read back (one-cycle read
// latency, output held between reads, masked bytes untouched).
module tb_casphar_data_array;
  localparam int LINES = 64, LB = 64;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [5:0] rd_addr = 0, wr_addr = 0;
  logic [LB*8-1:0] rd_data, wr_data = '0;
  logic [LB-1:0] wr_be = '0;
  logic [LB*8-1:0] ref_mem [LINES];
  int checks = 0, failures = 0;

  casphar_data_array #(.LINES(LINES), .LINE_BYTES(LB)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [LB*8-1:0] rnd();
    logic [LB*8-1:0] v;
    for (int i = 0; i < LB*8; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int l = 0; l < LINES; l++) begin
      @(negedge clk); wr_en = 1; wr_addr = 6'(l); wr_data = rnd(); wr_be = '1; ref_mem[l] = wr_data;
    end
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'($urandom_range(0, LINES-1)); wr_data = rnd();
      wr_be = {$urandom, $urandom};
      for (int b = 0; b < LB; b++)
        if (wr_be[b]) ref_mem[wr_addr][b*8 +: 8] = wr_data[b*8 +: 8];
      @(negedge clk);
      wr_en = 0; rd_en = 1; rd_addr = 6'($urandom_range(0, LINES-1));
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== ref_mem[rd_addr]) begin failures++; $display("FAIL line %0d", rd_addr); end
      @(negedge clk);
      checks++;
      if (rd_data !== ref_mem[rd_addr]) begin failures++; $display("FAIL hold line %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_casphar_req_arb: self-checking test of the request arbiter.
// Drives random request patterns and checks against a reference: nothing is
// granted when disabled, a woken replay always wins, and the two ports
// alternate when both keep requesting.
module tb_casphar_req_arb;
  logic clk = 0, rst_n = 0;
  logic en = 0, replay_valid = 0, cpu_valid = 0, acc_valid = 0;
  logic gnt_replay, gnt_cpu, gnt_acc;
  int checks = 0, failures = 0;
  bit ref_last_acc;

  casphar_req_arb dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int alternations = 0;
    bit prev_acc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_last_acc = 1;
    for (int t = 0; t < 2000; t++) begin
      bit er, ec, ea;
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      replay_valid = ($urandom_range(0, 4) == 0);
      cpu_valid = (t < 1000) ? 1'($urandom) : 1'b1;
      acc_valid = (t < 1000) ? 1'($urandom) : 1'b1;
      if (t >= 1000) replay_valid = 0;
      #1;
      er = en && replay_valid;
      ec = en && !replay_valid && cpu_valid && (!acc_valid || ref_last_acc);
      ea = en && !replay_valid && !ec && acc_valid;
      checks++;
      if (gnt_replay !== er || gnt_cpu !== ec || gnt_acc !== ea) begin
        failures++;
        $display("FAIL t=%0d en=%b r=%b c=%b a=%b gnt=%b%b%b exp=%b%b%b", t, en, replay_valid,
                 cpu_valid, acc_valid, gnt_replay, gnt_cpu, gnt_acc, er, ec, ea);
      end
      if (ec) ref_last_acc = 0;
      if (ea) ref_last_acc = 1;
      if (t >= 1000 && (ec || ea)) begin
        if (t > 1000 && prev_acc != ea) alternations++;
        prev_acc = ea;
      end
    end
    checks++;
    if (alternations < 100) begin failures++; $display("FAIL no round robin"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

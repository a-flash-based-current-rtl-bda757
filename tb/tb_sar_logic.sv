// tb_sar_logic: drives the SAR with an ideal comparator (target >= trial) and
// checks that every 8-bit target is found and that done is high exactly
// 9 cycles after the cycle in which start is high.
module tb_sar_logic;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, start, cmp, busy, done;
  logic [7:0] trial, result;
  int target;

  sar_logic #(.BITS(8)) dut (.*);
  assign cmp = target >= int'(trial);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    rst_n = 0; start = 0; target = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 256; t++) begin
      target = t;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (result != 8'(t)) begin failures++; $display("target %0d result %0d", t, result); end
      if (cyc != 9) begin failures++; $display("latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

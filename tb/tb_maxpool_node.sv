// tb_maxpool_node: every 9-bit window against every kernel mask of size
// 1x1, 2x2 and 3x3; the result must be the maximum of the +1/-1 values.
module tb_maxpool_node;
  int checks = 0, failures = 0;
  logic [8:0] x, mask;
  logic y;
  maxpool_node #(.N(9)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx;
    for (int k = 1; k <= 3; k++) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) mask[r*3 + c] = (r < k) && (c < k);
      for (int v = 0; v < 512; v++) begin
        x = 9'(v);
        #1;
        mx = -1;
        for (int p = 0; p < 9; p++) if (mask[p] && x[p]) mx = 1;
        checks++;
        if ((y ? 1 : -1) != mx) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_flash_node: checks an 8-bit-input node (8 input networks with
// binary-weighted mirrors) and a 1-bit-input node. Random weights, thresholds
// and inputs; out_bit must equal (sum(w*x) > T) and diff must equal
// sum(w*x) - T, where an 8-bit input v counts as 2*v - 255 and a bit b as
// 2*b - 1.
module tb_flash_node;
  import qnn_pkg::*;
  localparam int N = 70;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic prog_we, thr_we, fire;
  logic [13:0] prog_chunk;
  logic [PROG_CHUNK*4-1:0] prog_data;
  logic signed [31:0] thr;
  logic [8*N-1:0] x8;
  logic [N-1:0]   x1;
  logic ob8, ob1;
  int d8, d1;
  int w [N];
  int pix [N];

  flash_node #(.N_IN(N), .IN_BITS(8)) dut8 (.clk, .prog_we, .thr_we, .prog_chunk, .prog_data,
    .thr, .fire, .x(x8), .out_bit(ob8), .diff(d8));
  flash_node #(.N_IN(N), .IN_BITS(1)) dut1 (.clk, .prog_we, .thr_we, .prog_chunk, .prog_data,
    .thr, .fire, .x(x1), .out_bit(ob1), .diff(d1));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s8, s1, t, n_pos, n_neg;
    n_pos = 0; n_neg = 0;
    prog_we = 0; thr_we = 0; fire = 0; prog_chunk = '0; prog_data = '0; thr = 0;
    x8 = '0; x1 = '0;
    for (int it = 0; it < 40; it++) begin
      for (int i = 0; i < N; i++) w[i] = $urandom_range(8) - 4;
      for (int c = 0; c < 2; c++) begin
        @(negedge clk);
        prog_we = 1; prog_chunk = 14'(c);
        for (int k = 0; k < PROG_CHUNK; k++)
          prog_data[4*k +: 4] = (c*PROG_CHUNK + k < N) ? 4'(w[c*PROG_CHUNK + k]) : 4'd0;
      end
      @(negedge clk); prog_we = 0;
      t = int'($urandom_range(400)) - 200;
      if (it % 4 == 0) t = 0;
      thr_we = 1; thr = t;
      @(negedge clk); thr_we = 0;
      for (int v = 0; v < 6; v++) begin
        s8 = 0; s1 = 0;
        for (int i = 0; i < N; i++) begin
          pix[i] = $urandom_range(255);
          for (int j = 0; j < 8; j++) x8[j*N + i] = pix[i][j];
          x1[i] = 1'($urandom);
          s8 += w[i] * (2*pix[i] - 255);
          s1 += w[i] * (x1[i] ? 1 : -1);
        end
        // 8-bit threshold scaled to the larger sum range
        fire = 1;
        @(negedge clk); fire = 0;
        checks += 4;
        if (ob8 != (s8 > t)) begin failures++; $display("ob8 %0d s8 %0d t %0d", ob8, s8, t); end
        if (d8 != s8 - t)    begin failures++; $display("d8 %0d exp %0d", d8, s8 - t); end
        if (ob1 != (s1 > t)) begin failures++; $display("ob1 %0d s1 %0d t %0d", ob1, s1, t); end
        if (d1 != s1 - t)    begin failures++; $display("d1 %0d exp %0d", d1, s1 - t); end
        if (s1 > t) n_pos++; else n_neg++;
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) failures++;   // both output values were seen
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

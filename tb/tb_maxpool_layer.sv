// tb_maxpool_layer: a 7x7 map of 4 random channels pooled 3x3 with stride 2,
// then a 6x6 map pooled 2x2 with stride 2, with random output back-pressure.
// Each output pixel must be the channel-wise maximum of its window.
module tb_maxpool_layer;
  import qnn_pkg::*;
  localparam int W_MAX = 8, C = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [C-1:0] in_data, out_data;
  pool_cfg_t cfg;
  logic [C-1:0] img [8][8];

  maxpool_layer #(.W_MAX(W_MAX), .K_MAX(3), .C_MAX(C)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int k, int s);
    int ow, n_in, n_out, oy, ox;
    logic [C-1:0] e;
    cfg = '{en: 1'b1, img_w: 16'(w), img_h: 16'(w), k: 4'(k), stride: 4'(s)};
    for (int y = 0; y < w; y++) for (int x = 0; x < w; x++) img[y][x] = C'($urandom);
    ow = (w - k) / s + 1;
    n_in = 0; n_out = 0;
    while (n_out < ow * ow) begin
      @(negedge clk);
      in_valid = (n_in < w * w) && ($urandom_range(2) != 0);
      in_data = (n_in < w * w) ? img[n_in / w][n_in % w] : '0;
      out_ready = ($urandom_range(2) != 0);
      @(posedge clk);
      if (in_valid && in_ready) n_in++;
      if (out_valid && out_ready) begin
        oy = n_out / ow; ox = n_out % ow;
        e = '0;
        for (int r = 0; r < k; r++) for (int c = 0; c < k; c++) e |= img[oy*s + r][ox*s + c];
        checks++;
        if (out_data != e) begin failures++; $display("out %0d got %h exp %h", n_out, out_data, e); end
        n_out++;
      end
    end
    @(negedge clk); in_valid = 0; out_ready = 0;
    checks++;
    if (n_in != w * w) failures++;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; in_data = '0;
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(7, 3, 2);
    run(6, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_conv_layer: an 8-bit-input CONV layer (K_MAX = 3, 2 channels, 4 nodes).
// Run 1: 5x4 map, 3x3 kernel, stride 1, padding 1, all nodes fire together.
// Run 2: 6x6 map, 2x2 kernel, stride 2, no padding, 3 filters, layer
// partitioning. Weights, thresholds and pixels are random; each output pixel
// is compared with a convolution computed here, with random back-pressure.
// The cycles in which nodes fire are counted: one per output pixel without
// partitioning, n_filt per output pixel with it, and never two nodes at once.
module tb_conv_layer;
  import qnn_pkg::*;
  localparam int W_MAX = 8, K_MAX = 3, C = 2, F = 4, N_IN = K_MAX * K_MAX * C;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [C*8-1:0] in_data;
  logic [F-1:0] out_data;
  conv_cfg_t cfg;
  prog_t prog;
  int w [F][N_IN];
  int thr [F];
  int img [8][8][C];
  int fire_cycles = 0, multi_fire = 0;

  conv_layer #(.LAYER_ID(3), .W_MAX(W_MAX), .K_MAX(K_MAX), .C_MAX(C), .IN_BITS(8), .F_MAX(F)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (dut.fire != '0) fire_cycles++;
    if (!$onehot0(dut.fire) && cfg.part) multi_fire++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic program_layer(int k);
    for (int f = 0; f < F; f++) begin
      for (int r = 0; r < K_MAX; r++) for (int c = 0; c < K_MAX; c++) for (int ch = 0; ch < C; ch++)
        w[f][(r*K_MAX + c)*C + ch] = (r < k && c < k) ? int'($urandom_range(8)) - 4 : 0;
      thr[f] = int'($urandom_range(4000)) - 2000;
      @(negedge clk);
      prog = '0; prog.w_we = 1; prog.layer = 3; prog.node = 13'(f); prog.chunk = 0;
      for (int i = 0; i < N_IN; i++) prog.wdata[4*i +: 4] = 4'(w[f][i]);
      @(negedge clk);
      prog = '0; prog.t_we = 1; prog.layer = 3; prog.node = 13'(f); prog.tdata = thr[f];
      // a write to another layer must not land here
      @(negedge clk);
      prog = '0; prog.w_we = 1; prog.layer = 2; prog.node = 13'(f); prog.wdata = '1;
    end
    @(negedge clk); prog = '0;
  endtask

  task automatic run(int iw, int ih, int k, int s, int pad, int nf, bit part);
    int ow, oh, n_in, n_out, oy, ox, sum, py, px, v, fc0;
    logic [F-1:0] e;
    cfg = '{en: 1'b1, part: part, img_w: 16'(iw), img_h: 16'(ih), pad_lo: 4'(pad), pad_hi: 4'(pad),
            k: 4'(k), stride: 4'(s), n_filt: 13'(nf)};
    program_layer(k);
    for (int y = 0; y < ih; y++) for (int x = 0; x < iw; x++) for (int ch = 0; ch < C; ch++)
      img[y][x][ch] = $urandom_range(255);
    ow = (iw + 2*pad - k) / s + 1; oh = (ih + 2*pad - k) / s + 1;
    n_in = 0; n_out = 0; fc0 = fire_cycles;
    while (n_out < ow * oh) begin
      @(negedge clk);
      in_valid = (n_in < iw * ih) && ($urandom_range(3) != 0);
      for (int ch = 0; ch < C; ch++) in_data[8*ch +: 8] = 8'(img[n_in / iw][n_in % iw][ch]);
      out_ready = ($urandom_range(2) != 0);
      @(posedge clk);
      if (in_valid && in_ready) n_in++;
      if (out_valid && out_ready) begin
        oy = n_out / ow; ox = n_out % ow;
        e = '0;
        for (int f = 0; f < nf; f++) begin
          sum = 0;
          for (int kr = 0; kr < k; kr++) for (int kc = 0; kc < k; kc++) for (int ch = 0; ch < C; ch++) begin
            py = oy*s + kr - pad; px = ox*s + kc - pad;
            v = (py >= 0 && py < ih && px >= 0 && px < iw) ? img[py][px][ch] : 0;
            sum += w[f][((k-1-kr)*K_MAX + (k-1-kc))*C + ch] * (2*v - 255);
          end
          e[f] = sum > thr[f];
        end
        checks++;
        if (out_data != e) begin failures++; $display("out %0d got %b exp %b", n_out, out_data, e); end
        n_out++;
      end
    end
    @(negedge clk); in_valid = 0; out_ready = 0;
    checks += 2;
    if (n_in != iw * ih) failures++;
    if (fire_cycles - fc0 != ow * oh * (part ? nf : 1)) begin
      failures++; $display("fire cycles %0d", fire_cycles - fc0);
    end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; in_data = '0; prog = '0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 4, 3, 1, 1, 4, 1'b0);
    run(6, 6, 2, 2, 0, 3, 1'b1);
    checks++;
    if (multi_fire != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

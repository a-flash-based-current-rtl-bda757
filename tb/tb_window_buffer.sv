// tb_window_buffer: streams two 10x7 maps (pixel value = its index + 1) into a
// buffer provisioned for K_MAX = 4 and W_MAX = 12, configured for a 3x3 kernel
// with stride 2. Each window must come at the expected kernel position, in
// order, with every pixel (r up, c left) equal to the map pixel, and input
// must stall while a window is held.
module tb_window_buffer;
  localparam int W_MAX = 12, K_MAX = 4, PIX_W = 8;
  localparam int W = 10, H = 7, K = 3, S = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in_valid, in_ready, win_valid, win_ack;
  logic [PIX_W-1:0] in_data;
  logic [K_MAX*K_MAX*PIX_W-1:0] win;
  logic [15:0] cfg_w = W, cfg_h = H;
  logic [3:0] cfg_k = K, cfg_s = S;
  int stalls = 0;

  window_buffer #(.W_MAX(W_MAX), .K_MAX(K_MAX), .PIX_W(PIX_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0;
  initial begin
    rst_n = 0; in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (sent < 2 * W * H) begin
      in_valid = ($urandom_range(3) != 0);
      in_data  = 8'(sent % (W * H) + 1);
      @(posedge clk);
      if (in_valid && !in_ready) stalls++;
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
  end

  localparam int OW = (W - K) / S + 1, OH = (H - K) / S + 1;
  initial begin
    int got, oy, ox, ry, rx, e;
    got = 0; win_ack = 0;
    @(posedge rst_n);
    while (got < 2 * OW * OH) begin
      @(negedge clk);
      win_ack = 0;
      if (win_valid && $urandom_range(1)) begin
        oy = (got % (OW * OH)) / OW; ox = got % OW;
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) begin
            ry = oy * S + K - 1 - r; rx = ox * S + K - 1 - c;
            e = ry * W + rx + 1;
            checks++;
            if (int'(win[(r*K_MAX + c)*PIX_W +: PIX_W]) != e) begin
              failures++;
              $display("win %0d (%0d,%0d) got %0d exp %0d", got, r, c, win[(r*K_MAX + c)*PIX_W +: PIX_W], e);
            end
          end
        win_ack = 1;
        got++;
      end
    end
    @(negedge clk); win_ack = 0;
    repeat (5) @(negedge clk);
    checks += 2;
    if (sent != 2 * W * H) failures++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

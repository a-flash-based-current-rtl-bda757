// tb_stream_padder: a 5x4 map padded by 1 before and 2 after, sent twice with
// random gaps on both sides of the handshake; every output pixel must be the
// input pixel at its place or zero in the border.
module tb_stream_padder;
  localparam int PIX_W = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [PIX_W-1:0] in_data, out_data;
  logic [15:0] img_w = 5, img_h = 4;
  logic [3:0]  pad_lo = 1, pad_hi = 2;

  stream_padder #(.PIX_W(PIX_W)) dut (.*);

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
    while (sent < 40) begin
      in_valid = ($urandom_range(2) != 0);
      in_data  = 8'(sent % 20 + 1);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
  end

  initial begin
    int got, r, c, e;
    got = 0; out_ready = 0;
    @(posedge rst_n);
    while (got < 2 * 8 * 7) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        r = (got % 56) / 8; c = got % 8;
        e = (r >= 1 && r < 5 && c >= 1 && c < 6) ? ((r - 1) * 5 + (c - 1)) + 1 : 0;
        checks++;
        if (int'(out_data) != e) begin failures++; $display("pix %0d got %0d exp %0d", got, out_data, e); end
        got++;
      end
    end
    checks++;
    if (sent != 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

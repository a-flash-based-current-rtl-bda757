// window_buffer: LAYER MEM, decoder and NODE MEM of a CONV or MAXPOOL layer.
//
// A feature map arrives row by row, one pixel (PIX_W bits, all channels) per
// transfer. LAYER MEM keeps the previous K_MAX-1 rows in shift registers; the
// register length is W_MAX, and the row width in use (cfg_w) selects the tap
// that feeds the next row's register. For every accepted pixel the decoder
// forms one column (the new pixel and the pixels 1..K_MAX-1 rows above it)
// and shifts it into NODE MEM, a K_MAX x K_MAX shift register, so the window
// slides one column to the right per pixel and one row down per image row.
//
// When the accepted pixel is the bottom-right corner of a kernel position
// (row >= k-1, col >= k-1, both offsets multiples of the stride), win_valid is
// raised and input is stalled (in_ready = 0) until the consumer returns
// win_ack; win_valid falls on the edge after win_ack.
//
// win holds pixel (r, c) of NODE MEM at [(r*K_MAX + c)*PIX_W +: PIX_W], where
// r counts rows up and c counts columns left from the newest pixel. A kernel
// of size k < K_MAX uses r, c < k only. Counters wrap at cfg_w x cfg_h, so
// images follow one another without a reset.
// Shift-register memories and the column-by-column feed follow the design
// description; stride, the stall handshake and the indexing are choices of
// this implementation.
module window_buffer #(
  parameter int W_MAX = 231,
  parameter int K_MAX = 11,
  parameter int PIX_W = 24
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [15:0]                    cfg_w,
  input  logic [15:0]                    cfg_h,
  input  logic [3:0]                     cfg_k,
  input  logic [3:0]                     cfg_s,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [PIX_W-1:0]               in_data,
  output logic [K_MAX*K_MAX*PIX_W-1:0]   win,
  output logic                           win_valid,
  input  logic                           win_ack
);

  logic [PIX_W-1:0] lines [K_MAX-1][W_MAX];   // LAYER MEM
  logic [PIX_W-1:0] nmem  [K_MAX][K_MAX];     // NODE MEM
  logic [PIX_W-1:0] col_v [K_MAX];            // decoder output column
  logic [15:0]      row, col;
  logic             accept, hit;
  logic [15:0]      k1;
  logic [$clog2(W_MAX)-1:0] tap;   // row width in use selects the tap

  assign in_ready = !win_valid;
  assign accept   = in_valid && in_ready;
  assign k1       = 16'(cfg_k) - 1'b1;
  assign tap      = $clog2(W_MAX)'(cfg_w - 1'b1);
  assign hit      = (row >= k1) && (col >= k1) &&
                    ((row - k1) % 16'(cfg_s) == 0) && ((col - k1) % 16'(cfg_s) == 0);

  always_comb begin
    col_v[0] = in_data;
    for (int r = 1; r < K_MAX; r++) col_v[r] = lines[r-1][tap];
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      for (int r = 0; r < K_MAX - 1; r++) begin
        for (int i = W_MAX - 1; i > 0; i--) lines[r][i] <= lines[r][i-1];
        lines[r][0] <= col_v[r];
      end
      for (int r = 0; r < K_MAX; r++) begin
        for (int c = K_MAX - 1; c > 0; c--) nmem[r][c] <= nmem[r][c-1];
        nmem[r][0] <= col_v[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      win_valid <= 1'b0;
    end else begin
      if (win_ack) win_valid <= 1'b0;
      if (accept) begin
        if (hit) win_valid <= 1'b1;
        if (col == cfg_w - 1'b1) begin
          col <= '0;
          row <= (row == cfg_h - 1'b1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < K_MAX; r++)
      for (int c = 0; c < K_MAX; c++)
        win[(r*K_MAX + c)*PIX_W +: PIX_W] = nmem[r][c];
  end

endmodule

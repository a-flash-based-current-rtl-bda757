// maxpool_layer: one MAXPOOL layer of the dataflow pipeline.
//
// Receives and emits pixels like a CONV layer: window_buffer (LAYER MEM,
// decoder, NODE MEM) gathers a K_MAX x K_MAX window, and C_MAX maxpool_node
// OR gates, one per channel, reduce the k x k window in use. When a window is
// ready the output pixel is registered and offered on the next cycle; the
// window is released when that pixel is taken. A disabled layer
// (cfg.en = 0) sinks its input and produces nothing. Windows are limited to
// 3x3 as in the design description; stride and the handshake are choices of
// this implementation.
module maxpool_layer
  import qnn_pkg::*;
#(
  parameter int W_MAX = 56,
  parameter int K_MAX = 3,
  parameter int C_MAX = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pool_cfg_t         cfg,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [C_MAX-1:0]  in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [C_MAX-1:0]  out_data
);

  localparam int NW = K_MAX * K_MAX;

  logic [NW*C_MAX-1:0] win;
  logic                win_valid, win_ack, wb_ready;
  logic [NW-1:0]       mask;
  logic [C_MAX-1:0]    pooled;

  window_buffer #(.W_MAX(W_MAX), .K_MAX(K_MAX), .PIX_W(C_MAX)) u_win (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_w    (cfg.img_w),
    .cfg_h    (cfg.img_h),
    .cfg_k    (cfg.k),
    .cfg_s    (cfg.stride),
    .in_valid (in_valid && cfg.en),
    .in_ready (wb_ready),
    .in_data  (in_data),
    .win      (win),
    .win_valid(win_valid),
    .win_ack  (win_ack)
  );
  assign in_ready = cfg.en ? wb_ready : 1'b1;

  always_comb begin
    for (int r = 0; r < K_MAX; r++)
      for (int c = 0; c < K_MAX; c++)
        mask[r*K_MAX + c] = (r < int'(cfg.k)) && (c < int'(cfg.k));
  end

  for (genvar ch = 0; ch < C_MAX; ch++) begin : g_node
    logic [NW-1:0] xw;
    always_comb for (int p = 0; p < NW; p++) xw[p] = win[p*C_MAX + ch];
    maxpool_node #(.N(NW)) u_or (.x(xw), .mask(mask), .y(pooled[ch]));
  end

  assign win_ack = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (out_valid) begin
      if (out_ready) out_valid <= 1'b0;
    end else if (win_valid) begin
      out_valid <= 1'b1;
      out_data  <= pooled;
    end
  end

endmodule

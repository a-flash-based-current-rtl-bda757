// conv_layer: one CONV layer of the dataflow pipeline.
//
// Input pixels (C_MAX channels of IN_BITS bits; bits of channel ch at
// [ch*IN_BITS +: IN_BITS]) pass through stream_padder into window_buffer
// (LAYER MEM, decoder, NODE MEM). The layer has F_MAX flash_node instances,
// one per filter. Node sharing: every node sees the current NODE MEM window,
// so one node serves all kernel positions over time. Node input branch
// b = (r*K_MAX + c)*C_MAX + ch reads channel ch of window pixel (r, c), r rows
// up and c columns left of the newest pixel; bit j of an 8-bit input goes to
// input network j of the node.
//
// For each kernel position the controller fires the nodes and then offers the
// output pixel (bit f = output of filter f, filters >= n_filt read 0):
//   cfg.part = 0: all nodes fire in one cycle;
//   cfg.part = 1 (layer partitioning): one node fires per cycle, n_filt cycles.
// From win_valid an output pixel takes 1 + 1 cycles (part = 0) or
// 1 + n_filt cycles (part = 1) before out_valid; the window is released when
// the pixel is taken. A disabled layer (cfg.en = 0) sinks its input and
// produces nothing. Weights and thresholds are written through the prog bus
// (layer number LAYER_ID). Node sharing and layer partitioning follow the
// design description; the controller and its timing are choices of this
// implementation.
module conv_layer
  import qnn_pkg::*;
#(
  parameter int LAYER_ID = 0,
  parameter int W_MAX    = 231,
  parameter int K_MAX    = 11,
  parameter int C_MAX    = 3,
  parameter int IN_BITS  = 8,
  parameter int F_MAX    = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  conv_cfg_t                cfg,
  input  prog_t                    prog,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [C_MAX*IN_BITS-1:0] in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [F_MAX-1:0]         out_data
);

  localparam int PIX_W = C_MAX * IN_BITS;
  localparam int N_IN  = K_MAX * K_MAX * C_MAX;

  typedef enum logic [1:0] {S_IDLE, S_FIRE, S_OUT} state_e;
  state_e state;

  logic             pad_valid, pad_ready, pad_in_ready;
  logic [PIX_W-1:0] pad_data;
  logic [K_MAX*K_MAX*PIX_W-1:0] win;
  logic             win_valid, win_ack;
  logic [IN_BITS*N_IN-1:0] node_x;
  logic [F_MAX-1:0] fire, node_bit;
  logic [12:0]      cnt;
  logic             prog_hit;

  stream_padder #(.PIX_W(PIX_W)) u_pad (
    .clk      (clk),
    .rst_n    (rst_n),
    .img_w    (cfg.img_w),
    .img_h    (cfg.img_h),
    .pad_lo   (cfg.pad_lo),
    .pad_hi   (cfg.pad_hi),
    .in_valid (in_valid && cfg.en),
    .in_ready (pad_in_ready),
    .in_data  (in_data),
    .out_valid(pad_valid),
    .out_ready(pad_ready),
    .out_data (pad_data)
  );
  assign in_ready = cfg.en ? pad_in_ready : 1'b1;

  window_buffer #(.W_MAX(W_MAX), .K_MAX(K_MAX), .PIX_W(PIX_W)) u_win (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_w    (cfg.img_w + 16'(cfg.pad_lo) + 16'(cfg.pad_hi)),
    .cfg_h    (cfg.img_h + 16'(cfg.pad_lo) + 16'(cfg.pad_hi)),
    .cfg_k    (cfg.k),
    .cfg_s    (cfg.stride),
    .in_valid (pad_valid && cfg.en),
    .in_ready (pad_ready),
    .in_data  (pad_data),
    .win      (win),
    .win_valid(win_valid),
    .win_ack  (win_ack)
  );

  // Wiring from NODE MEM to the node input branches
  always_comb begin
    for (int j = 0; j < IN_BITS; j++)
      for (int rc = 0; rc < K_MAX * K_MAX; rc++)
        for (int ch = 0; ch < C_MAX; ch++)
          node_x[j*N_IN + rc*C_MAX + ch] = win[rc*PIX_W + ch*IN_BITS + j];
  end

  assign prog_hit = (int'(prog.layer) == LAYER_ID);

  for (genvar f = 0; f < F_MAX; f++) begin : g_node
    flash_node #(.N_IN(N_IN), .IN_BITS(IN_BITS)) u_node (
      .clk       (clk),
      .prog_we   (prog.w_we && prog_hit && int'(prog.node) == f),
      .thr_we    (prog.t_we && prog_hit && int'(prog.node) == f),
      .prog_chunk(prog.chunk),
      .prog_data (prog.wdata),
      .thr       (prog.tdata),
      .fire      (fire[f]),
      .x         (node_x),
      .out_bit   (node_bit[f]),
      .diff      ()
    );
  end

  always_comb begin
    fire = '0;
    if (state == S_FIRE) begin
      for (int f = 0; f < F_MAX; f++)
        fire[f] = cfg.part ? (f == int'(cnt)) : (f < int'(cfg.n_filt));
    end
  end

  always_comb begin
    for (int f = 0; f < F_MAX; f++) out_data[f] = node_bit[f] && (f < int'(cfg.n_filt));
  end

  assign out_valid = (state == S_OUT);
  assign win_ack   = (state == S_OUT) && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      case (state)
        S_IDLE: if (win_valid) begin
          cnt   <= '0;
          state <= S_FIRE;
        end
        S_FIRE: begin
          if (!cfg.part || cnt == cfg.n_filt - 1'b1) state <= S_OUT;
          else cnt <= cnt + 1'b1;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Layer partitioning: never more than one node fires in a cycle
  assert property (@(posedge clk) disable iff (!rst_n) cfg.part |-> $onehot0(fire));

endmodule

// qnn_top: flash-based current-mode QNN inference chip.
//
// A dataflow pipeline of up to N_CONV CONV layers, each followed by an
// optional MAXPOOL layer, then N_FC binary FC layers and a final FC layer with
// 8-bit ADC outputs. Every layer keeps its weights in its own flash nodes, so
// an inference reads nothing from outside the chip: after programming, an
// image streams in row by row and the class scores stream out.
//
// Layer routing (all from the configuration ports):
//   * CONV 0 takes the image (IMG_C channels of 8 bits, channel ch at
//     img_data[8*ch +: 8]).
//   * MAXPOOL s takes the output of CONV s.
//   * CONV s > 0 takes MAXPOOL s-1 if that layer is enabled, else CONV s-1
//     (2:1 layer_src_mux).
//   * Every FC layer takes any preceding layer through a 64:1 layer_src_mux:
//     source 2s = CONV s, 2s+1 = MAXPOOL s, 2*N_CONV + l = FC l.
// Disabled layers sink their input and produce nothing, so a network with
// fewer layers leaves the trailing layers off and points the first FC layer
// at its last feature map. A stream read by several layers (e.g. a CONV output
// read by its MAXPOOL layer and by an FC layer) advances only when all of its
// readers are ready. The configuration ports are static during inference;
// change them only with rst_n held low (reset clears the layer control state
// but not the flash weights and thresholds).
//
// Programming: prog is broadcast; layer numbers are CONV s -> s,
// FC l -> N_CONV + l, final layer -> N_CONV + N_FC.
//
// The default sizes are this implementation's choice of the maximum network:
// the union of Binary AlexNet (ImageNet, 224x224 input) and BinaryNet
// (Cifar-10, 32x32 input), with FC layers of up to 9216 inputs and 4096
// nodes as in the design description. *_W parameters are maximum row widths
// after padding.
module qnn_top
  import qnn_pkg::*;
#(
  parameter int N_CONV                  = 6,
  parameter int IMG_C                   = 3,
  parameter int CONV_W [N_CONV]         = '{231, 34, 18, 18, 15, 10},
  parameter int CONV_K [N_CONV]         = '{11, 5, 3, 3, 3, 3},
  parameter int CONV_F [N_CONV]         = '{128, 192, 384, 384, 512, 512},
  parameter int POOL_W [N_CONV]         = '{56, 32, 16, 16, 13, 8},
  parameter int N_FC                    = 2,
  parameter int FC_N [N_FC]             = '{9216, 4096},
  parameter int FC_F [N_FC]             = '{4096, 4096},
  parameter int OUT_N                   = 4096,
  parameter int OUT_F                   = 1000,
  parameter int ADC_LSB                 = 16,
  parameter int WORD_W                  = 4096   // FC input word, >= every layer output
) (
  input  logic              clk,
  input  logic              rst_n,
  input  conv_cfg_t         conv_cfg [N_CONV],
  input  pool_cfg_t         pool_cfg [N_CONV],
  input  fc_cfg_t           fc_cfg   [N_FC],
  input  fc_cfg_t           out_cfg,
  input  prog_t             prog,
  input  logic              img_valid,
  output logic              img_ready,
  input  logic [IMG_C*8-1:0] img_data,
  output logic              score_valid,
  input  logic              score_ready,
  output logic [12:0]       score_idx,
  output logic signed [7:0] score,
  output logic              score_last
);

  localparam int N_SRC = 64;                 // FC input multiplexer size
  localparam int N_USED = 2 * N_CONV + N_FC; // sources that exist

  // Layer output streams, numbered as the FC multiplexer sources
  logic              s_valid [N_SRC];
  logic [WORD_W-1:0] s_data  [N_SRC];
  logic [N_SRC-1:0]  s_ready;          // all readers of the source ready
  logic [N_SRC-1:0]  s_valid_vec;

  // Inputs of the CONV and MAXPOOL layers
  logic              c_in_ready [N_CONV];
  logic              p_in_ready [N_CONV];
  logic [N_CONV-1:0] c_sel_pool;       // CONV s (> 0) reads MAXPOOL s-1

  // FC layer inputs (the final layer is FC index N_FC)
  logic              f_in_valid [N_FC+1];
  logic              f_in_ready [N_FC+1];
  logic [WORD_W-1:0] f_in_data  [N_FC+1];
  logic [5:0]        f_sel      [N_FC+1];
  logic              f_en       [N_FC+1];

  always_comb begin
    for (int l = 0; l < N_FC; l++) begin
      f_sel[l] = fc_cfg[l].src;
      f_en[l]  = fc_cfg[l].en;
    end
    f_sel[N_FC] = out_cfg.src;
    f_en[N_FC]  = out_cfg.en;
  end

  // Ready of each source: AND over the layers that read it
  always_comb begin
    s_ready = '1;
    for (int s = 0; s < N_CONV; s++) begin
      // CONV s is read by MAXPOOL s and, when MAXPOOL s is off, by CONV s+1
      s_ready[2*s] = p_in_ready[s];
      if (s + 1 < N_CONV && !c_sel_pool[s+1]) s_ready[2*s] = s_ready[2*s] & c_in_ready[s+1];
      if (s + 1 < N_CONV && c_sel_pool[s+1])  s_ready[2*s+1] = c_in_ready[s+1];
    end
    for (int l = 0; l <= N_FC; l++)
      if (f_en[l]) s_ready[f_sel[l]] = s_ready[f_sel[l]] & f_in_ready[l];
  end

  always_comb begin
    for (int s = 0; s < N_SRC; s++) s_valid_vec[s] = s_valid[s] && s_ready[s];
  end

  // CONV and MAXPOOL layers
  for (genvar s = 0; s < N_CONV; s++) begin : g_stage
    localparam int CIN  = (s == 0) ? IMG_C : CONV_F[(s == 0) ? 0 : s - 1];
    localparam int BITS = (s == 0) ? 8 : 1;
    localparam int F    = CONV_F[s];

    logic [CIN*BITS-1:0] c_in_data;
    logic                c_in_valid;
    logic [F-1:0]        c_out_data, p_out_data;
    logic                c_out_valid, p_out_valid;

    if (s == 0) begin : g_first
      assign c_in_valid    = img_valid;
      assign c_in_data     = img_data;
      assign img_ready     = c_in_ready[0];
      assign c_sel_pool[0] = 1'b0;
    end else begin : g_next
      logic [WORD_W-1:0] mux_data;
      logic [1:0]        mux_ready_unused;
      logic [WORD_W-1:0] mux_src [2];
      assign c_sel_pool[s] = pool_cfg[s-1].en;
      assign mux_src[0]    = s_data[2*(s-1)];
      assign mux_src[1]    = s_data[2*(s-1)+1];
      layer_src_mux #(.N_SRC(2), .W(WORD_W)) u_mux (
        .sel      (c_sel_pool[s]),
        .src_valid({s_valid_vec[2*(s-1)+1], s_valid_vec[2*(s-1)]}),
        .src_ready(mux_ready_unused),
        .src_data (mux_src),
        .out_valid(c_in_valid),
        .out_ready(c_in_ready[s]),
        .out_data (mux_data)
      );
      assign c_in_data = mux_data[CIN-1:0];
    end

    conv_layer #(
      .LAYER_ID(s), .W_MAX(CONV_W[s]), .K_MAX(CONV_K[s]),
      .C_MAX(CIN), .IN_BITS(BITS), .F_MAX(F)
    ) u_conv (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg      (conv_cfg[s]),
      .prog     (prog),
      .in_valid (c_in_valid),
      .in_ready (c_in_ready[s]),
      .in_data  (c_in_data),
      .out_valid(c_out_valid),
      .out_ready(s_ready[2*s]),
      .out_data (c_out_data)
    );

    maxpool_layer #(.W_MAX(POOL_W[s]), .K_MAX(3), .C_MAX(F)) u_pool (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg      (pool_cfg[s]),
      .in_valid (s_valid_vec[2*s]),
      .in_ready (p_in_ready[s]),
      .in_data  (c_out_data),
      .out_valid(p_out_valid),
      .out_ready(s_ready[2*s+1]),
      .out_data (p_out_data)
    );

    assign s_valid[2*s]   = c_out_valid;
    assign s_data[2*s]    = WORD_W'(c_out_data);
    assign s_valid[2*s+1] = p_out_valid;
    assign s_data[2*s+1]  = WORD_W'(p_out_data);
  end

  // Input multiplexers of the FC layers
  for (genvar l = 0; l <= N_FC; l++) begin : g_fcmux
    logic [N_SRC-1:0] mux_ready_unused;
    layer_src_mux #(.N_SRC(N_SRC), .W(WORD_W)) u_mux (
      .sel      (f_sel[l]),
      .src_valid(s_valid_vec),
      .src_ready(mux_ready_unused),
      .src_data (s_data),
      .out_valid(f_in_valid[l]),
      .out_ready(f_in_ready[l]),
      .out_data (f_in_data[l])
    );
  end

  // Binary FC layers
  for (genvar l = 0; l < N_FC; l++) begin : g_fc
    logic [FC_F[l]-1:0] out_data;
    logic               out_valid;
    fc_layer #(
      .LAYER_ID(N_CONV + l), .N_MAX(FC_N[l]), .WORD_W(WORD_W), .F_MAX(FC_F[l])
    ) u_fc (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg      (fc_cfg[l]),
      .prog     (prog),
      .in_valid (f_in_valid[l]),
      .in_ready (f_in_ready[l]),
      .in_data  (f_in_data[l]),
      .out_valid(out_valid),
      .out_ready(s_ready[2*N_CONV + l]),
      .out_data (out_data)
    );
    assign s_valid[2*N_CONV + l] = out_valid;
    assign s_data[2*N_CONV + l]  = WORD_W'(out_data);
  end

  // Unused multiplexer inputs
  for (genvar u = N_USED; u < N_SRC; u++) begin : g_unused
    assign s_valid[u] = 1'b0;
    assign s_data[u]  = '0;
  end

  // Final FC layer with ADC outputs
  fc_out_layer #(
    .LAYER_ID(N_CONV + N_FC), .N_MAX(OUT_N), .WORD_W(WORD_W),
    .F_MAX(OUT_F), .ADC_LSB(ADC_LSB)
  ) u_out (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg        (out_cfg),
    .prog       (prog),
    .in_valid   (f_in_valid[N_FC]),
    .in_ready   (f_in_ready[N_FC]),
    .in_data    (f_in_data[N_FC]),
    .score_valid(score_valid),
    .score_ready(score_ready),
    .score_idx  (score_idx),
    .score      (score),
    .score_last (score_last)
  );

endmodule

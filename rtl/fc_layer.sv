// fc_layer: one binary FC layer.
//
// fc_layer_mem collects the input vector (n_words words of word_bits bits)
// and drives the branches of F_MAX flash_node instances directly. When the
// vector is complete the nodes fire, all in one cycle (cfg.part = 0) or one
// per cycle over n_nodes cycles (cfg.part = 1, layer partitioning). The next
// cycle the output word (bit f = node f, nodes >= n_nodes read 0) is offered;
// when it is taken LAYER MEM is cleared for the next input vector. A disabled
// layer sinks its input and produces nothing. Weights and thresholds are
// written through the prog bus (layer number LAYER_ID). The node wiring and
// layer partitioning follow the design description; the controller is a
// choice of this implementation.
module fc_layer
  import qnn_pkg::*;
#(
  parameter int LAYER_ID = 6,
  parameter int N_MAX    = 9216,
  parameter int WORD_W   = 4096,
  parameter int F_MAX    = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fc_cfg_t           cfg,
  input  prog_t             prog,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [F_MAX-1:0]  out_data
);

  typedef enum logic [1:0] {S_IDLE, S_FIRE, S_OUT} state_e;
  state_e state;

  logic [N_MAX-1:0] mem;
  logic             full, mem_ready, prog_hit;
  logic [F_MAX-1:0] fire, node_bit;
  logic [12:0]      cnt;

  fc_layer_mem #(.N_MAX(N_MAX), .WORD_W(WORD_W)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_words(cfg.n_words),
    .cfg_bits (cfg.word_bits),
    .in_valid (in_valid && cfg.en),
    .in_ready (mem_ready),
    .in_data  (in_data),
    .clear    (out_valid && out_ready),
    .mem      (mem),
    .full     (full)
  );
  assign in_ready = cfg.en ? mem_ready : 1'b1;

  assign prog_hit = (int'(prog.layer) == LAYER_ID);

  for (genvar f = 0; f < F_MAX; f++) begin : g_node
    flash_node #(.N_IN(N_MAX), .IN_BITS(1)) u_node (
      .clk       (clk),
      .prog_we   (prog.w_we && prog_hit && int'(prog.node) == f),
      .thr_we    (prog.t_we && prog_hit && int'(prog.node) == f),
      .prog_chunk(prog.chunk),
      .prog_data (prog.wdata),
      .thr       (prog.tdata),
      .fire      (fire[f]),
      .x         (mem),
      .out_bit   (node_bit[f]),
      .diff      ()
    );
  end

  always_comb begin
    fire = '0;
    if (state == S_FIRE)
      for (int f = 0; f < F_MAX; f++)
        fire[f] = cfg.part ? (f == int'(cnt)) : (f < int'(cfg.n_nodes));
  end

  always_comb begin
    for (int f = 0; f < F_MAX; f++) out_data[f] = node_bit[f] && (f < int'(cfg.n_nodes));
  end

  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      case (state)
        S_IDLE: if (full && cfg.en) begin
          cnt   <= '0;
          state <= S_FIRE;
        end
        S_FIRE: begin
          if (!cfg.part || cnt == cfg.n_nodes - 1'b1) state <= S_OUT;
          else cnt <= cnt + 1'b1;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cfg.part |-> $onehot0(fire));

endmodule

// fc_out_layer: the final FC layer, whose nodes produce 8-bit scores.
//
// Like fc_layer, LAYER MEM (fc_layer_mem) drives F_MAX flash_node instances,
// but each node's differential current goes to its own 8-bit SAR ADC
// (sar_adc) instead of only the comparator. When the input vector is complete
// the nodes fire (all at once, or one per cycle with cfg.part = 1); the cycle
// after the last fire every ADC samples its node and converts in parallel.
// The scores are then sent out one per transfer, node 0 first:
// score_idx = node number, score = ADC code - 128 (signed), score_last on the
// last node. After the last score LAYER MEM is cleared. The ADC per node
// follows the design description; converting in parallel and streaming the
// scores out are choices of this implementation.
module fc_out_layer
  import qnn_pkg::*;
#(
  parameter int LAYER_ID = 8,
  parameter int N_MAX    = 4096,
  parameter int WORD_W   = 4096,
  parameter int F_MAX    = 1000,
  parameter int ADC_LSB  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fc_cfg_t           cfg,
  input  prog_t             prog,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_data,
  output logic              score_valid,
  input  logic              score_ready,
  output logic [12:0]       score_idx,
  output logic signed [7:0] score,
  output logic              score_last
);

  typedef enum logic [2:0] {S_IDLE, S_FIRE, S_START, S_CONV, S_OUT} state_e;
  state_e state;

  logic [N_MAX-1:0] mem;
  logic             full, mem_ready, prog_hit, adc_start, last;
  logic [F_MAX-1:0] fire, adc_done;
  logic [7:0]       code [F_MAX];
  int               diff [F_MAX];
  logic [12:0]      cnt;

  fc_layer_mem #(.N_MAX(N_MAX), .WORD_W(WORD_W)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_words(cfg.n_words),
    .cfg_bits (cfg.word_bits),
    .in_valid (in_valid && cfg.en),
    .in_ready (mem_ready),
    .in_data  (in_data),
    .clear    (score_valid && score_ready && last),
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
      .out_bit   (),
      .diff      (diff[f])
    );
    sar_adc #(.BITS(8), .LSB(ADC_LSB)) u_adc (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (adc_start),
      .analog_in(diff[f]),
      .done     (adc_done[f]),
      .code     (code[f])
    );
  end

  always_comb begin
    fire = '0;
    if (state == S_FIRE)
      for (int f = 0; f < F_MAX; f++)
        fire[f] = cfg.part ? (f == int'(cnt)) : (f < int'(cfg.n_nodes));
  end

  assign adc_start   = (state == S_START);
  assign last        = (cnt == cfg.n_nodes - 1'b1);
  assign score_valid = (state == S_OUT);
  assign score_idx   = cnt;
  assign score_last  = score_valid && last;

  always_comb begin
    score = '0;
    for (int f = 0; f < F_MAX; f++)
      if (f == int'(cnt)) score = $signed(code[f] ^ 8'h80);
  end

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
          if (!cfg.part || last) state <= S_START;
          else cnt <= cnt + 1'b1;
        end
        S_START: state <= S_CONV;
        S_CONV: if (adc_done[0]) begin
          cnt   <= '0;
          state <= S_OUT;
        end
        S_OUT: if (score_ready) begin
          if (last) state <= S_IDLE;
          else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cfg.part |-> $onehot0(fire));

endmodule

// tb_fc_out_layer: final FC layer with 40 branches, 5 nodes and ADC LSB 2.
// For random input vectors (2 words of 12 bits), weights and thresholds, each node's score must equal
// clamp(floor((sum(w*x) - T) / LSB), -128, 127), scores must come in node
// order with score_last on the last, in both firing modes.
module tb_fc_out_layer;
  import qnn_pkg::*;
  localparam int N = 40, WW = 16, F = 5, LSB = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in_valid, in_ready, score_valid, score_ready, score_last;
  logic [WW-1:0] in_data;
  logic [12:0] score_idx;
  logic signed [7:0] score;
  fc_cfg_t cfg;
  prog_t prog;
  int w [F][N];
  int thr [F];
  logic [WW-1:0] words [2];

  fc_out_layer #(.LAYER_ID(9), .N_MAX(N), .WORD_W(WW), .F_MAX(F), .ADC_LSB(LSB)) dut (.*);

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vec(int nn, bit part);
    int n, got, sum, e;
    cfg = '{en: 1'b1, part: part, src: 6'd0, n_words: 16'd2, word_bits: 13'd12, n_nodes: 13'(nn)};
    for (int f = 0; f < F; f++) begin
      for (int i = 0; i < N; i++) w[f][i] = (i < 24) ? int'($urandom_range(8)) - 4 : 0;
      thr[f] = int'($urandom_range(60)) - 30;
      @(negedge clk);
      prog = '0; prog.w_we = 1; prog.layer = 9; prog.node = 13'(f);
      for (int i = 0; i < N; i++) prog.wdata[4*i +: 4] = 4'(w[f][i]);
      @(negedge clk);
      prog = '0; prog.t_we = 1; prog.layer = 9; prog.node = 13'(f); prog.tdata = thr[f];
    end
    @(negedge clk); prog = '0;
    for (int i = 0; i < 2; i++) words[i] = WW'($urandom);
    n = 0; got = 0;
    while (got < nn) begin
      @(negedge clk);
      in_valid = (n < 2) && ($urandom_range(1) == 1);
      in_data = (n < 2) ? words[n] : '0;
      score_ready = ($urandom_range(2) != 0);
      @(posedge clk);
      if (in_valid && in_ready) n++;
      if (score_valid && score_ready) begin
        sum = 0;
        for (int wd = 0; wd < 2; wd++) for (int bt = 0; bt < 12; bt++)
          sum += w[got][(1 - wd) * 12 + bt] * (words[wd][bt] ? 1 : -1);
        e = fdiv(sum - thr[got], LSB);
        if (e < -128) e = -128;
        if (e > 127) e = 127;
        checks += 3;
        if (int'(score) != e) begin failures++; $display("node %0d score %0d exp %0d", got, score, e); end
        if (int'(score_idx) != got) failures++;
        if (score_last != (got == nn - 1)) failures++;
        got++;
      end
    end
    @(negedge clk); in_valid = 0; score_ready = 0;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; score_ready = 0; in_data = '0; prog = '0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) vec(5, 1'b0);
    for (int t = 0; t < 8; t++) vec(4, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fc_layer: an FC layer with 40 branches and 6 nodes. Input vectors of
// 4 words x 10 bits with random weights and thresholds, first with all nodes
// firing at once, then with layer partitioning over 5 nodes. Each output word
// is compared with sum(w*x) > T computed here, and the fire cycles are counted
// (1 or n_nodes per vector).
module tb_fc_layer;
  import qnn_pkg::*;
  localparam int N = 40, WW = 16, F = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [WW-1:0] in_data;
  logic [F-1:0] out_data;
  fc_cfg_t cfg;
  prog_t prog;
  int w [F][N];
  int thr [F];
  logic [WW-1:0] words [4];
  int fire_cycles = 0;

  fc_layer #(.LAYER_ID(7), .N_MAX(N), .WORD_W(WW), .F_MAX(F)) dut (.*);

  always @(posedge clk) if (rst_n && dut.fire != '0) fire_cycles++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vec(int nn, bit part);
    int n, sum, fc0, b;
    logic [F-1:0] e;
    cfg = '{en: 1'b1, part: part, src: 6'd0, n_words: 16'd4, word_bits: 13'd10, n_nodes: 13'(nn)};
    for (int f = 0; f < F; f++) begin
      for (int i = 0; i < N; i++) w[f][i] = int'($urandom_range(8)) - 4;
      thr[f] = int'($urandom_range(20)) - 10;
      @(negedge clk);
      prog = '0; prog.w_we = 1; prog.layer = 7; prog.node = 13'(f);
      for (int i = 0; i < N; i++) prog.wdata[4*i +: 4] = 4'(w[f][i]);
      @(negedge clk);
      prog = '0; prog.t_we = 1; prog.layer = 7; prog.node = 13'(f); prog.tdata = thr[f];
    end
    @(negedge clk); prog = '0;
    for (int i = 0; i < 4; i++) words[i] = WW'($urandom);
    n = 0; fc0 = fire_cycles;
    while (1) begin
      @(negedge clk);
      in_valid = (n < 4) && ($urandom_range(1) == 1);
      in_data = (n < 4) ? words[n] : '0;
      out_ready = ($urandom_range(2) != 0);
      @(posedge clk);
      if (in_valid && in_ready) n++;
      if (out_valid && out_ready) break;
    end
    e = '0;
    for (int f = 0; f < nn; f++) begin
      sum = 0;
      for (int wd = 0; wd < 4; wd++) for (int bt = 0; bt < 10; bt++) begin
        b = (3 - wd) * 10 + bt;
        sum += w[f][b] * (words[wd][bt] ? 1 : -1);
      end
      e[f] = sum > thr[f];
    end
    checks += 2;
    if (out_data != e) begin failures++; $display("got %b exp %b", out_data, e); end
    if (fire_cycles - fc0 != (part ? nn : 1)) failures++;
    @(negedge clk); in_valid = 0; out_ready = 0;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; in_data = '0; prog = '0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) vec(6, 1'b0);
    for (int t = 0; t < 10; t++) vec(5, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

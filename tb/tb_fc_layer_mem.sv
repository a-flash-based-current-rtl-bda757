// tb_fc_layer_mem: fills a 40-bit LAYER MEM with 5 words of 7 bits, then
// (after clear) with 4 words of 10 bits, random data including junk above the
// useful bits. Every branch must hold the bit the word order predicts, full
// must rise after the last word and input must be refused until clear.
module tb_fc_layer_mem;
  localparam int N = 40, WW = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, in_valid, in_ready, clear, full;
  logic [WW-1:0] in_data;
  logic [N-1:0] mem;
  logic [15:0] cfg_words;
  logic [12:0] cfg_bits;
  logic [WW-1:0] words [8];

  fc_layer_mem #(.N_MAX(N), .WORD_W(WW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nw, int nb);
    int n;
    cfg_words = 16'(nw); cfg_bits = 13'(nb);
    for (int i = 0; i < nw; i++) words[i] = WW'($urandom);
    n = 0;
    while (n < nw) begin
      @(negedge clk);
      in_valid = ($urandom_range(1) == 1);
      in_data = words[n];
      @(posedge clk);
      if (in_valid && in_ready) n++;
    end
    @(negedge clk); in_valid = 1; in_data = '1;
    checks++;
    if (!full || in_ready) failures++;
    @(negedge clk); in_valid = 0;
    for (int w = 0; w < nw; w++)
      for (int b = 0; b < nb; b++) begin
        checks++;
        if (mem[(nw - 1 - w) * nb + b] != words[w][b]) failures++;
      end
    clear = 1;
    @(negedge clk); clear = 0;
    checks++;
    if (full) failures++;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; clear = 0; in_data = '0; cfg_words = 1; cfg_bits = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 7);
    run(4, 10);
    run(1, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

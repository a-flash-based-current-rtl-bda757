// fc_layer_mem: LAYER MEM of an FC layer.
//
// A shift register of N_MAX bits whose bits are wired straight to the node
// input branches (branch i sees bit i). Each accepted word shifts the memory
// up by cfg_bits and fills the freed low bits with the word's low cfg_bits
// bits, so bit b of word number n (counted from 0) ends at branch
// (cfg_words-1-n)*cfg_bits + b once cfg_words words have arrived. full is
// then high and input is refused until clear. Feature maps from CONV or
// MAXPOOL layers arrive one pixel (all channels) per word, FC outputs as one
// word. The shift register and the direct wiring follow the design
// description; the word format and the handshake are choices of this
// implementation.
module fc_layer_mem #(
  parameter int N_MAX  = 9216,
  parameter int WORD_W = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       cfg_words,
  input  logic [12:0]       cfg_bits,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_data,
  input  logic              clear,
  output logic [N_MAX-1:0]  mem,
  output logic              full
);

  logic [15:0]      count;
  logic [N_MAX-1:0] word_ext;

  assign full     = (count == cfg_words);
  assign in_ready = !full;

  always_comb begin
    word_ext = '0;
    for (int b = 0; b < WORD_W && b < N_MAX; b++)
      if (b < int'(cfg_bits)) word_ext[b] = in_data[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      mem   <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (in_valid && in_ready) begin
      mem   <= (mem << cfg_bits) | word_ext;
      count <= count + 1'b1;
    end
  end

endmodule

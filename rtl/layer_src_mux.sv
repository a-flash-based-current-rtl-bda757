// layer_src_mux: input multiplexer in front of a layer's LAYER MEM.
//
// Selects one of N_SRC valid/ready streams of width W. The selected source's
// valid and data pass to the output and the layer's ready returns only to
// that source; the other sources see ready = 0. Purely combinational.
// CONV layers after the first use a 2:1 instance (previous MAXPOOL or previous
// CONV layer), FC layers a 64:1 instance (any preceding layer), as in the
// design description. Out-of-range selections give an idle output.
module layer_src_mux #(
  parameter int N_SRC = 64,
  parameter int W     = 4096
) (
  input  logic [$clog2(N_SRC)-1:0] sel,
  input  logic [N_SRC-1:0]         src_valid,
  output logic [N_SRC-1:0]         src_ready,
  input  logic [W-1:0]             src_data [N_SRC],
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [W-1:0]             out_data
);

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    src_ready = '0;
    for (int s = 0; s < N_SRC; s++) begin
      if (int'(sel) == s) begin
        out_valid    = src_valid[s];
        out_data     = src_data[s];
        src_ready[s] = out_ready;
      end
    end
  end

endmodule

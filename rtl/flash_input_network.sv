// flash_input_network: behavioural model of a node's input network (IN).
//
// KIND: behavioural model of an analog flash/current-mode circuit.
//
// The IN has a left half (LIN) and a right half (RIN) with one branch per node
// input. A positive weight is programmed into the LIN branch, a negative one
// into the RIN branch, and the other branch of the pair is left off. The flash
// threshold voltage sets the branch current to |w_i| unit currents. Input x_i
// (and its complement) steers that current: a LIN branch sends it to I_IN+ when
// x_i = 1 and to I_IN- when x_i = 0; a RIN branch does the opposite. Kirchhoff
// summation at the two nodes gives I_IN+ - I_IN- = sum(w_i * x_i) with x_i in
// {-1,+1}. Unused branches are programmed with zero weight.
//
// Model: the flash cells are an array written through a programming port,
// PROG_CHUNK weights per beat. Currents are integers in unit currents. The
// currents are evaluated only in the clock cycle in which the node fires
// (eval) and are held afterwards, as the comparator latches its decision at the
// end of that cycle. The clocked evaluation and the programming port are
// choices of this model.
module flash_input_network
  import qnn_pkg::*;
#(
  parameter int N_IN = 9216
) (
  input  logic                    clk,
  input  logic                    prog_we,     // write one chunk of weights
  input  logic [13:0]             prog_chunk,
  input  logic [PROG_CHUNK*4-1:0] prog_data,
  input  logic                    eval,        // node fires this cycle
  input  logic [N_IN-1:0]         x,           // 1 = +1, 0 = -1
  output int                      i_pos,       // current into I_IN+
  output int                      i_neg        // current into I_IN-
);

  localparam int N_CHUNKS = (N_IN + PROG_CHUNK - 1) / PROG_CHUNK;
  localparam int CA_W     = (N_CHUNKS > 1) ? $clog2(N_CHUNKS) : 1;

  // Flash cells, one LIN/RIN pair per branch, grouped as programmed:
  // branch i is weight i % PROG_CHUNK of chunk i / PROG_CHUNK.
  logic [PROG_CHUNK*4-1:0] cells [N_CHUNKS];

  always_ff @(posedge clk) begin
    if (prog_we && int'(prog_chunk) < N_CHUNKS) cells[CA_W'(prog_chunk)] <= prog_data;
  end

  always_ff @(posedge clk) begin
    if (eval) begin
      int p, n, m;
      weight_t w;
      p = 0;
      n = 0;
      for (int i = 0; i < N_IN; i++) begin
        w = weight_t'(cells[i / PROG_CHUNK][4 * (i % PROG_CHUNK) +: 4]);
        m = (w < 0) ? -int'(w) : int'(w);
        // LIN branch (w > 0): x = 1 -> I_IN+; RIN branch (w < 0): x = 0 -> I_IN+
        if ((w > 0) == x[i]) p += m;
        else                 n += m;
      end
      i_pos <= p;
      i_neg <= n;
    end
  end

endmodule

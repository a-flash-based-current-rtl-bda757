// flash_node: behavioural model of one current-mode QNN node.
//
// KIND: behavioural model of an analog flash/current-mode circuit.
//
// A node computes one output bit: 1 (+1) when sum(w_i * x_i) > T, else 0 (-1).
// It is built from
//   * IN_BITS input networks IN_0..IN_{IN_BITS-1} (flash_input_network). Binary
//     layers use one. The first CONV layer takes 8-bit pixels and uses eight,
//     one per input bit, all programmed with the same weights. Current mirrors
//     with binary-weighted ratios scale IN_j by 2^j. With bit j read as +1/-1,
//     an 8-bit pixel value v therefore enters the sum as 2*v - 255.
//   * the batch-normalization threshold blocks T+ and T-: flash transistors
//     that add a fixed current to one side. This model puts |T| on the I_IN-
//     side for T >= 0 (T- block) and on the I_IN+ side for T < 0 (T+ block).
//   * the current mirrors that map I_IN+ and I_IN- onto V_CMP, and the
//     comparator against V_DD/2, modelled as (I+ total) > (I- total).
//
// Timing: the node fires in a cycle with fire = 1; out_bit and diff are valid
// from the next cycle and hold until the node fires again. diff is the
// differential current (I+ total) - (I- total), which the final layer's ADC
// converts. Which side each threshold block feeds, the programming port and
// the one-cycle timing are choices of this model.
module flash_node
  import qnn_pkg::*;
#(
  parameter int N_IN    = 9216,
  parameter int IN_BITS = 1
) (
  input  logic                    clk,
  input  logic                    prog_we,     // write weight chunk
  input  logic                    thr_we,      // write threshold
  input  logic [13:0]             prog_chunk,
  input  logic [PROG_CHUNK*4-1:0] prog_data,
  input  logic signed [31:0]      thr,
  input  logic                    fire,
  input  logic [IN_BITS*N_IN-1:0] x,           // bit plane j in [j*N_IN +: N_IN]
  output logic                    out_bit,
  output int                      diff
);

  int ip [IN_BITS];
  int in [IN_BITS];
  int t_plus, t_minus;          // threshold block currents

  for (genvar j = 0; j < IN_BITS; j++) begin : g_in
    flash_input_network #(.N_IN(N_IN)) u_in (
      .clk       (clk),
      .prog_we   (prog_we),
      .prog_chunk(prog_chunk),
      .prog_data (prog_data),
      .eval      (fire),
      .x         (x[j*N_IN +: N_IN]),
      .i_pos     (ip[j]),
      .i_neg     (in[j])
    );
  end

  always_ff @(posedge clk) begin
    if (thr_we) begin
      t_plus  <= (thr < 0) ? -thr : 0;
      t_minus <= (thr < 0) ? 0 : thr;
    end
  end

  // Binary-weighted current mirrors and the comparator
  int sum_pos, sum_neg;
  always_comb begin
    sum_pos = t_plus;
    sum_neg = t_minus;
    for (int j = 0; j < IN_BITS; j++) begin
      sum_pos += ip[j] <<< j;
      sum_neg += in[j] <<< j;
    end
  end

  assign out_bit = sum_pos > sum_neg;
  assign diff    = sum_pos - sum_neg;

endmodule

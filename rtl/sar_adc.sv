// sar_adc: behavioural model of the 8-bit SAR ADC of a final-layer FC node.
//
// KIND: behavioural model of a mixed-signal circuit (sample-and-hold, DAC and
// comparator are analog); the successive approximation register is the
// synthesizable sar_logic.
//
// The input is the node's differential current (I+ total) - (I- total) in unit
// currents. On start the sample-and-hold captures it. The DAC maps a code c
// to (c - 2^(BITS-1)) * LSB unit currents and the comparator tells sar_logic
// whether the held value is at or above that level. The result is offset
// binary: code = clamp(floor(held / LSB) + 2^(BITS-1), 0, 2^BITS - 1), so
// code - 2^(BITS-1) is the signed score. done pulses BITS+1 cycles after the
// start cycle (sample, BITS comparisons).
// The ADC structure follows the design description; the full-scale range (LSB)
// and the offset-binary code are choices of this model.
module sar_adc #(
  parameter int BITS = 8,
  parameter int LSB  = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  int              analog_in,
  output logic            done,
  output logic [BITS-1:0] code
);

  int          held;        // sample-and-hold
  logic [BITS-1:0] trial;
  logic        cmp, busy;
  int          dac_level;

  always_ff @(posedge clk) begin
    if (start) held <= analog_in;
  end

  assign dac_level = (int'({1'b0, trial}) - (1 << (BITS - 1))) * LSB;
  assign cmp       = held >= dac_level;

  sar_logic #(.BITS(BITS)) u_sar (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .cmp   (cmp),
    .trial (trial),
    .busy  (busy),
    .done  (done),
    .result(code)
  );

endmodule

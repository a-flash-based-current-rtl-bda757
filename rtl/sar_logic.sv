// sar_logic: successive approximation register of the output SAR ADC.
//
// On start the register is loaded with the mid code (MSB set). In each of the
// next BITS cycles the comparator result for the current trial code decides
// one bit, MSB first: the bit stays set when the held input is at or above the
// DAC level of the trial code, otherwise it is cleared, and the next lower bit
// is set for the following trial. The edge that takes the last decision also
// updates result and raises done for one cycle, so done is high BITS+1 cycles
// after the cycle in which start is high.
// The SAR ADC itself follows the design description; its timing, the
// start/done handshake and the reset are choices of this implementation.
module sar_logic #(
  parameter int BITS = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            cmp,      // 1: held input >= DAC(trial)
  output logic [BITS-1:0] trial,    // code driven to the DAC
  output logic            busy,
  output logic            done,
  output logic [BITS-1:0] result
);

  logic [$clog2(BITS)-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trial  <= '0;
      idx    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        trial           <= '0;
        trial[BITS-1]   <= 1'b1;
        idx             <= $clog2(BITS)'(BITS - 1);
        busy            <= 1'b1;
      end else if (busy) begin
        if (!cmp) trial[idx] <= 1'b0;
        if (idx != 0) begin
          trial[idx - 1] <= 1'b1;
          idx            <= idx - 1'b1;
        end else begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= cmp ? trial : (trial & ~(BITS'(1) << idx));
        end
      end
    end
  end

endmodule

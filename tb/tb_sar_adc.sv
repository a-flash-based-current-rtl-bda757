// tb_sar_adc: random input currents, including ones beyond full scale; the
// code must be clamp(floor(in / LSB) + 128, 0, 255), the input may change
// after the sample is taken, and done must be high 9 cycles after start.
module tb_sar_adc;
  localparam int LSB = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, start, done;
  logic [7:0] code;
  int analog_in;

  sar_adc #(.BITS(8), .LSB(LSB)) dut (.*);

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, e, cyc;
    rst_n = 0; start = 0; analog_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      a = int'($urandom_range(5000)) - 2500;
      if (t == 0) a = 0;
      if (t == 1) a = -1;
      analog_in = a;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      analog_in = 0;                 // held by the S/H
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      e = fdiv(a, LSB) + 128;
      if (e < 0) e = 0;
      if (e > 255) e = 255;
      checks += 2;
      if (int'(code) != e) begin failures++; $display("in %0d code %0d exp %0d", a, code, e); end
      if (cyc != 9) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

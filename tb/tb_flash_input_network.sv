// tb_flash_input_network: programs random 9-valued weights into a 100-branch
// input network, applies random inputs and checks I_IN+ and I_IN- against a
// sum computed here, and that the currents hold while the node does not fire.
module tb_flash_input_network;
  import qnn_pkg::*;
  localparam int N = 100;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic prog_we, eval;
  logic [13:0] prog_chunk;
  logic [PROG_CHUNK*4-1:0] prog_data;
  logic [N-1:0] x;
  int i_pos, i_neg;
  int w [N];

  flash_input_network #(.N_IN(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ep, en;
    prog_we = 0; eval = 0; x = '0; prog_chunk = '0; prog_data = '0;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < N; i++) w[i] = $urandom_range(8) - 4;
      for (int c = 0; c < (N + PROG_CHUNK - 1) / PROG_CHUNK; c++) begin
        @(negedge clk);
        prog_we = 1; prog_chunk = 14'(c);
        for (int k = 0; k < PROG_CHUNK; k++)
          prog_data[4*k +: 4] = (c*PROG_CHUNK + k < N) ? 4'(w[c*PROG_CHUNK + k]) : 4'd0;
      end
      @(negedge clk); prog_we = 0;
      for (int v = 0; v < 5; v++) begin
        for (int i = 0; i < N; i++) x[i] = 1'($urandom);
        eval = 1;
        @(negedge clk); eval = 0;
        ep = 0; en = 0;
        for (int i = 0; i < N; i++) begin
          if (w[i] * (x[i] ? 1 : -1) > 0) ep += (w[i] < 0 ? -w[i] : w[i]);
          else en += (w[i] < 0 ? -w[i] : w[i]);
        end
        checks++;
        if (i_pos != ep || i_neg != en) begin
          failures++;
          $display("mismatch: pos %0d/%0d neg %0d/%0d", i_pos, ep, i_neg, en);
        end
        checks++;
        if (i_pos - i_neg != ep - en) failures++;
        // inputs change without a fire: currents must hold
        x = ~x;
        @(negedge clk);
        checks++;
        if (i_pos != ep || i_neg != en) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

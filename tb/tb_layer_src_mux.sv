// tb_layer_src_mux: random selections and source states on an 8:1 mux;
// valid, data and the per-source ready must follow the selected source only.
module tb_layer_src_mux;
  localparam int N = 8, W = 16;
  int checks = 0, failures = 0;
  logic [2:0] sel;
  logic [N-1:0] src_valid, src_ready;
  logic [W-1:0] src_data [N];
  logic out_valid, out_ready;
  logic [W-1:0] out_data;

  layer_src_mux #(.N_SRC(N), .W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      sel = 3'($urandom);
      src_valid = N'($urandom);
      for (int s = 0; s < N; s++) src_data[s] = W'($urandom);
      out_ready = 1'($urandom);
      #1;
      checks += 3;
      if (out_valid != src_valid[sel]) failures++;
      if (out_data != src_data[sel]) failures++;
      if (src_ready != (out_ready ? (N'(1) << sel) : '0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

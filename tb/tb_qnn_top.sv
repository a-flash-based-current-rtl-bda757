// tb_qnn_top: end-to-end test of the whole chip at reduced sizes (2 CONV
// stages, 1 binary FC layer, final layer of 5 nodes).
//
// Configuration A (two images back to back): CONV0 3x3 pad 1 with layer
// partitioning -> MAXPOOL0 2x2/2 -> CONV1 3x3 (reads MAXPOOL0) -> MAXPOOL1 off
// -> FC0 (reads CONV1, partitioned) -> final layer (reads FC0).
// Configuration B (one image, loaded across a reset): CONV0 2x2 stride 2 with asymmetric padding ->
// MAXPOOL0 off, so CONV1 reads CONV0 directly -> CONV1 3x3 pad 1 partitioned
// -> MAXPOOL1 2x2/2, read by both FC0 and the final layer.
// Weights, thresholds and pixels come from qnn_ref_pkg hashes; the chip is
// programmed through its prog port, the image is streamed with random gaps
// and the scores are taken with random back-pressure. Every score is checked
// against the reference network. Each mechanism (input stall, padding, layer
// partitioning, parallel firing, MAXPOOL bypass, FC multiplexer choice, a
// stream read by two layers, ADC conversion, output back-pressure) must be
// seen at least once.
module tb_qnn_top;
  import qnn_pkg::*;
  import qnn_ref_pkg::*;

  localparam int N_CONV = 2, IMG_C = 3, N_FC = 1;
  localparam int CONV_W [N_CONV] = '{10, 8};
  localparam int CONV_K [N_CONV] = '{3, 3};
  localparam int CONV_F [N_CONV] = '{4, 6};
  localparam int POOL_W [N_CONV] = '{8, 8};
  localparam int FC_N [N_FC] = '{32};
  localparam int FC_F [N_FC] = '{8};
  localparam int OUT_N = 16, OUT_F = 5, LSB = 2, WORD_W = 8;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, img_valid, img_ready, score_valid, score_ready, score_last;
  logic [IMG_C*8-1:0] img_data;
  logic [12:0] score_idx;
  logic signed [7:0] score;
  conv_cfg_t conv_cfg [N_CONV];
  pool_cfg_t pool_cfg [N_CONV];
  fc_cfg_t fc_cfg [N_FC];
  fc_cfg_t out_cfg;
  prog_t prog;

  qnn_top #(
    .N_CONV(N_CONV), .IMG_C(IMG_C), .CONV_W(CONV_W), .CONV_K(CONV_K), .CONV_F(CONV_F),
    .POOL_W(POOL_W), .N_FC(N_FC), .FC_N(FC_N), .FC_F(FC_F), .OUT_N(OUT_N), .OUT_F(OUT_F),
    .ADC_LSB(LSB), .WORD_W(WORD_W)
  ) dut (.*);

  // Mechanism counters
  int n_img_stall = 0, n_pad = 0, n_part_fire = 0, n_par_fire = 0, n_bypass = 0;
  int n_mux_pick = 0, n_bcast = 0, n_adc = 0, n_out_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (img_valid && !img_ready) n_img_stall++;
    if (dut.g_stage[0].u_conv.u_pad.out_valid && dut.g_stage[0].u_conv.u_pad.out_ready &&
        !dut.g_stage[0].u_conv.u_pad.interior) n_pad++;
    for (int s = 0; s < N_CONV; s++) begin
      if (s == 0 && $countones(dut.g_stage[0].u_conv.fire) == 1 && conv_cfg[0].part) n_part_fire++;
      if (s == 1 && $countones(dut.g_stage[1].u_conv.fire) == 1 && conv_cfg[1].part) n_part_fire++;
    end
    if ($countones(dut.g_stage[1].u_conv.fire) > 1) n_par_fire++;
    if (dut.g_stage[1].c_in_valid && dut.c_in_ready[1] && !dut.c_sel_pool[1]) n_bypass++;
    if (dut.f_in_valid[N_FC] && dut.f_in_ready[N_FC] && out_cfg.src == 6'd3) n_mux_pick++;
    if (dut.s_valid[3] && dut.s_ready[3] && fc_cfg[0].en && fc_cfg[0].src == 6'd3 && out_cfg.src == 6'd3) n_bcast++;
    if (dut.u_out.adc_start) n_adc++;
    if (score_valid && !score_ready) n_out_stall++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cmax(int s);
    return (s == 0) ? IMG_C : CONV_F[s - 1];
  endfunction

  task automatic beat_w(int l, int f, int c, logic [PROG_CHUNK*4-1:0] d);
    @(negedge clk);
    prog = '0; prog.w_we = 1; prog.layer = 5'(l); prog.node = 13'(f); prog.chunk = 14'(c); prog.wdata = d;
  endtask

  task automatic beat_t(int l, int f, int t);
    @(negedge clk);
    prog = '0; prog.t_we = 1; prog.layer = 5'(l); prog.node = 13'(f); prog.tdata = t;
  endtask

  task automatic program_all();
    logic [PROG_CHUNK*4-1:0] d;
    int n, cin, nin;
    for (int s = 0; s < N_CONV; s++) if (conv_cfg[s].en) begin
      n = CONV_K[s] * CONV_K[s] * cmax(s);
      cin = (s == 0) ? IMG_C : int'(conv_cfg[s-1].n_filt);
      for (int f = 0; f < int'(conv_cfg[s].n_filt); f++) begin
        for (int c = 0; c * PROG_CHUNK < n; c++) begin
          for (int k = 0; k < PROG_CHUNK; k++)
            d[4*k +: 4] = (c*PROG_CHUNK + k < n) ?
              4'(conv_w(s, f, c*PROG_CHUNK + k, CONV_K[s], cmax(s), int'(conv_cfg[s].k), cin)) : 4'd0;
          beat_w(s, f, c, d);
        end
        beat_t(s, f, ht(s, f, thr_range(s == 0)));
      end
    end
    for (int l = 0; l <= N_FC; l++) begin
      fc_cfg_t fc;
      int nmax;
      fc = (l == N_FC) ? out_cfg : fc_cfg[l];
      nmax = (l == N_FC) ? OUT_N : FC_N[l];
      if (!fc.en) continue;
      nin = int'(fc.n_words) * int'(fc.word_bits);
      for (int f = 0; f < int'(fc.n_nodes); f++) begin
        for (int c = 0; c * PROG_CHUNK < nmax; c++) begin
          for (int k = 0; k < PROG_CHUNK; k++)
            d[4*k +: 4] = (c*PROG_CHUNK + k < nin) ? 4'(hw(N_CONV + l, f, c*PROG_CHUNK + k)) : 4'd0;
          beat_w(N_CONV + l, f, c, d);
        end
        beat_t(N_CONV + l, f, ht(N_CONV + l, f, 10));
      end
    end
    @(negedge clk); prog = '0;
  endtask

  // Expected scores of image img under the current configuration
  task automatic reference(int img, int ih, int iw, output int exp_s [], output int n_exp);
    fmap src [2*N_CONV + N_FC];
    fmap m, in, x, dd;
    fc_cfg_t fc;
    m = new(ih, iw, IMG_C);
    for (int y = 0; y < ih; y++) for (int xx = 0; xx < iw; xx++) for (int c = 0; c < IMG_C; c++)
      m.set(y, xx, c, hp(img, y, xx, c));
    for (int s = 0; s < N_CONV; s++) if (conv_cfg[s].en) begin
      in = (s == 0) ? m : (pool_cfg[s-1].en ? src[2*s-1] : src[2*s-2]);
      src[2*s] = ref_conv(in, s, CONV_K[s], cmax(s), s == 0, int'(conv_cfg[s].k), int'(conv_cfg[s].stride),
                          int'(conv_cfg[s].pad_lo), int'(conv_cfg[s].pad_hi), int'(conv_cfg[s].n_filt));
      if (pool_cfg[s].en) src[2*s+1] = ref_pool(src[2*s], int'(pool_cfg[s].k), int'(pool_cfg[s].stride));
    end
    for (int l = 0; l <= N_FC; l++) begin
      fc = (l == N_FC) ? out_cfg : fc_cfg[l];
      if (!fc.en) continue;
      x = flatten(src[fc.src]);
      dd = ref_fc_diff(x, N_CONV + l, int'(fc.n_nodes));
      if (l < N_FC) begin
        src[2*N_CONV + l] = new(1, 1, int'(fc.n_nodes));
        for (int f = 0; f < int'(fc.n_nodes); f++) src[2*N_CONV + l].d[f] = (dd.d[f] > 0) ? 1 : 0;
      end else begin
        n_exp = int'(fc.n_nodes);
        exp_s = new[n_exp];
        for (int f = 0; f < n_exp; f++) begin
          exp_s[f] = fdiv(dd.d[f], LSB);
          if (exp_s[f] < -128) exp_s[f] = -128;
          if (exp_s[f] > 127) exp_s[f] = 127;
        end
      end
    end
  endtask

  // Streams n_img images and checks their scores
  task automatic run_images(int first_img, int n_img, int ih, int iw);
    int exp_s [4][];
    int n_exp [4];
    int sent, got, img_in, img_out;
    for (int i = 0; i < n_img; i++) reference(first_img + i, ih, iw, exp_s[i], n_exp[i]);
    sent = 0; got = 0; img_in = 0; img_out = 0;
    fork
      begin
        while (img_in < n_img) begin
          @(negedge clk);
          img_valid = ($urandom_range(3) != 0);
          for (int c = 0; c < IMG_C; c++)
            img_data[8*c +: 8] = 8'(hp(first_img + img_in, sent / iw, sent % iw, c));
          @(posedge clk);
          if (img_valid && img_ready) begin
            sent++;
            if (sent == ih * iw) begin sent = 0; img_in++; end
          end
        end
        @(negedge clk); img_valid = 0;
      end
      begin
        while (img_out < n_img) begin
          @(negedge clk);
          score_ready = ($urandom_range(2) != 0);
          @(posedge clk);
          if (score_valid && score_ready) begin
            checks += 2;
            if (int'(score) != exp_s[img_out][got]) begin
              failures++;
              $display("image %0d node %0d score %0d expected %0d", first_img + img_out, got, score, exp_s[img_out][got]);
            end
            if (score_last != (got == n_exp[img_out] - 1)) failures++;
            got++;
            if (got == n_exp[img_out]) begin got = 0; img_out++; end
          end
        end
        @(negedge clk); score_ready = 0;
      end
    join
  endtask

  initial begin
    rst_n = 0; img_valid = 0; img_data = '0; score_ready = 0; prog = '0;
    // Configuration A
    conv_cfg[0] = '{en: 1, part: 1, img_w: 8, img_h: 8, pad_lo: 1, pad_hi: 1, k: 3, stride: 1, n_filt: 4};
    pool_cfg[0] = '{en: 1, img_w: 8, img_h: 8, k: 2, stride: 2};
    conv_cfg[1] = '{en: 1, part: 0, img_w: 4, img_h: 4, pad_lo: 0, pad_hi: 0, k: 3, stride: 1, n_filt: 6};
    pool_cfg[1] = '{en: 0, img_w: 2, img_h: 2, k: 2, stride: 2};
    fc_cfg[0]   = '{en: 1, part: 1, src: 2, n_words: 4, word_bits: 6, n_nodes: 8};
    out_cfg     = '{en: 1, part: 0, src: 4, n_words: 1, word_bits: 8, n_nodes: 5};
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_all();
    run_images(0, 2, 8, 8);
    // Configuration B, applied across a reset (flash contents are kept)
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    conv_cfg[0] = '{en: 1, part: 0, img_w: 7, img_h: 7, pad_lo: 0, pad_hi: 1, k: 2, stride: 2, n_filt: 3};
    pool_cfg[0] = '{en: 0, img_w: 4, img_h: 4, k: 2, stride: 2};
    conv_cfg[1] = '{en: 1, part: 1, img_w: 4, img_h: 4, pad_lo: 1, pad_hi: 1, k: 3, stride: 1, n_filt: 4};
    pool_cfg[1] = '{en: 1, img_w: 4, img_h: 4, k: 2, stride: 2};
    fc_cfg[0]   = '{en: 1, part: 0, src: 3, n_words: 4, word_bits: 4, n_nodes: 8};
    out_cfg     = '{en: 1, part: 1, src: 3, n_words: 4, word_bits: 4, n_nodes: 4};
    program_all();
    run_images(2, 1, 7, 7);
    repeat (20) @(negedge clk);
    $display("mechanisms: img_stall=%0d pad=%0d part_fire=%0d par_fire=%0d bypass=%0d mux_pick=%0d bcast=%0d adc=%0d out_stall=%0d",
             n_img_stall, n_pad, n_part_fire, n_par_fire, n_bypass, n_mux_pick, n_bcast, n_adc, n_out_stall);
    checks += 9;
    if (n_img_stall == 0) failures++;
    if (n_pad == 0) failures++;
    if (n_part_fire == 0) failures++;
    if (n_par_fire == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_mux_pick == 0) failures++;
    if (n_bcast == 0) failures++;
    if (n_adc != 3) failures++;
    if (n_out_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_qnn_full: one Binary AlexNet inference on the chip at its default
// (full) size. The network follows the Larq Binary AlexNet geometry:
// 224x224x3 8-bit image; CONV 11x11/4 (64 filters, padding 3/4) -> MAXPOOL
// 3x3/2 -> CONV 5x5 (192, pad 2) -> MAXPOOL 3x3/2 -> CONV 3x3 (384, pad 1)
// -> CONV 3x3 (384) -> CONV 3x3 (256) -> MAXPOOL 3x3/2 -> FC 9216->4096 ->
// FC 4096->4096 -> FC 4096->1000 with 8-bit ADC scores. Every layer uses
// layer partitioning (one node fires per cycle). Weights, thresholds and the
// image come from qnn_ref_pkg hashes; all 1000 scores are compared with the
// reference network.
module tb_qnn_full;
  import qnn_pkg::*;
  import qnn_ref_pkg::*;

  localparam int N_CONV = 6, IMG_C = 3, N_FC = 2;
  localparam int CONV_K [N_CONV] = '{11, 5, 3, 3, 3, 3};
  localparam int CONV_F [N_CONV] = '{128, 192, 384, 384, 512, 512};
  localparam int FC_N [N_FC] = '{9216, 4096};
  localparam int OUT_N = 4096, LSB = 16;

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

  qnn_top dut (.*);

  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (4000000) @(posedge clk);
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
    int t0;
    rst_n = 0; img_valid = 0; img_data = '0; score_ready = 0; prog = '0;
    conv_cfg[0] = '{en: 1, part: 1, img_w: 224, img_h: 224, pad_lo: 3, pad_hi: 4, k: 11, stride: 4, n_filt: 64};
    pool_cfg[0] = '{en: 1, img_w: 56, img_h: 56, k: 3, stride: 2};
    conv_cfg[1] = '{en: 1, part: 1, img_w: 27, img_h: 27, pad_lo: 2, pad_hi: 2, k: 5, stride: 1, n_filt: 192};
    pool_cfg[1] = '{en: 1, img_w: 27, img_h: 27, k: 3, stride: 2};
    conv_cfg[2] = '{en: 1, part: 1, img_w: 13, img_h: 13, pad_lo: 1, pad_hi: 1, k: 3, stride: 1, n_filt: 384};
    pool_cfg[2] = '{en: 0, img_w: 13, img_h: 13, k: 3, stride: 2};
    conv_cfg[3] = '{en: 1, part: 1, img_w: 13, img_h: 13, pad_lo: 1, pad_hi: 1, k: 3, stride: 1, n_filt: 384};
    pool_cfg[3] = '{en: 0, img_w: 13, img_h: 13, k: 3, stride: 2};
    conv_cfg[4] = '{en: 1, part: 1, img_w: 13, img_h: 13, pad_lo: 1, pad_hi: 1, k: 3, stride: 1, n_filt: 256};
    pool_cfg[4] = '{en: 1, img_w: 13, img_h: 13, k: 3, stride: 2};
    conv_cfg[5] = '{en: 0, part: 1, img_w: 6, img_h: 6, pad_lo: 1, pad_hi: 1, k: 3, stride: 1, n_filt: 512};
    pool_cfg[5] = '{en: 0, img_w: 6, img_h: 6, k: 2, stride: 2};
    fc_cfg[0]   = '{en: 1, part: 1, src: 9,  n_words: 36, word_bits: 256,  n_nodes: 4096};
    fc_cfg[1]   = '{en: 1, part: 1, src: 12, n_words: 1,  word_bits: 4096, n_nodes: 4096};
    out_cfg     = '{en: 1, part: 1, src: 13, n_words: 1,  word_bits: 4096, n_nodes: 1000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_all();
    $display("programmed after %0d cycles", cycles);
    t0 = cycles;
    run_images(0, 1, 224, 224);
    $display("inference took %0d cycles", cycles - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

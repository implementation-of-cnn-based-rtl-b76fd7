// tb_cnn_core: end-to-end test of the CNN processor at its full size.
//
// Loads random weights (all 617 words, small signed values) and three input
// images (random blobs of bright pixels on a dark background), runs the whole
// ten-step network on each and compares the class and its score with a
// reference model of the network written here from the layer shapes:
// same-padded 3x3 convolutions without bias, shift-by-7 requantisation with
// clamping to 0..255, 2x2 and global max pooling and a 16x11 dense layer whose
// raw sums are compared (lowest index wins a tie). The run time of each image
// is checked against the engines' cycle counts, and each of the ten steps,
// both engines and both buffer directions are counted as exercised.
`timescale 1ns/1ps
module tb_cnn_core;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic img_we, wld_we, start, busy, done;
  logic [FM_AW-1:0] img_addr;
  act_t img_data;
  logic [W_AW-1:0] wld_addr;
  logic [W_WORD-1:0] wld_data;
  logic [3:0] layer, class_idx;
  acc_t class_score;

  cnn_core dut (.*);

  logic [W_WORD-1:0] wm [W_DEPTH];
  int fa [FM_DEPTH];
  int fb [FM_DEPTH];

  function automatic int wgt(int addr, int lane);
    return int'($signed(wm[addr][lane * 8 +: 8]));
  endfunction

  function automatic int q(int s);
    int v = s >>> 7;
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // convolution from fa into fb, same padding, output groups of 8
  task automatic ref_conv(int k, int h, int w, int ci, int co, int wb, bit raw);
    for (int o = 0; o < co; o++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          int s = 0, pad = k / 2;
          for (int c = 0; c < ci; c++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy = y + ky - pad, ix = x + kx - pad;
                if (iy >= 0 && ix >= 0 && iy < h && ix < w)
                  s += fa[(c * h + iy) * w + ix] *
                       wgt(wb + ((o / 8) * ci + c) * k * k + ky * k + kx, o % 8);
              end
          fb[(o * h + y) * w + x] = raw ? s : q(s);
        end
  endtask

  task automatic ref_pool(int p, int h, int w, int ch);
    for (int c = 0; c < ch; c++)
      for (int oy = 0; oy < h / p; oy++)
        for (int ox = 0; ox < w / p; ox++) begin
          int m = 0;
          for (int py = 0; py < p; py++)
            for (int px = 0; px < p; px++)
              if (fa[(c * h + oy * p + py) * w + ox * p + px] > m)
                m = fa[(c * h + oy * p + py) * w + ox * p + px];
          fb[(c * (h / p) + oy) * (w / p) + ox] = m;
        end
  endtask

  task automatic swap();
    for (int i = 0; i < FM_DEPTH; i++) fa[i] = fb[i];
  endtask

  // network shapes: pool?, k, h, w, cin, cout, weight base
  int sh_pool [10], sh_k [10], sh_h [10], sh_w [10], sh_ci [10], sh_co [10], sh_wb [10];
  int n_steps;
  task automatic set_step(int l, int p, int k, int h, int w, int ci, int co, int wb);
    sh_pool[l] = p; sh_k[l] = k; sh_h[l] = h; sh_w[l] = w;
    sh_ci[l] = ci; sh_co[l] = co; sh_wb[l] = wb;
  endtask

  int seen_layer [NUM_LAYERS];
  int seen_conv, seen_pool, seen_ab, seen_ba, seen_partial_group;

  always @(posedge clk) if (rst_n && busy) begin
    seen_layer[layer]++;
    if (dut.conv_busy) seen_conv++;
    if (dut.pool_busy) seen_pool++;
    if (dut.u_buf_b.we) seen_ab++;
    if (dut.u_buf_a.we) seen_ba++;
    if (dut.u_conv.wr_en && dut.cfg.cout == 6'd11 && dut.u_conv.o_ch0 == 6'd8) seen_partial_group++;
  end

  localparam int EXPECT_CYC =
      (28*28*1*9 + 4 + 2) + (28*28*4*9 + 4 + 2) + (4*14*14*4 + 3) +
      (14*14*4*9 + 8 + 2) + (14*14*8*9 + 8 + 2) + (8*7*7*4 + 3) +
      (2*7*7*8*9 + 8 + 2) + (2*7*7*16*9 + 8 + 2) + (16*49 + 3) +
      (2*16 + 3 + 2) + 10 * 1 + 1;

  initial begin
    img_we = 0; wld_we = 0; start = 0; img_addr = 0; img_data = 0; wld_addr = 0; wld_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_step(0, 0, 3, 28, 28,  1,  4,   0);
    set_step(1, 0, 3, 28, 28,  4,  4,   9);
    set_step(2, 1, 2, 28, 28,  4,  4,   0);
    set_step(3, 0, 3, 14, 14,  4,  8,  45);
    set_step(4, 0, 3, 14, 14,  8,  8,  81);
    set_step(5, 1, 2, 14, 14,  8,  8,   0);
    set_step(6, 0, 3,  7,  7,  8, 16, 153);
    set_step(7, 0, 3,  7,  7, 16, 16, 297);
    set_step(8, 1, 7,  7,  7, 16, 16,   0);
    set_step(9, 0, 1,  1,  1, 16, 11, 585);
    n_steps = 10 - $urandom_range(0, 0);
    for (int a = 0; a < W_DEPTH; a++) begin
      for (int l = 0; l < 8; l++) wm[a][l*8 +: 8] = 8'($signed($urandom_range(0, 95)) - 8'sd48);
      wld_we = 1; wld_addr = W_AW'(a); wld_data = wm[a];
      @(negedge clk);
    end
    wld_we = 0;
    for (int t = 0; t < 4; t++) begin
      int cyc, bi, exp_cls, exp_score, cy, cx, d2;
      cy = $urandom_range(6, 21);
      cx = $urandom_range(6, 21);
      for (int i = 0; i < FM_DEPTH; i++) fa[i] = 0;
      for (int y = 0; y < 28; y++)
        for (int x = 0; x < 28; x++) begin
          d2 = (y - cy) * (y - cy) + (x - cx) * (x - cx);
          fa[y * 28 + x] = (d2 < 30 && $urandom_range(0, 3) != 0) ? $urandom_range(128, 255) : 0;
          img_we = 1; img_addr = FM_AW'(y * 28 + x); img_data = act_t'(fa[y * 28 + x]);
          @(negedge clk);
        end
      img_we = 0;
      // reference, driven from a runtime table so the loops stay loops
      for (int l = 0; l < n_steps; l++) begin
        if (sh_pool[l]) ref_pool(sh_k[l], sh_h[l], sh_w[l], sh_ci[l]);
        else ref_conv(sh_k[l], sh_h[l], sh_w[l], sh_ci[l], sh_co[l], sh_wb[l], l == n_steps - 1);
        if (l != n_steps - 1) swap();
      end
      bi = 0;
      for (int i = 1; i < 11; i++) if (fb[i] > fb[bi]) bi = i;
      exp_cls = bi; exp_score = fb[bi];
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (int'(class_idx) != exp_cls || class_score != exp_score) begin
        failures++;
        $display("FAIL image %0d: class %0d score %0d, expected %0d score %0d",
                 t, class_idx, class_score, exp_cls, exp_score);
      end else $display("image %0d: class %0d score %0d", t, class_idx, class_score);
      checks++;
      if (cyc != EXPECT_CYC) begin
        failures++;
        $display("FAIL image %0d took %0d cycles, expected %0d", t, cyc, EXPECT_CYC);
      end
    end
    for (int l = 0; l < NUM_LAYERS; l++) begin
      checks++;
      if (seen_layer[l] == 0) begin failures++; $display("FAIL step %0d never ran", l); end
    end
    checks += 5;
    if (seen_conv == 0 || seen_pool == 0 || seen_ab == 0 || seen_ba == 0 || seen_partial_group == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: conv %0d pool %0d A->B %0d B->A %0d partial group %0d",
               seen_conv, seen_pool, seen_ab, seen_ba, seen_partial_group);
    end
    $display("conv cycles %0d, pool cycles %0d, writes to B %0d, writes to A %0d, partial-group writes %0d",
             seen_conv, seen_pool, seen_ab, seen_ba, seen_partial_group);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

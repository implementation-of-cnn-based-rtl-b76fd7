// tb_digit_top: end-to-end test of the whole recogniser at its full size.
//
// A camera model sends 640x480 RGB565 frames byte by byte (three different
// pictures of dark pen strokes and a few specks on noisy light paper, in
// turn), a behavioural
// AXI memory stands in for the DDR3 frame memory, and the weights are loaded
// with random values. The test runs until the CNN has produced three results.
// For each result it works out independently which camera picture was read
// from the frame memory, runs a model of the pre-processing and of the
// network on that picture and compares the class and its score. It also
// counts, and requires at least once: frames stored in each bank, reads from
// each bank, a camera frame dropped to protect the bank being displayed, each
// of the ten network steps, zero-padding taps in the convolution engine,
// small specks of dirt rejected by the component labelling, and the
// recognised digit drawn on the LCD with the right number of lit pixels.
`timescale 1ns/1ps
module tb_digit_top;
  import cnn_pkg::*;
  localparam int W = 640, H = 480, NRES = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cam_vsync, cam_href;
  logic [7:0] cam_data;
  logic wld_we;
  logic [W_AW-1:0] wld_addr;
  logic [W_WORD-1:0] wld_data;
  logic [31:0] m_awaddr, m_araddr;
  logic [7:0] m_awlen, m_arlen, m_wstrb;
  logic [2:0] m_awsize, m_arsize;
  logic [1:0] m_awburst, m_arburst, m_bresp, m_rresp;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [63:0] m_wdata, m_rdata;
  logic lcd_hsync, lcd_vsync, lcd_de;
  logic [15:0] lcd_rgb;
  logic result_valid, cnn_busy, frame_ready, frame_dropped, wr_overflow, axi_error;
  logic [3:0] result_class;
  acc_t result_score;

  digit_top dut (.*);

  axi_mem_model #(.READY_PCT(90)) mem (
    .clk, .rst_n,
    .s_awaddr(m_awaddr), .s_awlen(m_awlen), .s_awvalid(m_awvalid), .s_awready(m_awready),
    .s_wdata(m_wdata), .s_wlast(m_wlast), .s_wvalid(m_wvalid), .s_wready(m_wready),
    .s_bresp(m_bresp), .s_bvalid(m_bvalid), .s_bready(m_bready),
    .s_araddr(m_araddr), .s_arlen(m_arlen), .s_arvalid(m_arvalid), .s_arready(m_arready),
    .s_rdata(m_rdata), .s_rresp(m_rresp), .s_rlast(m_rlast), .s_rvalid(m_rvalid), .s_rready(m_rready)
  );

  // ---------------- pictures ----------------
  logic [7:0] pic [3][H][W];
  logic [W_WORD-1:0] wm [W_DEPTH];

  function automatic logic [15:0] to565(int g);
    return {5'(g >> 3), 6'(g >> 2), 5'(g >> 3)};
  endfunction

  task automatic draw(int f);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) pic[f][y][x] = 8'($urandom_range(150, 255));
    for (int s = 0; s < 2 + f; s++) begin
      int x0, y0, x1, y1, px, py;
      x0 = $urandom_range(220, 420); y0 = $urandom_range(140, 340);
      x1 = $urandom_range(220, 420); y1 = $urandom_range(140, 340);
      for (int t = 0; t <= 200; t++) begin
        px = x0 + (x1 - x0) * t / 200; py = y0 + (y1 - y0) * t / 200;
        for (int d = 0; d < 6; d++) begin
          pic[f][py][px + d] = 8'($urandom_range(0, 80));
          pic[f][py + 1][px + d] = 8'($urandom_range(0, 80));
        end
      end
    end
    // specks of dirt away from the character, to be rejected as noise
    for (int k = 0; k < 3; k++) begin
      int sx, sy;
      sx = $urandom_range(20, 180); sy = $urandom_range(20, 460);
      for (int d = 0; d <= $urandom_range(0, 2); d++) pic[f][sy][sx + d] = 8'd20;
    end
  endtask

  // ---------------- models ----------------
  int img [784];
  int fa [FM_DEPTH];
  int fb [FM_DEPTH];
  bit inkm [H][W];
  bit seen [H][W];
  int qx [H*W], qy [H*W];
  int n_small = 0;

  function automatic int grey_of(int f, int y, int x);
    logic [15:0] p;
    int r8, g8, b8;
    p = to565(int'(pic[f][y][x]));
    r8 = {p[15:11], p[15:13]}; g8 = {p[10:5], p[10:9]}; b8 = {p[4:0], p[4:2]};
    return (77 * r8 + 150 * g8 + 29 * b8) / 256;
  endfunction

  // pre-processing model; pf is the picture streamed before (its grey range
  // sets the histogram normalisation), -1 for none
  task automatic model_pre(int f, int pf, output bit any);
    int mnx, mxx, mny, mxy, x0, x1, y0, y1, bw, bh, side, ox0, oy0, gmin, gmax;
    gmin = 0; gmax = 255;
    if (pf >= 0) begin
      gmin = 255; gmax = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int g;
          g = grey_of(pf, y, x);
          if (g < gmin) gmin = g;
          if (g > gmax) gmax = g;
        end
    end
    mnx = W; mxx = -1; mny = H; mxy = -1; any = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int g;
        g = grey_of(f, y, x);
        inkm[y][x] = (g < gmin) || ((g - gmin) * 255 < 128 * (gmax - gmin));
        seen[y][x] = 0;
      end
    // 8-connected components by flood fill; those of 8 pixels or more form
    // the character box
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (inkm[y][x] && !seen[y][x]) begin
          int head, tail, cx0, cx1, cy0, cy1;
          head = 0; tail = 1; qx[0] = x; qy[0] = y; seen[y][x] = 1;
          cx0 = x; cx1 = x; cy0 = y; cy1 = y;
          while (head < tail) begin
            int px, py;
            px = qx[head]; py = qy[head]; head++;
            if (px < cx0) cx0 = px;
            if (px > cx1) cx1 = px;
            if (py < cy0) cy0 = py;
            if (py > cy1) cy1 = py;
            for (int dy = -1; dy <= 1; dy++)
              for (int dx = -1; dx <= 1; dx++)
                if (py + dy >= 0 && py + dy < H && px + dx >= 0 && px + dx < W)
                  if (inkm[py + dy][px + dx] && !seen[py + dy][px + dx]) begin
                    seen[py + dy][px + dx] = 1;
                    qx[tail] = px + dx; qy[tail] = py + dy; tail++;
                  end
          end
          if (tail >= 8) begin
            any = 1;
            if (cx0 < mnx) mnx = cx0;
            if (cx1 > mxx) mxx = cx1;
            if (cy0 < mny) mny = cy0;
            if (cy1 > mxy) mxy = cy1;
          end else n_small++;
        end
    x0 = (mnx > 0) ? mnx - 1 : 0;  x1 = (mxx < W - 1) ? mxx + 1 : W - 1;
    y0 = (mny > 0) ? mny - 1 : 0;  y1 = (mxy < H - 1) ? mxy + 1 : H - 1;
    bw = x1 - x0 + 1; bh = y1 - y0 + 1; side = (bw > bh) ? bw : bh;
    ox0 = x0 - (side - bw) / 2; oy0 = y0 - (side - bh) / 2;
    for (int i = 0; i < 28; i++)
      for (int j = 0; j < 28; j++) begin
        int v, sy, sx;
        v = 0;
        if (i >= 2 && i < 26 && j >= 2 && j < 26) begin
          sy = oy0 + ((2 * (i - 2) + 1) * side) / 48;
          sx = ox0 + ((2 * (j - 2) + 1) * side) / 48;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              if (sy + dy >= 0 && sy + dy < H && sx + dx >= 0 && sx + dx < W)
                if (inkm[sy + dy][sx + dx]) v = 255;
        end
        img[i * 28 + j] = v;
      end
  endtask

  function automatic int wgt(int addr, int lane);
    return int'($signed(wm[addr][lane * 8 +: 8]));
  endfunction

  function automatic int q(int s);
    int v = s >>> 7;
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic ref_conv(int k, int h, int w, int ci, int co, int wb, bit raw);
    for (int o = 0; o < co; o++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          int s, pad;
          s = 0; pad = k / 2;
          for (int c = 0; c < ci; c++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy, ix;
                iy = y + ky - pad; ix = x + kx - pad;
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
          int m;
          m = 0;
          for (int py = 0; py < p; py++)
            for (int px = 0; px < p; px++)
              if (fa[(c * h + oy * p + py) * w + ox * p + px] > m)
                m = fa[(c * h + oy * p + py) * w + ox * p + px];
          fb[(c * (h / p) + oy) * (w / p) + ox] = m;
        end
  endtask

  int sh_pool [10], sh_k [10], sh_h [10], sh_w [10], sh_ci [10], sh_co [10], sh_wb [10];
  int n_steps;
  task automatic set_step(int l, int p, int k, int h, int w, int ci, int co, int wb);
    sh_pool[l] = p; sh_k[l] = k; sh_h[l] = h; sh_w[l] = w;
    sh_ci[l] = ci; sh_co[l] = co; sh_wb[l] = wb;
  endtask

  task automatic model_cnn(output int cls, output int score);
    for (int i = 0; i < FM_DEPTH; i++) fa[i] = (i < 784) ? img[i] : 0;
    for (int l = 0; l < n_steps; l++) begin
      if (sh_pool[l] != 0) ref_pool(sh_k[l], sh_h[l], sh_w[l], sh_ci[l]);
      else ref_conv(sh_k[l], sh_h[l], sh_w[l], sh_ci[l], sh_co[l], sh_wb[l], l == n_steps - 1);
      if (l != n_steps - 1) for (int i = 0; i < FM_DEPTH; i++) fa[i] = fb[i];
    end
    cls = 0;
    for (int i = 1; i < 11; i++) if (fb[i] > fb[cls]) cls = i;
    score = fb[cls];
  endtask

  // ---------------- which picture went where ----------------
  int cam_pic;               // picture the camera is sending
  int bank_pic [2];          // picture stored in each bank
  int read_pic = -1, pre_pic, wr_pic, prev_read_pic = -1, pre_prev_pic;
  int n_store [2], n_read [2], n_drop, n_pad, n_seen_layer [10];
  bit fb_reading_q, pre_idle_q;

  always @(posedge clk) if (rst_n) begin
    // picture of the frame the cache accepts
    if (dut.u_fb.pix_valid && dut.u_fb.sof && !dut.u_fb.drop_now) wr_pic = cam_pic;
    // a frame completes when the last write response of the frame arrives
    if (dut.u_fb.wst == dut.u_fb.W_RESP && m_bvalid &&
        32'(dut.u_fb.wbursts) == W * H / 64 - 1) begin
      bank_pic[dut.u_fb.wr_bank] = wr_pic;
      n_store[dut.u_fb.wr_bank]++;
    end
    if (dut.u_fb.reading && !fb_reading_q) begin
      prev_read_pic = read_pic;
      read_pic = bank_pic[dut.u_fb.cur_bank];
      n_read[dut.u_fb.cur_bank]++;
    end
    fb_reading_q <= dut.u_fb.reading;
    if (dut.u_pre.state == dut.u_pre.S_CAPTURE && pre_idle_q) begin
      pre_pic = read_pic;
      pre_prev_pic = prev_read_pic;
    end
    pre_idle_q <= (dut.u_pre.state == dut.u_pre.S_IDLE);
    if (frame_dropped) n_drop++;
    if (dut.u_cnn.busy) n_seen_layer[dut.u_cnn.layer]++;
    if (dut.u_cnn.u_conv.run && !dut.u_cnn.u_conv.inb) n_pad++;
  end

  // ---------------- LCD: count lit digit pixels per frame ----------------
  int lit_count, lit_last_frame, lcd_frames_after_result;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_lcd.frame_start) begin
      lit_last_frame = lit_count;
      lit_count = 0;
    end else if (lcd_de && lcd_rgb == 16'hFFFF && dut.u_lcd.hc > 640) lit_count++;
  end

  function automatic int glyph_pixels(int cls);
    bit [6:0] tbl [11] = '{7'b1111110, 7'b0110000, 7'b1101101, 7'b1111001, 7'b0110011,
                            7'b1011011, 7'b1011111, 7'b1110000, 7'b1111111, 7'b1111011,
                            7'b0000001};
    int n = 0;
    for (int y = 0; y < 160; y++)
      for (int x = 0; x < 80; x++) begin
        bit r = 0;
        if (tbl[cls][6] && y < 12) r = 1;
        if (tbl[cls][5] && x >= 68 && y < 80) r = 1;
        if (tbl[cls][4] && x >= 68 && y >= 80) r = 1;
        if (tbl[cls][3] && y >= 148) r = 1;
        if (tbl[cls][2] && x < 12 && y >= 80) r = 1;
        if (tbl[cls][1] && x < 12 && y < 80) r = 1;
        if (tbl[cls][0] && y >= 74 && y < 86) r = 1;
        n += r;
      end
    return n;
  endfunction

  // ---------------- camera ----------------
  bit stop_cam = 0;
  initial begin
    cam_vsync = 0; cam_href = 0; cam_data = 0;
    wait (rst_n);
    repeat (W_DEPTH + 20) @(negedge clk);
    for (int f = 0; !stop_cam; f++) begin
      cam_pic = f % 3;
      cam_vsync = 1; repeat (20) @(negedge clk); cam_vsync = 0;
      repeat (20) @(negedge clk);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          logic [15:0] p;
          p = to565(int'(pic[cam_pic][y][x]));
          cam_href = 1; cam_data = p[15:8]; @(negedge clk);
          cam_data = p[7:0]; @(negedge clk);
        end
        cam_href = 0;
        repeat (8) @(negedge clk);
      end
    end
  end

  // ---------------- main ----------------
  initial begin
    int nres, cls, score, exp_lit;
    bit any;
    wld_we = 0; wld_addr = 0; wld_data = 0;
    for (int f = 0; f < 3; f++) draw(f);
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < W_DEPTH; a++) begin
      for (int l = 0; l < 8; l++) wm[a][l*8 +: 8] = 8'($signed($urandom_range(0, 95)) - 8'sd48);
      wld_we = 1; wld_addr = W_AW'(a); wld_data = wm[a];
      @(negedge clk);
    end
    wld_we = 0;
    nres = 0;
    while (nres < NRES) begin
      @(negedge clk);
      if (result_valid) begin
        model_pre(pre_pic, pre_prev_pic, any);
        model_cnn(cls, score);
        checks++;
        if (!any || int'(result_class) != cls || result_score != score) begin
          failures++;
          $display("FAIL result %0d (picture %0d): class %0d score %0d, expected %0d score %0d",
                   nres, pre_pic, result_class, result_score, cls, score);
        end else
          $display("result %0d (picture %0d): class %0d score %0d at %0t", nres, pre_pic, cls, score, $time);
        nres++;
        // the next full LCD frame shows the digit
        @(posedge dut.u_lcd.frame_start);
        @(posedge dut.u_lcd.frame_start);
        @(negedge clk);
        exp_lit = glyph_pixels(cls);
        checks++;
        if (lit_last_frame != exp_lit) begin
          failures++;
          $display("FAIL LCD shows %0d lit pixels, expected %0d", lit_last_frame, exp_lit);
        end
      end
    end
    stop_cam = 1;
    checks++;
    if (n_store[0] == 0 || n_store[1] == 0 || n_read[0] == 0 || n_read[1] == 0) begin
      failures++; $display("FAIL ping-pong not exercised");
    end
    checks++;
    if (n_drop == 0) begin failures++; $display("FAIL no frame dropped"); end
    checks++;
    if (n_pad == 0) begin failures++; $display("FAIL no zero-padding tap"); end
    checks++;
    if (n_small == 0) begin failures++; $display("FAIL no speck rejected by the labelling"); end
    for (int l = 0; l < 10; l++) begin
      checks++;
      if (n_seen_layer[l] == 0) begin failures++; $display("FAIL step %0d never ran", l); end
    end
    checks++;
    if (wr_overflow || axi_error || mem.lastfail != 0) begin failures++; $display("FAIL error flags"); end
    $display("stored bank0 %0d bank1 %0d, read bank0 %0d bank1 %0d, dropped %0d, padding taps %0d, specks rejected %0d",
             n_store[0], n_store[1], n_read[0], n_read[1], n_drop, n_pad, n_small);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

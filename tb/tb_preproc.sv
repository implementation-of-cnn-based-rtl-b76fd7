// tb_preproc: self-checking test of the image pre-processing block.
//
// Uses a 64x48 frame. Draws random dark strokes (a few thick line segments)
// and small dark specks, plus grey noise above the threshold on a light
// background, streams the frame in as RGB565 pixels and compares the 28x28
// output with a model written here: histogram normalisation from the previous
// frame's grey range, threshold, 8-connected components found by flood fill
// (those under 8 pixels are dropped), their joint bounding box, dilation of
// the whole image by a 3x3 square, square box around the centre,
// nearest-neighbour sampling onto 24x24 and a 2-pixel border. Also checks a
// frame without ink, a frame offered while accept is low (must be ignored), a
// character touching the frame edge, that some specks were rejected, and the
// number of cycles from eof to done. Two frames under dim lighting test the
// normalisation. The label table is enlarged so that the very noisy first dim
// frame does not run out of labels.
`timescale 1ns/1ps
module tb_preproc;
  localparam int W = 64, H = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic accept, pix_valid, sof, eof, img_we, busy, done, found;
  logic [15:0] pix;
  logic [5:0] pix_x, pix_y;
  logic [9:0] img_addr;
  logic [7:0] img_data;

  preproc #(.FRAME_W(W), .FRAME_H(H), .NLAB(512)) dut (.*);

  int   grey [H][W];
  bit   inkm [H][W];
  int   outimg [784];
  int   pmin = 0, pmax = 255;   // grey range of the previous frame

  function automatic int grey_of(int y, int x);
    logic [15:0] p;
    int r8, g8, b8;
    p = to565(grey[y][x]);
    r8 = {p[15:11], p[15:13]}; g8 = {p[10:5], p[10:9]}; b8 = {p[4:0], p[4:2]};
    return (77 * r8 + 150 * g8 + 29 * b8) / 256;
  endfunction

  // normalised threshold: stretch [pmin, pmax] to 0..255, ink below 128
  function automatic bit is_ink(int g);
    if (g < pmin) return 1;
    return (g - pmin) * 255 < 128 * (pmax - pmin);
  endfunction

  task automatic update_range();
    pmin = 255; pmax = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (grey_of(y, x) < pmin) pmin = grey_of(y, x);
        if (grey_of(y, x) > pmax) pmax = grey_of(y, x);
      end
  endtask

  // dim lighting: squeeze the picture into lo..hi
  task automatic dim(int lo, int hi);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) grey[y][x] = lo + grey[y][x] * (hi - lo) / 255;
  endtask
  int   nwrites;

  always_ff @(posedge clk) if (img_we) begin
    outimg[img_addr] <= int'(img_data);
    nwrites <= nwrites + 1;
  end

  function automatic logic [15:0] to565(int g);
    return {5'(g >> 3), 6'(g >> 2), 5'(g >> 3)};
  endfunction

  task automatic draw(int nseg, bit edge_touch);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        grey[y][x] = $urandom_range(140, 255);
    for (int s = 0; s < nseg; s++) begin
      int x0, y0, x1, y1;
      x0 = $urandom_range(10, W - 11); y0 = $urandom_range(8, H - 9);
      x1 = $urandom_range(10, W - 11); y1 = $urandom_range(8, H - 9);
      for (int t = 0; t <= 32; t++) begin
        int px, py;
        px = x0 + (x1 - x0) * t / 32; py = y0 + (y1 - y0) * t / 32;
        grey[py][px] = $urandom_range(0, 90);
        grey[py][px + 1] = $urandom_range(0, 90);
      end
    end
    if (edge_touch) for (int y = 0; y < 12; y++) grey[y][0] = 10;
    // isolated specks of dirt (1..3 pixels) that the labelling must reject
    for (int k = 0; k < 3; k++) begin
      int sx, sy;
      sx = $urandom_range(1, W - 4); sy = $urandom_range(1, H - 2);
      for (int d = 0; d <= $urandom_range(0, 2); d++) grey[sy][sx + d] = 20;
    end
  endtask

  task automatic send_frame();
    @(negedge clk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        pix_valid = 1; pix = to565(grey[y][x]);
        pix_x = 6'(x); pix_y = 6'(y);
        sof = (x == 0 && y == 0); eof = (x == W - 1 && y == H - 1);
        @(negedge clk);
        pix_valid = 0; sof = 0; eof = 0;
        if ($urandom_range(0, 3) == 0 && !(x == W - 1 && y == H - 1)) @(negedge clk);
      end
  endtask

  // model: 8-connected components found by flood fill; those with at least
  // MIN_PIX (8) pixels make up the character box
  bit seen [H][W];
  int qx [H*W], qy [H*W];
  int n_small = 0;
  task automatic expected(output int exp_img [784], output bit any);
    int mnx = W, mxx = -1, mny = H, mxy = -1, x0, x1, y0, y1, bw, bh, side, ox0, oy0;
    any = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        inkm[y][x] = is_ink(grey_of(y, x));
        seen[y][x] = 0;
      end
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
        int v = 0;
        if (i >= 2 && i < 26 && j >= 2 && j < 26) begin
          int sy, sx;
          sy = oy0 + ((2 * (i - 2) + 1) * side) / 48;
          sx = ox0 + ((2 * (j - 2) + 1) * side) / 48;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              if (sy + dy >= 0 && sy + dy < H && sx + dx >= 0 && sx + dx < W)
                if (inkm[sy + dy][sx + dx]) v = 255;
        end
        exp_img[i * 28 + j] = v;
      end
  endtask

  task automatic run_case(int nseg, bit edge_touch, int lo = 0, int hi = 255);
    int exp_img [784];
    bit any;
    int cyc;
    draw(nseg, edge_touch);
    dim(lo, hi);
    expected(exp_img, any);
    for (int i = 0; i < 784; i++) outimg[i] = -1;
    nwrites = 0;
    accept = 1;
    send_frame();
    update_range();
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (found != any) begin failures++; $display("FAIL found %0d expected %0d", found, any); end
    if (any) begin
      checks++;
      if (cyc != 784 * 9 + 4) begin failures++; $display("FAIL %0d cycles from eof", cyc); end
      checks++;
      if (nwrites != 784) begin failures++; $display("FAIL %0d writes", nwrites); end
      for (int i = 0; i < 784; i++) begin
        checks++;
        if (outimg[i] != exp_img[i]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel (%0d,%0d) got %0d exp %0d", i / 28, i % 28, outimg[i], exp_img[i]);
        end
      end
    end else begin
      checks++;
      if (nwrites != 0) begin failures++; $display("FAIL writes on empty frame"); end
    end
  endtask

  initial begin
    accept = 0; pix_valid = 0; pix = 0; pix_x = 0; pix_y = 0; sof = 0; eof = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a frame while the CNN is busy is ignored
    draw(3, 0);
    nwrites = 0;
    send_frame();
    update_range();
    repeat (20) @(negedge clk);
    checks++;
    if (busy || nwrites != 0) begin failures++; $display("FAIL frame taken while accept low"); end
    for (int t = 0; t < 6; t++) run_case($urandom_range(1, 4), t == 3);
    // dim lighting: a fixed threshold of 128 would see every pixel as ink;
    // after one dim frame the normalisation has adapted
    run_case(3, 0, 40, 150);
    run_case(3, 0, 40, 150);
    checks++;
    if (pmax > 160) begin failures++; $display("FAIL dim frame not dim"); end
    checks++;
    if (n_small == 0) begin failures++; $display("FAIL no small component was rejected"); end
    $display("small components rejected: %0d", n_small);
    run_case(2, 0, 0, 255);
    run_case(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

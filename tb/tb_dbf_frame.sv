// tb_dbf_frame: one NTSC 4:2:0 frame (720 x 480 luminance, two 360 x 240
// chroma planes) deblocked end to end.
//
// A synthetic blocky frame is generated: each 8x8 block gets a smooth
// gradient plus its own DC offset, and some blocks get strong texture, so
// flat boundaries with a coding step, textured boundaries and real edges all
// occur. Every block has its own QP. The frame memory is modelled here: the
// testbench reads each ten-pixel segment out of it into dbf_top and writes
// the eight filtered pixels back in place as they leave the filter. Horizontal
// block edges (column segments) are filtered first, then vertical edges (row
// segments), one boundary at a time across the frame, so that two segments
// in flight never share a pixel. The same order applied to a copy of the
// frame with the reference model gives the expected frame; every pixel is
// compared at the end. The luminance plane alone must allow 30 frames per
// second at 81 MHz; the whole 4:2:0 frame is reported against 81 MHz and
// must fit the 100 MHz maximum clock.
module tb_dbf_frame;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int     LW = 720, LH = 480;   // luminance plane
  localparam longint CLK_HZ = 81_000_000, MAX_HZ = 100_000_000, FPS = 30;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  ready, out_valid;
  pix_t  in_pix = '0, out_pix;
  qp_t   qp = '0;
  mode_e out_mode;

  dbf_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  int W, H;          // size of the plane being filtered
  int img  [];       // frame memory seen by the hardware, img[r*W + c]
  int gold [];       // reference result
  int qpmap [];      // QP per 8x8 block

  // one segment: the memory addresses of its 10 pixels
  typedef struct { int a [10]; int q; } seg_pos_t;
  seg_pos_t segs [$];
  seg_pos_t outq [$];
  int nmode [3] = '{0, 0, 0};

  function automatic int clamp(int x);
    return x < 0 ? 0 : (x > 255 ? 255 : x);
  endfunction

  // Builds a synthetic plane of w x h pixels, filters it in hardware and in
  // the reference model, compares, and returns the cycles the hardware took.
  task automatic run_plane(int w, int h, output longint cycles);
    longint t_start;
    W = w; H = h;
    img = new [W*H]; qpmap = new [(W/8)*(H/8)];
    for (int br = 0; br < H/8; br++)
      for (int bc = 0; bc < W/8; bc++) begin
        automatic int dc = $urandom_range(0, 16) - 8;
        automatic int tex = ($urandom_range(0, 3) == 0) ? 40 : 3;
        qpmap[br*(W/8) + bc] = $urandom_range(2, 24);
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) begin
            automatic int r = br*8 + y, c = bc*8 + x;
            img[r*W + c] = clamp(40 + (r * 150) / H + (c * 50) / W + dc + $urandom_range(0, tex));
          end
      end
    // a band of sharp real edges
    for (int r = 0; r < H; r++)
      for (int c = (W*5)/12; c < (W*7)/12; c++) img[r*W + c] = clamp(img[r*W + c] + 90);
    gold = img;

    // segment list: horizontal edges first, then vertical edges
    segs.delete();
    for (int b = 8; b < H; b += 8)
      for (int c = 0; c < W; c++) begin
        seg_pos_t s;
        for (int i = 0; i < 10; i++) s.a[i] = (b - 5 + i)*W + c;
        s.q = qpmap[(b/8)*(W/8) + c/8];
        segs.push_back(s);
      end
    for (int b = 8; b < W; b += 8)
      for (int r = 0; r < H; r++) begin
        seg_pos_t s;
        for (int i = 0; i < 10; i++) s.a[i] = r*W + b - 5 + i;
        s.q = qpmap[(r/8)*(W/8) + b/8];
        segs.push_back(s);
      end

    // reference, same order
    foreach (segs[k]) begin
      seg_t v;
      out_t o;
      int dd, m;
      for (int i = 0; i < 10; i++) v[i] = gold[segs[k].a[i]];
      m = filter(v, segs[k].q, o, dd);
      nmode[m]++;
      for (int i = 0; i < 8; i++) gold[segs[k].a[i+1]] = o[i];
    end

    // hardware run
    @(negedge clk);
    t_start = cyc;
    foreach (segs[k]) begin
      while (!ready) @(negedge clk);
      outq.push_back(segs[k]);
      for (int i = 0; i < 10; i++) begin
        start  = (i == 0);
        in_pix = pix_t'(img[segs[k].a[i]]);
        qp     = qp_t'(segs[k].q);
        @(negedge clk);
      end
      start = 1'b0;
    end
    wait (outq.size() == 0);
    cycles = cyc - t_start;

    for (int k = 0; k < W*H; k++) begin
      checks++;
      if (img[k] != gold[k]) begin
        failures++;
        if (failures < 10) $display("FAIL: %0dx%0d plane pixel (%0d,%0d) = %0d, expected %0d",
                                    W, H, k / W, k % W, img[k], gold[k]);
      end
    end
    $display("%0dx%0d plane: %0d segments in %0d cycles", W, H, segs.size(), cycles);
  endtask

  initial begin
    longint cy_l, cy_cb, cy_cr, need_l, need_all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_plane(LW, LH, cy_l);
    run_plane(LW/2, LH/2, cy_cb);
    run_plane(LW/2, LH/2, cy_cr);
    need_l   = cy_l * FPS;
    need_all = (cy_l + cy_cb + cy_cr) * FPS;
    $display("modes: none %0d, default %0d, smooth %0d", nmode[0], nmode[1], nmode[2]);
    $display("luminance at %0d fps needs %0d Hz, %0d Mpixel/s at 81 MHz",
             FPS, need_l, (longint'(LW/8 - 1) * LH + longint'(LH/8 - 1) * LW) * 8 * CLK_HZ / cy_l / 1_000_000);
    $display("luminance + 4:2:0 chroma at %0d fps needs %0d Hz (81 MHz target, 100 MHz maximum)",
             FPS, need_all);
    checks++;
    if (need_l > CLK_HZ) begin
      failures++;
      $display("FAIL: luminance frame does not fit 30 fps at 81 MHz");
    end
    checks++;
    if (need_all > MAX_HZ) begin
      failures++;
      $display("FAIL: full 4:2:0 frame does not fit 30 fps at 100 MHz");
    end
    checks++;
    if (nmode[0] == 0 || nmode[1] == 0 || nmode[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write-back of filtered pixels, in output order
  int oidx = 0;
  always @(negedge clk) if (rst_n && out_valid && outq.size() > 0) begin
    img[outq[0].a[oidx+1]] = int'(out_pix);
    oidx++;
    if (oidx == 8) begin
      oidx = 0;
      void'(outq.pop_front());
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_sri_surf_sizes: the feature extractor built for the two smaller image
// sizes it is meant for besides 1080p: VGA (640x480) and about 800x640, the
// size of common affine-invariance test images. Both builds run side by side
// on one frame each, with every other parameter at its default. The image is
// a noisy grey background with a grid of bright and dark discs of radii 3 to
// 10 pixels. Checks, per build: the frame completes, every descriptor has
// unit length and lies inside the image, the number of descriptors equals
// the number of accepted points, and points were found at three or more
// scales s0.
module tb_sri_surf_sizes;
  import surf_pkg::*;
  localparam int NB = 2;
  localparam int WS [NB] = '{640, 800};
  localparam int HS [NB] = '{480, 640};
  logic pix_clk = 0, clk = 0, pix_rst_n = 1, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {pix_rst_n, rst_n} = '0;
  always #7 pix_clk = ~pix_clk;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit finished [NB];

  // disc of radius 3 + (k % 8) centred on a 60-pixel grid, alternately bright and dark
  function automatic logic [7:0] pixel(int r, int c);
    int gr, gc, cr, cc, rad, k;
    gr = r / 60; gc = c / 60;
    cr = gr * 60 + 30; cc = gc * 60 + 30;
    k = gr * 7 + gc * 3;
    rad = 3 + (k % 8);
    if ((r - cr) * (r - cr) + (c - cc) * (c - cc) <= rad * rad)
      return ((gr + gc) % 2 == 0) ? 8'd230 : 8'd20;
    return 8'(100 + ((r * 7 + c * 13) % 11));
  endfunction

  for (genvar b = 0; b < NB; b++) begin : g_build
    localparam int W = WS[b], H = HS[b];
    logic pix_valid, pix_ready, desc_valid, frame_end;
    logic [7:0] pix;
    fp_t desc_fp;
    logic signed [31:0] desc_angle;
    logic signed [DESC_W-1:0] desc_vec [DESC_N];
    logic signed [ACC_W-1:0] threshold;
    logic [15:0] last_count, last_drops;
    logic [5:0] events;
    int n_desc = 0, frames_done = 0;
    int scale_seen [6];

    sri_surf_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

    always @(posedge clk) begin
      if (frame_end) frames_done++;
      if (desc_valid) begin
        real sq;
        sq = 0;
        n_desc++;
        for (int i = 0; i < DESC_N; i++) sq += (real'(desc_vec[i]) / 32768.0) ** 2;
        checks++;
        if (sq < 0.98 || sq > 1.0001 || desc_fp.x >= W || desc_fp.y >= H) begin
          failures++; $display("%0dx%0d: bad descriptor at (%0d,%0d): length^2 %f", W, H, desc_fp.x, desc_fp.y, sq);
        end
        scale_seen[scale_s0(desc_fp.fsize)]++;
      end
    end

    initial begin
      int nsc;
      pix_valid = 0; pix = 0;
      foreach (scale_seen[i]) scale_seen[i] = 0;
      repeat (3) @(posedge clk);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge pix_clk);
          pix_valid = 1; pix = pixel(r, c);
          @(posedge pix_clk);
          while (!pix_ready) @(posedge pix_clk);
          #1 pix_valid = 0;
        end
      while (frames_done < 1) @(posedge clk);
      while (dut.q_cnt != 0 || dut.samp_busy) @(posedge clk);
      repeat (10) @(posedge clk);
      $display("%0dx%0d: descriptors %0d, accepted %0d, dropped %0d; per s0: %0d %0d %0d %0d",
               W, H, n_desc, last_count, last_drops, scale_seen[2], scale_seen[3], scale_seen[4], scale_seen[5]);
      checks++;
      if (n_desc != int'(last_count) || n_desc == 0) begin failures++; $display("%0dx%0d: descriptor count mismatch", W, H); end
      nsc = 0;
      for (int s = 2; s <= 5; s++) if (scale_seen[s] != 0) nsc++;
      checks++;
      if (nsc < 3) begin failures++; $display("%0dx%0d: points at only %0d scales", W, H, nsc); end
      finished[b] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk); pix_rst_n = 1; rst_n = 1;
    wait (finished[0] && finished[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog: frame not finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sri_surf_top: end-to-end run of the feature extractor on a 96x160 image
// (reduced size, and a 44-row scaled RAM so that the scaled-RAM guard is
// reached; the mechanisms are the same as at 1920x1080). Frame 1 holds
// bright and dark blobs of several sizes on a noisy background, frame 2 is
// flat, frame 3 repeats frame 1. Pixels are sent in the I/O clock domain as
// fast as 'pix_ready' allows. Checks:
//  - every descriptor has unit length (sum of squares within 2% of 1), a
//    position inside the image and one of the four middle filter sides;
//  - descriptors per frame equal the points the frame accepted;
//  - frame 3, run after the threshold moved, gives identical descriptors
//    for the points it shares with frame 1 (most of them);
//  - each mechanism happened at least once: image stall by a row task, by a
//    queued point (scaled-RAM guard), I/O-side stall, point dropped on a
//    full queue, threshold raised, threshold lowered, interpolation at a
//    fractional position, points from both octaves and every scale s0.
module tb_sri_surf_top;
  import surf_pkg::*;
  localparam int W = 96, H = 160;
  logic pix_clk = 0, clk = 0, pix_rst_n = 1, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {pix_rst_n, rst_n} = '0;
  always #7 pix_clk = ~pix_clk;
  always #5 clk = ~clk;
  logic pix_valid, pix_ready, desc_valid, frame_end;
  logic [7:0] pix;
  fp_t desc_fp;
  logic signed [31:0] desc_angle;
  logic signed [DESC_W-1:0] desc_vec [DESC_N];
  logic signed [ACC_W-1:0] threshold;
  logic [15:0] last_count, last_drops;
  logic [5:0] events;
  int checks = 0, failures = 0;

  sri_surf_top #(.IMG_W(W), .IMG_H(H), .MSR_ROWS(44), .FPQ_DEPTH(8), .TARGET(6)) dut (.*);

  int img [H][W];
  int ev_cnt [6];
  int io_stall = 0, n_desc = 0, frame_no = 0, frames_done = 0;
  int scale_seen [6];
  int oct2 = 0;
  typedef struct { fp_t f; logic signed [DESC_W-1:0] v [DESC_N]; } rec_t;
  rec_t f1 [$];
  rec_t f3 [$];
  int desc_in_frame [4];

  always @(posedge clk) begin
    for (int e = 0; e < 6; e++) if (events[e]) ev_cnt[e]++;
    if (frame_end) frames_done++;
    if (desc_valid) begin
      real sq;
      rec_t r;
      sq = 0;
      n_desc++;
      desc_in_frame[frame_no]++;
      for (int i = 0; i < DESC_N; i++) sq += (real'(desc_vec[i]) / 32768.0) ** 2;
      checks++;
      if (sq < 0.98 || sq > 1.0001) begin failures++; $display("descriptor length^2 %f", sq); end
      checks++;
      if (desc_fp.x >= W || desc_fp.y >= H ||
          !(desc_fp.fsize inside {8'd15, 8'd21, 8'd27, 8'd39})) begin
        failures++; $display("bad point (%0d,%0d,L%0d)", desc_fp.x, desc_fp.y, desc_fp.fsize);
      end
      scale_seen[scale_s0(desc_fp.fsize)]++;
      if (desc_fp.fsize >= 27) oct2++;
      r.f = desc_fp; r.v = desc_vec;
      if (frame_no == 1) f1.push_back(r);
      if (frame_no == 3) f3.push_back(r);
    end
  end
  always @(posedge pix_clk) if (pix_valid && !pix_ready) io_stall++;

  task automatic send_frame(int kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge pix_clk);
        pix_valid = 1; pix = (kind == 2) ? 8'd90 : 8'(img[r][c]);
        @(posedge pix_clk);
        while (!pix_ready) @(posedge pix_clk);
        #1 pix_valid = 0;
      end
  endtask

  task automatic wait_frame(int n);
    while (frames_done < n) @(posedge clk);
    // let queued points finish
    while (dut.q_cnt != 0 || dut.samp_busy) @(posedge clk);
    repeat (10) @(posedge clk);
  endtask

  int cnt1, common;
  initial begin
    pix_valid = 0; pix = 0;
    foreach (ev_cnt[i]) ev_cnt[i] = 0;
    foreach (scale_seen[i]) scale_seen[i] = 0;
    foreach (desc_in_frame[i]) desc_in_frame[i] = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 60 + int'($urandom % 12);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      // small blobs for octave 1, large ones near the middle column for octave 2
      if ((r - 24) ** 2 + (c - 20) ** 2 <= 9)  img[r][c] = 240;
      if ((r - 30) ** 2 + (c - 42) ** 2 <= 16) img[r][c] = 10;
      if ((r - 44) ** 2 + ((c - 26) ** 2) * 2 <= 12) img[r][c] = 230;
      if ((r - 56) ** 2 + (c - 38) ** 2 <= 6)  img[r][c] = 220;
      if ((r - 66) ** 2 + (c - 22) ** 2 <= 20) img[r][c] = 15;
      if ((r - 78) ** 2 + (c - 32) ** 2 <= 64) img[r][c] = 250;
      if ((r - 100) ** 2 + (c - 32) ** 2 <= 144) img[r][c] = 5;
      if ((r - 96) ** 2 + (c - 44) ** 2 <= 9)  img[r][c] = 250;
      if ((r - 112) ** 2 + (c - 20) ** 2 <= 12) img[r][c] = 200;
      if ((r - 126) ** 2 + (c - 32) ** 2 <= 100) img[r][c] = 240;
      if ((r - 40) ** 2 + (c - 60) ** 2 <= 25) img[r][c] = 250;
      if ((r - 64) ** 2 + (c - 56) ** 2 <= 36) img[r][c] = 0;
      if ((r - 90) ** 2 + (c - 72) ** 2 <= 30) img[r][c] = 245;
      if ((r - 118) ** 2 + (c - 60) ** 2 <= 20) img[r][c] = 5;
      if ((r - 120) ** 2 + (c - 80) ** 2 <= 9) img[r][c] = 230;
      if ((r - 52) ** 2 + (c - 80) ** 2 <= 18) img[r][c] = 250;
      if ((r - 104) ** 2 + (c - 48) ** 2 <= 14) img[r][c] = 0;
      if ((r - 76) ** 2 + (c - 84) ** 2 <= 22) img[r][c] = 0;
      // strongly textured band: many weak points, fills the point queue
      if (r >= 134 && r < 146 && c >= 16 && c < 80) img[r][c] = int'($urandom % 256);
    end
    repeat (3) @(posedge clk); pix_rst_n = 1; rst_n = 1;
    frame_no = 1; send_frame(1); wait_frame(1);
    cnt1 = int'(last_count);
    $display("frame 1: %0d descriptors, %0d accepted, %0d dropped, threshold now %0d",
             desc_in_frame[1], last_count, last_drops, threshold);
    checks++;
    if (desc_in_frame[1] != int'(last_count) || desc_in_frame[1] == 0) begin
      failures++; $display("frame 1 descriptor count mismatch");
    end
    frame_no = 2; send_frame(2); wait_frame(2);
    $display("frame 2: %0d descriptors, threshold now %0d", desc_in_frame[2], threshold);
    checks++;
    if (desc_in_frame[2] != int'(last_count)) begin failures++; $display("frame 2 count mismatch"); end
    frame_no = 3; send_frame(1); wait_frame(3);
    $display("frame 3: %0d descriptors", desc_in_frame[3]);
    // points found in both frames must carry identical descriptors
    // (frame 1 lost points to the full queue, frame 3 ran at another threshold)
    common = 0;
    foreach (f3[i]) begin
      int hit;
      hit = -1;
      foreach (f1[j]) if (f1[j].f == f3[i].f) hit = j;
      if (hit >= 0) begin
        common++;
        checks++;
        if (f1[hit].v != f3[i].v) begin
          failures++; $display("frame 3 descriptor differs at (%0d,%0d)", f3[i].f.x, f3[i].f.y);
        end
      end
    end
    checks++;
    if (common * 2 < f3.size()) begin failures++; $display("only %0d points common to frames 1 and 3", common); end
    $display("events: guard-stall %0d task-stall %0d drop %0d interp %0d raise %0d lower %0d io-stall %0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], io_stall);
    $display("points per s0: 2:%0d 3:%0d 4:%0d 5:%0d, octave 2: %0d",
             scale_seen[2], scale_seen[3], scale_seen[4], scale_seen[5], oct2);
    for (int e = 0; e < 6; e++) begin
      checks++;
      if (ev_cnt[e] == 0) begin failures++; $display("mechanism %0d never happened", e); end
    end
    checks++; if (io_stall == 0) begin failures++; $display("I/O side never stalled"); end
    for (int s = 2; s <= 5; s++) begin
      checks++; if (scale_seen[s] == 0) begin failures++; $display("no point at s0=%0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: frames done %0d", frames_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

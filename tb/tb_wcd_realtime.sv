// Real-time workload testbench at the default parameters: one second of
// NTSC-like input (30 interlaced 640x480 frames of 525 lines x 1587 clocks,
// about 1/30 s each at 25 MHz; 240 active lines per field; a pixel every
// other clock, as from a 13.5 MHz decoder), first with rate 15 and then with
// rate 5, threshold 173 (0.6) and both Wronskians.
// Checks that exactly 15 (then 5) frames per second are analysed and
// displayed, that no analysed frame is lost because the detector is still
// busy, that processing plus display of a frame fits in two frame periods,
// and compares every displayed pixel (except for the very first analysed
// frame, which has no reference) with an integer reference model.
// Frames are generated by formula: a fixed textured background, pixel
// noise and a moving block that is bright in even and dark in odd frames.
module tb_wcd_realtime;
  import wcd_pkg::*;
  import wcd_ref_pkg::*;

  localparam int W = 640, H = 240, LINE_CLK = 1587, NF = 30;
  localparam int FRAME_CLK = 525 * LINE_CLK;

  logic clk = 1'b0, rst_n = 1'b0;
  logic px_valid = 1'b0, px_sof = 1'b0, px_field = 1'b0;
  logic [7:0] px_luma = '0;
  logic [3:0] rate = 4'd15;
  wcd_mode_t mode_sel = MODE_BOTH;
  logic [7:0] th_sel = 8'd173;
  logic hsync_n, vsync_n, de, frame_skipped;
  logic [23:0] rgb;
  ctrl_state_t state;

  wcd_top dut (.*);

  always #20 clk = ~clk;   // 25 MHz

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- frame generator ----------------
  function automatic int unsigned mix(int unsigned a);
    a = a ^ (a >> 16); a = a * 32'h7feb352d; a = a ^ (a >> 15); a = a * 32'h846ca68b;
    return a ^ (a >> 16);
  endfunction

  // frame k (global frame number), frame line r, column c
  function automatic int unsigned luma(int k, int r, int c);
    int v = 40 + int'(mix(r * 1024 + c) % 160) + int'(mix(k * 7919 + r * 640 + c) % 5) - 2;
    int br = 60 + 8 * (k % 40), bc = 40 + 14 * (k % 40);
    if (r >= br && r < br + 90 && c >= bc && c < bc + 60) v = (k % 2 == 0) ? 230 : 24;
    return (v < 16) ? 16 : (v > 235) ? 235 : v;
  endfunction

  // expected change bit of frame line v, column h: frame k against frame p
  function automatic bit exp_change(int k, int p, int v, int h);
    int f = v % 2, l = v / 2;
    int unsigned sw = 0, sc = 0, m;
    for (int dl = -1; dl <= 1; dl++)
      for (int dc = -1; dc <= 1; dc++)
        if (l + dl >= 0 && l + dl < H && h + dc >= 0 && h + dc < W) begin
          int unsigned x = luma(k, 2 * (l + dl) + f, h + dc), y = luma(p, 2 * (l + dl) + f, h + dc);
          sw += d_ref(x, y); sc += d_ref(y, x);
        end
    sw = sat8(sw); sc = sat8(sc);
    m = (sw > sc) ? sw : sc;
    return m > 173;
  endfunction

  // ---------------- monitor ----------------
  int n_proc = 0, n_disp = 0, n_skip = 0, n_white = 0, n_black = 0;
  int drive_k = 0, proc_k = -1, proc_ref = -1, disp_k = -1, disp_ref = -1, disp_pix = 0;
  longint proc_start = 0, worst_busy = 0;
  ctrl_state_t prev_state = ST_IDLE;

  always @(posedge clk) if (rst_n) begin
    if (frame_skipped) n_skip++;
    if (state == ST_PROCESS && prev_state == ST_IDLE) begin
      n_proc++;
      proc_start = cyc;
      proc_ref = proc_k;
      proc_k = drive_k;
    end
    if (state == ST_DISPLAY && prev_state != ST_DISPLAY) begin
      n_disp++;
      disp_pix = 0;
      disp_k = proc_k;
      disp_ref = proc_ref;
    end
    if (state == ST_IDLE && prev_state == ST_DISPLAY && cyc - proc_start > worst_busy)
      worst_busy = cyc - proc_start;
    prev_state = state;
    if (de) begin
      if (disp_ref >= 0) begin
        automatic int v = disp_pix / W, h = disp_pix % W;
        automatic bit e = exp_change(disp_k, disp_ref, v, h);
        checks++;
        if (e) n_white++; else n_black++;
        if (rgb !== (e ? 24'hFFFFFF : 24'h000000)) begin
          failures++;
          if (failures < 10) $display("frame %0d (%0d,%0d): %h", disp_k, v, h, rgb);
        end
      end
      disp_pix++;
    end
  end

  // ---------------- driver ----------------
  task automatic drive_frame(int k);
    for (int f = 0; f < 2; f++) begin
      automatic int nlines = f ? 263 : 262, first = f ? 21 : 20;
      for (int ln = 0; ln < nlines; ln++) begin
        automatic int l = ln - first;
        for (int t = 0; t < LINE_CLK; t++) begin
          if (l >= 0 && l < H && t < 2 * W && t % 2 == 0) begin
            px_valid <= 1'b1;
            px_sof   <= (l == 0 && t == 0);
            px_field <= 1'(f);
            px_luma  <= 8'(luma(k, 2 * l + f, t / 2));
          end else begin
            px_valid <= 1'b0; px_sof <= 1'b0;
          end
          @(posedge clk);
        end
      end
    end
  endtask

  initial begin
    repeat (70_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int exp_proc [2] = '{15, 5};
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      automatic int p0 = n_proc, d0 = n_disp;
      rate <= (run == 0) ? 4'd15 : 4'd5;
      for (int s = 0; s < NF; s++) begin
        drive_frame(drive_k);
        drive_k++;
      end
      checks++;
      if (n_proc - p0 != exp_proc[run] || n_disp - d0 != exp_proc[run]) begin
        failures++;
        $display("rate run %0d: analysed %0d displayed %0d, expected %0d", run, n_proc - p0, n_disp - d0, exp_proc[run]);
      end
    end
    repeat (LINE_CLK) @(posedge clk);
    checks++;
    if (n_skip != 0) begin failures++; $display("%0d analysed frames lost while busy", n_skip); end
    checks++;
    if (worst_busy > 2 * FRAME_CLK) begin failures++; $display("process+display took %0d clocks", worst_busy); end
    checks++;
    if (n_white == 0 || n_black == 0) begin failures++; $display("white %0d black %0d", n_white, n_black); end
    $display("analysed+displayed=%0d skipped=%0d longest process+display=%0d clocks (budget %0d) white=%0d black=%0d",
             n_proc, n_skip, worst_busy, 2 * FRAME_CLK, n_white, n_black);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

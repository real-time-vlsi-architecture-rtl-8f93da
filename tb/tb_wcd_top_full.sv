// Full-size testbench of the change detector: default parameters (640x480
// frames, 240-line fields, 30 frames per second, 640x480 VGA timing), one
// complete operation: a processed frame, a skipped frame, a second processed
// frame and its display, checked pixel by pixel.
//
// Otherwise identical to the reduced-size end-to-end testbench: drives NF synthetic interlaced frames (random background, a moving bright
// or dark block, pixel noise, one frame with a global illumination change)
// through the top level, one pixel per clock with line and field blanking.
// An independent reference (integer division and multiplication, explicit
// 3x3 windows with zero padding inside each field) predicts which frames the
// frame-rate selection processes and the black/white picture each display
// phase must show; every displayed pixel is compared. The first processed
// frame is compared against the uninitialised frame buffer and only counted.
// Counts each mechanism (processing, display, idle frames from the rate
// selection, the three Wronskian modes, saturated / zero PE results, changes
// and no-changes, field flushes) and fails if one never happened.
module tb_wcd_top_full;
  import wcd_pkg::*;
  import wcd_ref_pkg::*;

  localparam int W   = 640;
  localparam int H   = 240;           // lines per field
  localparam int FPS = 30;           // frames numbered per "second"
  localparam int NF  = 3;            // frames driven
  localparam int RATE = 15;
  localparam int H_TOT = W + 16 + 96 + 48;
  localparam int V_TOT = 2 * H + 10 + 2 + 33;
  localparam int WATCHDOG = 4000000;
  localparam bit ALL_MODES = 1'b0;   // all three modes must be exercised
  localparam bit IDLE_RATE = 1'b0;   // a frame must be left idle by the rate

  logic clk = 1'b0, rst_n = 1'b0;
  logic px_valid = 1'b0, px_sof = 1'b0, px_field = 1'b0;
  logic [7:0] px_luma = '0;
  logic [3:0] rate = 4'(RATE);
  wcd_mode_t mode_sel = MODE_BOTH;
  logic [7:0] th_sel = 8'd173;
  logic hsync_n, vsync_n, de, frame_skipped;
  logic [23:0] rgb;
  ctrl_state_t state;

  wcd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- stimulus and reference data ----------------
  byte unsigned img [NF][2*H][W];
  bit          exp_chg [NF][2*H][W];
  bit          processed [NF];
  bit          checkable [NF];
  wcd_mode_t   fmode [NF];
  byte unsigned fth [NF];
  int n_sat = 0, n_zero = 0, n_chg = 0, n_nochg = 0;
  int mode_seen [3] = '{0, 0, 0};

  function automatic byte unsigned clamp_luma(int v);
    if (v < 16) return 16;
    if (v > 235) return 235;
    return byte'(v);
  endfunction

  task automatic make_frames();
    byte unsigned bg [2*H][W];
    foreach (bg[r, c]) bg[r][c] = byte'(16 + $urandom_range(0, 219));
    for (int k = 0; k < NF; k++) begin
      int br = k % (2 * H - 3), bc = (3 * k) % (W - 4);
      int obj = (k % 2 == 0) ? 230 : 20;
      for (int r = 0; r < 2 * H; r++)
        for (int c = 0; c < W; c++) begin
          int v = int'(bg[r][c]) + $urandom_range(0, 4) - 2;
          if (k == 4) v = v * 3 / 4;                     // global illumination drop
          if (r >= br && r < br + 3 && c >= bc && c < bc + 4) v = obj;
          img[k][r][c] = clamp_luma(v);
        end
    end
  endtask

  // expected change map of frame k against reference frame p
  task automatic compute_expected(int k, int p);
    for (int f = 0; f < 2; f++)
      for (int l = 0; l < H; l++)
        for (int c = 0; c < W; c++) begin
          int unsigned sw = 0, sc = 0, v;
          bit ch;
          for (int dl = -1; dl <= 1; dl++)
            for (int dc = -1; dc <= 1; dc++) begin
              int ll = l + dl, cc = c + dc;
              if (ll >= 0 && ll < H && cc >= 0 && cc < W) begin
                int unsigned x = img[k][2*ll+f][cc], y = img[p][2*ll+f][cc];
                int unsigned a = d_ref(x, y), b = d_ref(y, x);
                sw += a; sc += b;
                if (dl == 0 && dc == 0) begin
                  if (a == 255 || b == 255) n_sat++;
                  if (a == 0 || b == 0) n_zero++;
                end
              end
            end
          sw = sat8(sw); sc = sat8(sc);
          case (fmode[k])
            MODE_W:  v = sw;
            MODE_WC: v = sc;
            default: v = (sw > sc) ? sw : sc;
          endcase
          ch = (v > fth[k]);
          exp_chg[k][2*l+f][c] = ch;
          if (ch) n_chg++; else n_nochg++;
        end
  endtask

  task automatic drive_frame(int k);
    for (int f = 0; f < 2; f++) begin
      for (int l = 0; l < H; l++) begin
        for (int c = 0; c < W; c++) begin
          px_valid <= 1'b1;
          px_sof   <= (l == 0 && c == 0);
          px_field <= 1'(f);
          px_luma  <= img[k][2*l+f][c];
          @(posedge clk);
        end
        px_valid <= 1'b0; px_sof <= 1'b0;
        repeat (2) @(posedge clk);                         // line blanking
      end
      repeat (W + 12) @(posedge clk);                      // field blanking
    end
  endtask

  // ---------------- display monitor ----------------
  int disp_frame = -1, disp_pix = 0, n_disp = 0, n_proc = 0, n_idle_rate = 0;
  int n_flush = 0;      // checked pixels of a field's last line 
  int n_exp_proc = 0;
  ctrl_state_t prev_state = ST_IDLE;
  int cur_proc = -1;

  always @(posedge clk) if (rst_n) begin
    if (state == ST_PROCESS && prev_state != ST_PROCESS) n_proc++;
    if (state == ST_DISPLAY && prev_state != ST_DISPLAY) begin
      n_disp++;
      disp_frame = cur_proc;
      disp_pix = 0;
    end
    prev_state = state;
    if (de) begin
      automatic int v = disp_pix / W, h = disp_pix % W;
      if (disp_frame >= 0 && checkable[disp_frame] && v < 2 * H) begin
        logic [23:0] e;
        e = exp_chg[disp_frame][v][h] ? 24'hFFFFFF : 24'h000000;
        checks++;
        if (v % H == H - 1 || v >= 2 * H - 2) n_flush++;   // last line of a field
        if (rgb !== e) begin
          failures++;
          if (failures < 10)
            $display("frame %0d pixel (%0d,%0d): rgb=%h expected %h", disp_frame, v, h, rgb, e);
        end
      end
      disp_pix++;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int prev = -1;
    automatic wcd_mode_t modes [3] = '{MODE_BOTH, MODE_W, MODE_WC};
    automatic int mi = 0;
    make_frames();
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < NF; k++) begin
      automatic int slot = k % FPS;
      processed[k] = (slot % 2 == 0) && (slot / 2 < RATE);
      if (processed[k]) n_exp_proc++;
      if (slot % 2 == 0 && !processed[k]) n_idle_rate++;
      if (processed[k]) begin
        fmode[k] = (prev < 0) ? MODE_BOTH : modes[mi % 3];
        fth[k]   = (mi % 2 == 0) ? 8'd173 : 8'd60;
        if (prev >= 0) begin
          mi++;
          mode_seen[int'(fmode[k])]++;
          compute_expected(k, prev);
          checkable[k] = 1'b1;
        end
        prev = k;
        cur_proc = k;
        mode_sel <= fmode[k];
        th_sel   <= fth[k];
      end
      // state before the frame must be idle
      checks++;
      if (state != ST_IDLE) begin
        failures++;
        $display("frame %0d arrives in state %s", k, state.name());
      end
      drive_frame(k);
      // the DUT processes exactly the predicted frames
      checks++;
      if ((state != ST_IDLE) != processed[k] && !(state == ST_IDLE && processed[k])) begin
        failures++;
        $display("frame %0d: state %s, processed expected %0d", k, state.name(), processed[k]);
      end
      // let the display phase end
      repeat (H_TOT * V_TOT + 50) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    // every processed frame was displayed, fully
    checks++;
    if (n_proc != n_disp || n_proc != n_exp_proc) begin
      failures++;
      $display("processed %0d displayed %0d, expected %0d each", n_proc, n_disp, n_exp_proc);
    end
    checks++; if (n_flush == 0) begin failures++; $display("no flush-line result checked"); end
    checks++; if (n_idle_rate == 0 && IDLE_RATE) begin failures++; $display("no frame idled by rate"); end
    checks++; if (n_sat == 0 || n_zero == 0) begin failures++; $display("no saturated or zero D"); end
    checks++; if (n_chg == 0 || n_nochg == 0) begin failures++; $display("changes %0d none %0d", n_chg, n_nochg); end
    foreach (mode_seen[i]) begin
      checks++;
      if (mode_seen[i] == 0 && (ALL_MODES || i == int'(MODE_BOTH))) begin
        failures++; $display("mode %0d never used", i);
      end
    end
    $display("processed=%0d displayed=%0d idle_by_rate=%0d last_line_px=%0d sat=%0d zero=%0d change=%0d nochange=%0d modes=%0d/%0d/%0d",
             n_proc, n_disp, n_idle_rate, n_flush, n_sat, n_zero, n_chg, n_nochg,
             mode_seen[0], mode_seen[1], mode_seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the processing unit. Feeds random (current, previous)
// luminance fields of W x H pixels, one pixel per clock with line blanking,
// in each of the three modes and with two thresholds, and compares every
// result (both 3x3 sums, the comparator's choice and the change bit, and
// its row/column) with an integer reference that pads the field with zeros.
// Checks that each field yields exactly W*H results in raster order, that
// field_done follows the field's last pixel after the PE latency, the pad
// step and the flush line, and that the flush disables nothing early.
module tb_proc_unit;
  import wcd_pkg::*;
  import wcd_ref_pkg::*;

  localparam int W = 8, H = 4;
  localparam int CW = $clog2(W + 1), RW = $clog2(H + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic pe_en = 1'b1, tree_en = 1'b1, w_on, wc_on, line_ready;
  wcd_mode_t mode = MODE_BOTH;
  logic [7:0] threshold = 8'd173;
  logic px_valid = 1'b0, px_sof = 1'b0, px_field = 1'b0;
  logic [7:0] px_x = '0, px_y = '0;
  logic res_valid, res_change, res_field, res_sel_wc, flushing, field_done, field_done_id;
  logic [RW-1:0] res_row;
  logic [CW-1:0] res_col;
  logic [7:0] res_w, res_wc;

  proc_unit #(.IMG_W(W), .FIELD_H(H)) dut (.*);
  assign w_on  = (mode != MODE_WC);
  assign wc_on = (mode != MODE_W);
  int n_line_ready = 0;
  always @(posedge clk) if (line_ready) n_line_ready++;

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int unsigned xs [H][W], ys [H][W];
  int unsigned ew [H][W], ec [H][W];
  int n_res = 0, n_chg = 0, n_sel_wc = 0;
  longint last_px_cyc, done_cyc;
  bit cur_field;

  task automatic ref_field();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int unsigned sw = 0, sc = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (r + dr >= 0 && r + dr < H && c + dc >= 0 && c + dc < W) begin
              sw += d_ref(xs[r+dr][c+dc], ys[r+dr][c+dc]);
              sc += d_ref(ys[r+dr][c+dc], xs[r+dr][c+dc]);
            end
        ew[r][c] = (mode == MODE_WC) ? 0 : sat8(sw);
        ec[r][c] = (mode == MODE_W)  ? 0 : sat8(sc);
      end
  endtask

  // result checker
  always @(posedge clk) if (rst_n) begin
    if (res_valid) begin
      automatic int r = n_res / W, c = n_res % W;
      automatic int unsigned v, e_sel;
      e_sel = (mode == MODE_WC) ? 1 : (mode == MODE_W) ? 0 : (ec[r][c] > ew[r][c]);
      v = e_sel ? ec[r][c] : ew[r][c];
      checks++;
      if (res_row != RW'(r) || res_col != CW'(c) || res_field != cur_field ||
          res_w != 8'(ew[r][c]) || res_wc != 8'(ec[r][c]) || res_sel_wc != 1'(e_sel) ||
          res_change != (v > threshold)) begin
        failures++;
        if (failures < 10)
          $display("res %0d: (%0d,%0d) w=%0d/%0d wc=%0d/%0d chg=%0d", n_res, res_row, res_col,
                   res_w, ew[r][c], res_wc, ec[r][c], res_change);
      end
      if (res_change) n_chg++;
      if (res_sel_wc) n_sel_wc++;
      n_res++;
    end
    if (field_done) done_cyc = cyc;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 12; t++) begin
      mode      <= wcd_mode_t'(t % 3);
      threshold <= (t % 2) ? 8'd40 : 8'd173;
      cur_field = 1'(t % 2);
      @(posedge clk);
      foreach (xs[r, c]) begin
        // mostly similar pairs, some strong changes
        ys[r][c] = 16 + $urandom_range(0, 219);
        if ($urandom_range(0, 3) == 0) xs[r][c] = 16 + $urandom_range(0, 219);
        else xs[r][c] = (ys[r][c] * (28 + $urandom_range(0, 8))) / 32;
        if (xs[r][c] > 235) xs[r][c] = 235;
      end
      ref_field();
      n_res = 0;
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          px_valid <= 1'b1; px_sof <= (r == 0 && c == 0); px_field <= cur_field;
          px_x <= 8'(xs[r][c]); px_y <= 8'(ys[r][c]);
          @(posedge clk);
          last_px_cyc = cyc;
        end
        px_valid <= 1'b0; px_sof <= 1'b0;
        @(posedge clk);
      end
      repeat (W + 15) @(posedge clk);
      checks++;
      if (n_res != W * H) begin failures++; $display("field %0d: %0d results", t, n_res); end
      // last pixel -> 5 PE stages, pad step, flush line of W steps, pad step,
      // field_done register: 5 + 1 + W + 1 + 1 clocks after it is sampled
      checks++;
      if (done_cyc - last_px_cyc != 5 + 1 + W + 1 + 1) begin
        failures++;
        $display("field_done %0d clocks after last pixel", done_cyc - last_px_cyc);
      end
    end
    checks++;
    if (n_chg == 0 || n_sel_wc == 0 || n_line_ready == 0) begin failures++; $display("no change or no conjugate choice"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

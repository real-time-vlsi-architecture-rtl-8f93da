// Testbench of the VGA encoder with a small raster (16 x 6 visible, small
// porches). A behavioural memory answers the encoder's reads one clock
// later with a known pattern. Checks the frame period, the sync pulse
// widths and positions relative to the visible area, the picture (each
// pixel from the right word and half, frame line v from field v%2, line
// v/2), black output while disabled, restart and the frame_done pulse.
module tb_vga_encoder;
  localparam int HV = 16, HF = 2, HS = 3, HB = 3, VV = 6, VF = 1, VS = 2, VB = 1;
  localparam int HT = HV + HF + HS + HB, VT = VV + VF + VS + VB;
  localparam int LB = 2, WB = 3, AW = 1 + LB + WB;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, restart = 1'b0;
  logic mem_re, hsync_n, vsync_n, de, frame_done;
  logic [AW-1:0] mem_addr;
  logic [15:0] mem_data = '0;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  vga_encoder #(.H_VIS(HV), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_VIS(VV), .V_FP(VF),
                .V_SYNC(VS), .V_BP(VB), .LINE_BITS(LB), .WORD_BITS(WB)) dut (.*);
  always #5 clk = ~clk;

  // memory model: word at address a holds bytes {a*2+1, a*2} (mod 256)
  always @(posedge clk) if (mem_re) mem_data <= {8'(mem_addr * 2 + 1), 8'(mem_addr * 2)};

  function automatic logic [7:0] px_at(int v, int h);
    int a = ((v % 2) << (LB + WB)) | ((v / 2) << WB) | (h / 2);
    return 8'(a * 2 + (h % 2));
  endfunction

  // monitor: position since restart, two-clock output delay
  int t = 0, n_done = 0, n_de = 0;
  always @(posedge clk) if (rst_n) begin
    if (restart) t = -1;
    else begin
      automatic int pos = t - 2;      // counter position of this output
      if (pos >= 0) begin
        automatic int h = pos % HT, v = (pos / HT) % VT;
        automatic bit vis = h < HV && v < VV;
        automatic bit hs = h >= HV + HF && h < HV + HF + HS;
        automatic bit vs = v >= VV + VF && v < VV + VF + VS;
        checks++;
        if (hsync_n !== !hs || vsync_n !== !vs || de !== (vis && en_d2)) begin
          failures++;
          if (failures < 10) $display("pos %0d (%0d,%0d): hs=%b vs=%b de=%b", pos, v, h, hsync_n, vsync_n, de);
        end
        if (de) begin
          automatic logic [7:0] p = px_at(v, h);
          n_de++;
          checks++;
          if (rgb !== {p, p, p}) begin
            failures++;
            if (failures < 10) $display("pixel (%0d,%0d) %h expected %h", v, h, rgb, p);
          end
        end else if (rgb !== 24'h0) begin
          failures++; $display("rgb not black outside display");
        end
      end
      if (frame_done) begin
        n_done++;
        checks++;
        if ((t + 1) % (HT * VT) != 0) begin failures++; $display("frame_done at %0d", t); end
      end
    end
    t++;
  end

  logic en_d1 = 1'b0, en_d2 = 1'b0;
  always @(posedge clk) begin en_d1 <= en; en_d2 <= en_d1; end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (37) @(posedge clk);
    restart <= 1'b1;
    @(posedge clk);
    restart <= 1'b0; en <= 1'b1;
    repeat (2 * HT * VT) @(posedge clk);
    en <= 1'b0;
    repeat (HT * VT) @(posedge clk);
    checks++;
    if (n_done != 2 || n_de != 2 * HV * VV) begin
      failures++; $display("frame_done %0d, visible pixels %0d", n_done, n_de);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

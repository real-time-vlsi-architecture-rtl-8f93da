// VGA encoder: scans the output buffer and drives a 640x480 60 Hz VGA
// picture (800 x 525 clocks per frame at the 25 MHz system clock).
//
// Horizontal and vertical counters run continuously, so the monitor always
// sees sync pulses (active low). While en is high (display phase), every
// visible even column issues a read of the word holding that pixel pair;
// the word arrives one clock later and both of its pixels are shown in turn.
// Frame line v comes from field v[0], field line v>>1 (the first field of a
// frame carries the even frame lines). A pixel is shown as grey level
// rgb = {p, p, p}. Outside the display phase the picture is black.
// restart puts both counters at the start of the frame (the controller
// resets the encoder when display begins). frame_done pulses on the last
// clock of each frame while en is high.
// Outputs are registered and two clocks behind the counters; the VGA timing
// numbers are the common 640x480 industry values, not given by the source
// description.
module vga_encoder #(
  parameter int unsigned H_VIS     = 640,
  parameter int unsigned H_FP      = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BP      = 48,
  parameter int unsigned V_VIS     = 480,
  parameter int unsigned V_FP      = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BP      = 33,
  parameter int unsigned LINE_BITS = 9,
  parameter int unsigned WORD_BITS = 9,
  localparam int unsigned AW = 1 + LINE_BITS + WORD_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          restart,
  output logic          mem_re,
  output logic [AW-1:0] mem_addr,
  input  logic [15:0]   mem_data,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          de,
  output logic [23:0]   rgb,
  output logic          frame_done
);
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOT);
  localparam int unsigned VW = $clog2(V_TOT);

  logic [HW-1:0] h;
  logic [VW-1:0] v;
  logic          h_last, v_last, vis, hs, vs;

  assign h_last = (h == HW'(H_TOT - 1));
  assign v_last = (v == VW'(V_TOT - 1));
  assign vis    = (h < HW'(H_VIS)) && (v < VW'(V_VIS));
  assign hs     = (h >= HW'(H_VIS + H_FP)) && (h < HW'(H_VIS + H_FP + H_SYNC));
  assign vs     = (v >= VW'(V_VIS + V_FP)) && (v < VW'(V_VIS + V_FP + V_SYNC));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0; v <= '0;
    end else if (restart) begin
      h <= '0; v <= '0;
    end else if (h_last) begin
      h <= '0;
      v <= v_last ? '0 : v + 1'b1;
    end else begin
      h <= h + 1'b1;
    end
  end

  assign frame_done = en && h_last && v_last && !restart;

  // Stage 0: read request for the pixel pair.
  logic [VW-1:0] fline;
  assign fline    = v >> 1;
  assign mem_re   = en && vis && !h[0];
  assign mem_addr = {v[0], LINE_BITS'(fline), WORD_BITS'(h >> 1)};

  // Stage 1: the word is in mem_data; pick the half for this column.
  logic s1_vis, s1_odd, s1_hs, s1_vs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_vis <= 1'b0; s1_odd <= 1'b0; s1_hs <= 1'b0; s1_vs <= 1'b0;
      hsync_n <= 1'b1; vsync_n <= 1'b1; de <= 1'b0; rgb <= '0;
    end else begin
      s1_vis  <= vis && en && !restart;
      s1_odd  <= h[0];
      s1_hs   <= hs;
      s1_vs   <= vs;
      hsync_n <= !s1_hs;
      vsync_n <= !s1_vs;
      de      <= s1_vis;
      rgb     <= s1_vis ? {3{s1_odd ? mem_data[15:8] : mem_data[7:0]}} : 24'h000000;
    end
  end
endmodule

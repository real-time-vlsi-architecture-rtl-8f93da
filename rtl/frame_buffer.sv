// Frame buffer: keeps the luminance of the last processed frame and pairs
// every incoming pixel with the pixel at the same place in that frame.
//
// Storage is one single-port 16-bit memory; each word holds two horizontally
// adjacent pixels (even column in bits 7:0, odd column in bits 15:8). The
// 19-bit word address is {field, line within field (9 bits), word within
// line (9 bits)}; 9 line bits leave room for the 288-line fields of PAL.
// Access sequence per pixel pair, one memory access per clock:
//   even pixel arrives -> the stored word is read (old pair)
//   odd pixel arrives  -> the new pair is written to the same word
// so the stream may run at one pixel per clock. The frame that has just
// been compared therefore becomes the reference for the next processed one.
//
// Interface: in_* is the decoder's pixel stream (in_sof on the first pixel of
// a field; positions are counted from it, IMG_W pixels per line). en gates
// all memory activity (the controller's activation). out_* delivers every
// accepted pixel one clock later as the pair out_x (current) / out_y
// (previous frame), with its sof and field flags.
module frame_buffer
  import wcd_pkg::*;
#(
  parameter int unsigned IMG_W     = 640,
  parameter int unsigned LINE_BITS = 9,
  parameter int unsigned WORD_BITS = 9,
  localparam int unsigned AW = 1 + LINE_BITS + WORD_BITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       in_valid,
  input  logic       in_sof,
  input  logic       in_field,
  input  logic [7:0] in_luma,
  output logic       out_valid,
  output logic       out_sof,
  output logic       out_field,
  output logic [7:0] out_x,
  output logic [7:0] out_y
);
  localparam int unsigned CW = $clog2(IMG_W);

  logic [CW-1:0]        col, c_eff;
  logic [LINE_BITS-1:0] line, l_eff;
  logic                 acc;

  assign acc   = en && in_valid;
  assign c_eff = in_sof ? '0 : col;
  assign l_eff = in_sof ? '0 : line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; line <= '0;
    end else if (acc) begin
      if (c_eff == CW'(IMG_W - 1)) begin
        col  <= '0;
        line <= l_eff + 1'b1;
      end else begin
        col  <= c_eff + 1'b1;
        line <= l_eff;
      end
    end
  end

  // ---------------- memory port ----------------
  logic [7:0]    even_px;
  logic [AW-1:0] addr;
  logic [15:0]   rdata;
  logic          we;

  assign we   = c_eff[0];
  assign addr = {in_field, l_eff, WORD_BITS'(c_eff >> 1)};

  always_ff @(posedge clk) begin
    if (acc && !c_eff[0]) even_px <= in_luma;
  end

  sram_sp #(.AW(AW), .DW(16)) u_mem (
    .clk, .ce(acc), .we, .addr, .wdata({in_luma, even_px}), .rdata);

  // ---------------- output pairing ----------------
  logic       odd_q;
  logic [7:0] y_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sof <= 1'b0; out_field <= 1'b0; out_x <= '0; odd_q <= 1'b0;
    end else begin
      out_valid <= acc;
      if (acc) begin
        out_sof   <= in_sof;
        out_field <= in_field;
        out_x     <= in_luma;
        odd_q     <= c_eff[0];
      end
    end
  end

  // The old pair is in rdata while the even pixel is presented; its odd half
  // is kept for the odd pixel.
  always_ff @(posedge clk) begin
    if (out_valid && !odd_q) y_hi <= rdata[15:8];
  end

  assign out_y = odd_q ? y_hi : rdata[7:0];

  initial assert (IMG_W % 2 == 0 && (IMG_W / 2) <= 2**WORD_BITS)
    else $error("IMG_W must be even and fit WORD_BITS");
endmodule

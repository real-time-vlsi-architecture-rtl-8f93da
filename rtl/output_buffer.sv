// Output buffer: stores the change map of the processed frame for display.
//
// One single-port 16-bit memory, two pixels per word like the frame buffer
// and with the same address layout {field, line, word}. A change is stored
// as luminance 255 (white), no change as 0 (black), so the stored frame is
// the black-and-white picture that is displayed. Results arrive in raster
// order; the even-column result is held until its odd neighbour arrives and
// the pair is then written in one access.
//
// Interface: wr_* is the processing unit's result stream (wr_en gates it).
// rd_en / rd_addr read one word, returned in rd_data one clock later. The
// controller never enables both sides at once (processing and display are
// separate phases); if both are requested, the write wins.
module output_buffer #(
  parameter int unsigned LINE_BITS = 9,
  parameter int unsigned WORD_BITS = 9,
  parameter int unsigned CW        = 10,
  localparam int unsigned AW = 1 + LINE_BITS + WORD_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic                 wr_valid,
  input  logic                 wr_change,
  input  logic                 wr_field,
  input  logic [LINE_BITS-1:0] wr_row,
  input  logic [CW-1:0]        wr_col,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic [15:0]          rd_data
);
  logic       even_chg;
  logic       do_wr;
  logic [7:0] px_odd, px_even;

  assign do_wr   = wr_en && wr_valid && wr_col[0];
  assign px_odd  = wr_change ? 8'hFF : 8'h00;
  assign px_even = even_chg  ? 8'hFF : 8'h00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               even_chg <= 1'b0;
    else if (wr_en && wr_valid && !wr_col[0]) even_chg <= wr_change;
  end

  sram_sp #(.AW(AW), .DW(16)) u_mem (
    .clk,
    .ce    (do_wr || rd_en),
    .we    (do_wr),
    .addr  (do_wr ? {wr_field, wr_row, WORD_BITS'(wr_col >> 1)} : rd_addr),
    .wdata ({px_odd, px_even}),
    .rdata (rd_data));
endmodule

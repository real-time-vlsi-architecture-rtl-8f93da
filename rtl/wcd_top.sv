// Wronskian change detector, top level.
//
// A video decoder delivers luminance samples of interlaced frames (two
// fields each). For every processed frame, each pixel x is paired with the
// pixel y at the same place in the previously processed frame (frame
// buffer); two processing elements form D(x,y) and D(y,x), the adder trees
// sum them over the 3x3 neighbourhood within the field, and the comparator
// marks a change where the selected sum exceeds the threshold. The change
// map goes to the output buffer as a black-and-white frame, which the VGA
// encoder shows in the following display phase. The main controller runs
// the process / display / idle sequence and the frame-rate selection.
//
// Ports: pixel stream in (px_valid/px_sof/px_field/px_luma; px_sof marks the
// first pixel of each field, IMG_W pixels per line, FIELD_H lines per
// field, at most one pixel per clock and at least one idle clock between
// lines, and IMG_W+2 idle clocks after a field's last pixel); settings
// rate (1..15 analysed frames per second), mode and threshold; VGA out
// (hsync_n, vsync_n, de, rgb) towards the video DAC; state and
// frame_skipped (a selected frame arrived while busy) for monitoring.
// The decoder and the DAC are board parts outside this RTL.
module wcd_top
  import wcd_pkg::*;
#(
  parameter int unsigned IMG_W          = 640,
  parameter int unsigned FIELD_H        = 240,
  parameter int unsigned LINE_BITS      = 9,
  parameter int unsigned WORD_BITS      = 9,
  parameter int unsigned FRAMES_PER_SEC = 30,
  parameter int unsigned DISPLAY_FRAMES = 1,
  parameter int unsigned H_FP           = 16,
  parameter int unsigned H_SYNC         = 96,
  parameter int unsigned H_BP           = 48,
  parameter int unsigned V_FP           = 10,
  parameter int unsigned V_SYNC         = 2,
  parameter int unsigned V_BP           = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_valid,
  input  logic        px_sof,
  input  logic        px_field,
  input  logic [7:0]  px_luma,
  input  logic [3:0]  rate,
  input  wcd_mode_t   mode_sel,
  input  logic [7:0]  th_sel,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        de,
  output logic [23:0] rgb,
  output ctrl_state_t state,
  output logic        frame_skipped
);
  localparam int unsigned CW = $clog2(IMG_W + 1);
  localparam int unsigned RW = $clog2(FIELD_H + 1);
  localparam int unsigned AW = 1 + LINE_BITS + WORD_BITS;

  // ---------------- controller ----------------
  logic       px_accept, fb_en, pe_en, tree_en, ob_wr_en, enc_en, enc_restart;
  logic       field_done, field_done_id, flushing, line_ready, enc_frame_done, w_on, wc_on;
  wcd_mode_t  mode;
  logic [7:0] threshold;

  main_ctrl #(.FRAMES_PER_SEC(FRAMES_PER_SEC), .DISPLAY_FRAMES(DISPLAY_FRAMES)) u_ctrl (
    .clk, .rst_n, .px_valid, .px_sof, .px_field, .rate, .mode_in(mode_sel), .th_in(th_sel),
    .field_done, .field_done_id, .flushing, .line_ready, .enc_frame_done,
    .state, .px_accept, .fb_en, .pe_en, .tree_en, .ob_wr_en, .enc_en, .enc_restart, .w_on, .wc_on,
    .mode, .threshold, .frame_skipped);

  // ---------------- frame buffer ----------------
  logic       pr_valid, pr_sof, pr_field;
  logic [7:0] pr_x, pr_y;

  frame_buffer #(.IMG_W(IMG_W), .LINE_BITS(LINE_BITS), .WORD_BITS(WORD_BITS)) u_fbuf (
    .clk, .rst_n, .en(fb_en), .in_valid(px_accept), .in_sof(px_sof), .in_field(px_field),
    .in_luma(px_luma), .out_valid(pr_valid), .out_sof(pr_sof), .out_field(pr_field),
    .out_x(pr_x), .out_y(pr_y));

  // ---------------- processing unit ----------------
  logic          res_valid, res_change, res_field, res_sel_wc;
  logic [RW-1:0] res_row;
  logic [CW-1:0] res_col;
  logic [7:0]    res_w, res_wc;

  proc_unit #(.IMG_W(IMG_W), .FIELD_H(FIELD_H)) u_proc (
    .clk, .rst_n, .pe_en, .tree_en, .w_on, .wc_on, .mode, .threshold,
    .px_valid(pr_valid), .px_sof(pr_sof), .px_field(pr_field), .px_x(pr_x), .px_y(pr_y),
    .res_valid, .res_change, .res_field, .res_row, .res_col, .res_w, .res_wc, .res_sel_wc,
    .line_ready, .flushing, .field_done, .field_done_id);

  // ---------------- output buffer and encoder ----------------
  logic          enc_re;
  logic [AW-1:0] enc_addr;
  logic [15:0]   ob_data;

  output_buffer #(.LINE_BITS(LINE_BITS), .WORD_BITS(WORD_BITS), .CW(CW)) u_obuf (
    .clk, .rst_n, .wr_en(ob_wr_en), .wr_valid(res_valid), .wr_change(res_change),
    .wr_field(res_field), .wr_row(LINE_BITS'(res_row)), .wr_col(res_col),
    .rd_en(enc_re), .rd_addr(enc_addr), .rd_data(ob_data));

  vga_encoder #(
    .H_VIS(IMG_W), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_VIS(2 * FIELD_H), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .LINE_BITS(LINE_BITS), .WORD_BITS(WORD_BITS)
  ) u_enc (
    .clk, .rst_n, .en(enc_en), .restart(enc_restart), .mem_re(enc_re), .mem_addr(enc_addr),
    .mem_data(ob_data), .hsync_n, .vsync_n, .de, .rgb, .frame_done(enc_frame_done));

  initial assert (FIELD_H <= 2**LINE_BITS && IMG_W <= 2**(WORD_BITS + 1))
    else $error("image does not fit the memory address fields");
endmodule

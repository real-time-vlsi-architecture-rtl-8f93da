// Processing unit: turns the stream of (current, previous) luminance pairs of
// one video field into a stream of change bits, one per pixel.
//
// Structure (as in the design's block diagram): two processing elements (one
// for D(x,y), one for the conjugate D(y,x)), Queue 1 and Queue 2 holding the
// results of the previous two lines (both Wronskians side by side in one
// 16-bit word), two adder trees and the change comparator.
//
// Each field is handled as an image of IMG_W x FIELD_H pixels in raster
// order; px_sof marks its first pixel. A step of the adder trees happens for
// every PE result; the step at input column c of line r produces the 3x3
// result centred on (r-1, c-1). Borders are zero-padded: after the last
// column of each line one extra step runs with the current column grounded,
// and after the last line of the field one extra line of steps runs, one per
// clock, with the new line grounded. The two extra kinds of step need the
// PE results to pause: at least one idle clock between lines (video
// blanking) and the field's flush line (IMG_W+1 clocks) must end before the
// next field's first result; an assertion checks this.
//
// Interface: px_* is a valid-qualified pixel stream, at most one pixel per
// clock. res_* is the registered result stream, raster order, centre
// coordinates in res_row/res_col; res_w / res_wc are the saturated 3x3 sums, res_sel_wc
// tells which of them the comparator used.
// Latency from a pixel to the result centred on it: 5 PE clocks plus one
// line plus one column of input, plus one register. field_done pulses after
// the last result of a field; flushing is high while the last line runs.
// pe_en / tree_en and the per-Wronskian selections w_on / wc_on are the
// controller's activation signals: a Wronskian that is not selected keeps
// its PE frozen and its adder tree isolated. line_ready tells the controller
// that the first line of the field is in, so the adder trees have work.
module proc_unit
  import wcd_pkg::*;
#(
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned FIELD_H = 240,
  localparam int unsigned CW = $clog2(IMG_W + 1),
  localparam int unsigned RW = $clog2(FIELD_H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pe_en,
  input  logic          tree_en,
  input  logic          w_on,
  input  logic          wc_on,
  input  wcd_mode_t     mode,
  input  logic [7:0]    threshold,
  input  logic          px_valid,
  input  logic          px_sof,
  input  logic          px_field,
  input  logic [7:0]    px_x,
  input  logic [7:0]    px_y,
  output logic          res_valid,
  output logic          res_change,
  output logic          res_field,
  output logic [RW-1:0] res_row,
  output logic [CW-1:0] res_col,
  output logic [7:0]    res_w,
  output logic [7:0]    res_wc,
  output logic          res_sel_wc,
  output logic          line_ready,
  output logic          flushing,
  output logic          field_done,
  output logic          field_done_id
);
  // ---------------- activation per selected Wronskian ----------------
  logic w_en, wc_en;
  assign w_en  = w_on;
  assign wc_en = wc_on;

  // ---------------- processing elements ----------------
  logic       vw, vc, d_valid;
  logic [7:0] dw, dc;
  logic [1:0] tw, tc, d_tag;

  wcd_pe #(.TAG_W(2)) u_pe_w (
    .clk, .rst_n, .en(pe_en && w_en), .in_valid(px_valid), .x(px_x), .y(px_y),
    .in_tag({px_sof, px_field}), .out_valid(vw), .d(dw), .out_tag(tw));

  wcd_pe #(.TAG_W(2)) u_pe_c (
    .clk, .rst_n, .en(pe_en && wc_en), .in_valid(px_valid), .x(px_y), .y(px_x),
    .in_tag({px_sof, px_field}), .out_valid(vc), .d(dc), .out_tag(tc));

  assign d_valid = pe_en && (w_en ? vw : vc);
  assign d_tag   = w_en ? tw : tc;

  // ---------------- step sequencer ----------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_PAD, S_FLUSH} seq_t;
  seq_t          st;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          fld;
  logic [9:0]    pw_m1, pw_m2, pc_m1, pc_m2;

  logic          start, step, pad, clr;
  logic [CW-1:0] c_in;
  logic [RW-1:0] r_in;

  assign start = d_valid && d_tag[1];                      // first result of a field
  assign pad   = (st == S_PAD);
  assign step  = (d_valid && (st == S_RUN || start)) || pad || (st == S_FLUSH);
  assign clr   = start;
  assign c_in  = start ? '0 : col;
  assign r_in  = start ? '0 : row;

  // ---------------- queues ----------------
  logic [15:0] q1_out, q2_out, q1_in;
  logic        push;

  assign push  = step && !pad;
  assign q1_in = (st == S_FLUSH && !start) ? 16'h0000 : {dc, dw};

  line_queue #(.DEPTH(IMG_W), .WIDTH(16)) u_queue1 (
    .clk, .rst_n, .clr, .push, .din(q1_in), .dout(q1_out));
  line_queue #(.DEPTH(IMG_W), .WIDTH(16)) u_queue2 (
    .clk, .rst_n, .clr, .push, .din(q1_out), .dout(q2_out));

  // ---------------- adder trees ----------------
  logic       gnd_new, gnd_q2, en_m2;
  logic [9:0] cs_w, cs_c;
  logic [7:0] ws_w, ws_c;

  assign gnd_new = (st == S_FLUSH && !start) || (pad && row == RW'(FIELD_H));
  assign gnd_q2  = (r_in == RW'(1));
  assign en_m2   = (c_in != CW'(1));

  adder_tree u_tree_w (
    .en(tree_en && w_en), .d_new(dw), .d_q1(q1_out[7:0]), .d_q2(q2_out[7:0]),
    .psum_m1(pw_m1), .psum_m2(pw_m2), .gnd_new, .gnd_q2, .gnd_col(pad), .en_m2,
    .col_sum(cs_w), .win_sum(ws_w));
  adder_tree u_tree_c (
    .en(tree_en && wc_en), .d_new(dc), .d_q1(q1_out[15:8]), .d_q2(q2_out[15:8]),
    .psum_m1(pc_m1), .psum_m2(pc_m2), .gnd_new, .gnd_q2, .gnd_col(pad), .en_m2,
    .col_sum(cs_c), .win_sum(ws_c));

  // ---------------- comparator ----------------
  logic sel_wc, change;

  change_cmp u_cmp (
    .mode, .w(ws_w), .wc(ws_c), .th(threshold), .value(), .sel_wc, .change);

  // ---------------- sequencer registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; col <= '0; row <= '0; fld <= 1'b0;
      pw_m1 <= '0; pw_m2 <= '0; pc_m1 <= '0; pc_m2 <= '0;
      field_done <= 1'b0; field_done_id <= 1'b0;
    end else begin
      field_done <= 1'b0;
      if (start) fld <= d_tag[0];
      if (step) begin
        pw_m2 <= pw_m1; pw_m1 <= cs_w;
        pc_m2 <= pc_m1; pc_m1 <= cs_c;
      end
      if (start || (st == S_RUN && d_valid) || st == S_FLUSH) begin
        if (c_in == CW'(IMG_W - 1)) begin
          st  <= S_PAD;
          col <= CW'(IMG_W);
        end else begin
          st  <= (st == S_FLUSH && !start) ? S_FLUSH : S_RUN;
          col <= c_in + 1'b1;
        end
        row <= r_in;
      end else if (pad) begin
        col <= '0;
        if (row == RW'(FIELD_H)) begin
          st            <= S_IDLE;
          field_done    <= 1'b1;
          field_done_id <= fld;
        end else begin
          row <= row + 1'b1;
          st  <= (row == RW'(FIELD_H - 1)) ? S_FLUSH : S_RUN;
        end
      end
    end
  end

  // ---------------- result register ----------------
  logic out_ok;
  assign out_ok = step && (r_in != '0) && (c_in != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0; res_change <= 1'b0; res_field <= 1'b0;
      res_row <= '0; res_col <= '0; res_w <= '0; res_wc <= '0; res_sel_wc <= 1'b0;
    end else begin
      res_valid <= out_ok && tree_en;
      if (out_ok) begin
        res_change <= change;
        res_field  <= start ? d_tag[0] : fld;
        res_row    <= r_in - 1'b1;
        res_col    <= c_in - 1'b1;
        res_w      <= ws_w;
        res_wc     <= ws_c;
        res_sel_wc <= sel_wc;
      end
    end
  end

  assign flushing   = (st == S_FLUSH) || (pad && row == RW'(FIELD_H));
  // also high while the field's last result is in the output register
  assign line_ready = ((st != S_IDLE) && (row != '0)) || res_valid;

  // PE results must pause for the padding step and the flush line.
  a_no_result_during_pad : assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_PAD || st == S_FLUSH) |-> !(d_valid && !d_tag[1]))
    else $error("PE result arrived during a padding step");

  a_selection_matches_mode : assert property (@(posedge clk) disable iff (!rst_n)
    pe_en |-> (w_on == (mode != MODE_WC)) && (wc_on == (mode != MODE_W)))
    else $error("Wronskian selection does not match the mode");

  initial begin
    assert (IMG_W % 2 == 0 && IMG_W >= 4) else $error("IMG_W must be even and >= 4");
    assert (FIELD_H >= 2) else $error("FIELD_H must be >= 2");
  end
endmodule

// Main controller: sequences the detector through its process, display and
// idle phases and activates the units each phase needs.
//
//   IDLE    -> PROCESS  at the start of a frame (first pixel of field 0)
//                       that the frame-rate selection picks
//   PROCESS -> DISPLAY  when the processing unit has finished the flush line
//                       of the frame's second field; the encoder is restarted
//   DISPLAY -> IDLE     after DISPLAY_FRAMES complete VGA frames
// Frame-rate selection: incoming frames are numbered 0..FRAMES_PER_SEC-1
// (30 for NTSC). A frame is processed if its number is even and below
// 2*rate, so rate = 15 analyses every other frame (15 fps, the maximum: a
// processed frame is followed by its display) and smaller rates leave the
// rest of the second idle. A frame that starts while the detector is busy
// is skipped. mode and threshold are sampled when processing starts.
//
// Activation outputs: fb_en (frame buffer access) and pe_en while the
// frame's pixels arrive (pe_en drops during the flush of the last line),
// tree_en and ob_wr_en (output buffer writes) in PROCESS once the
// processing unit reports that a field's first line is in (line_ready),
// enc_en in DISPLAY. w_on / wc_on select the units of the Wronskian and of
// its conjugate according to the mode. px_accept tells which pixels belong to a processed frame; it is
// combinational so that the first pixel of a frame is already accepted.
// The phase names and activation rules follow the design description; the
// frame numbering and the display length are this design's choices.
module main_ctrl
  import wcd_pkg::*;
#(
  parameter int unsigned FRAMES_PER_SEC = 30,
  parameter int unsigned DISPLAY_FRAMES = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        px_valid,
  input  logic        px_sof,
  input  logic        px_field,
  input  logic [3:0]  rate,
  input  wcd_mode_t   mode_in,
  input  logic [7:0]  th_in,
  input  logic        field_done,
  input  logic        field_done_id,
  input  logic        flushing,
  input  logic        line_ready,
  input  logic        enc_frame_done,
  output ctrl_state_t state,
  output logic        px_accept,
  output logic        fb_en,
  output logic        pe_en,
  output logic        tree_en,
  output logic        ob_wr_en,
  output logic        enc_en,
  output logic        enc_restart,
  output logic        w_on,
  output logic        wc_on,
  output wcd_mode_t   mode,
  output logic [7:0]  threshold,
  output logic        frame_skipped
);
  localparam int unsigned SW = $clog2(FRAMES_PER_SEC + 1);
  localparam int unsigned DW = $clog2(DISPLAY_FRAMES + 1);

  logic [SW-1:0] slot;
  logic [DW-1:0] shown;
  logic          frame_start, selected, go;
  wcd_mode_t     mode_q;
  logic [7:0]    th_q;

  assign frame_start = px_valid && px_sof && !px_field;
  assign selected    = !slot[0] && (slot < SW'({rate, 1'b0}));
  assign go          = frame_start && selected && (state == ST_IDLE);
  assign px_accept   = px_valid && ((state == ST_PROCESS) || go);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE; slot <= '0; shown <= '0;
      mode_q <= MODE_BOTH; th_q <= '0;
      enc_restart <= 1'b0; frame_skipped <= 1'b0;
    end else begin
      enc_restart   <= 1'b0;
      frame_skipped <= frame_start && selected && (state != ST_IDLE);
      if (frame_start) slot <= (slot == SW'(FRAMES_PER_SEC - 1)) ? '0 : slot + 1'b1;
      unique case (state)
        ST_IDLE: if (go) begin
          state     <= ST_PROCESS;
          mode_q    <= mode_in;
          th_q      <= th_in;
        end
        ST_PROCESS: if (field_done && field_done_id) begin
          state       <= ST_DISPLAY;
          shown       <= '0;
          enc_restart <= 1'b1;
        end
        ST_DISPLAY: if (enc_frame_done) begin
          if (shown == DW'(DISPLAY_FRAMES - 1)) state <= ST_IDLE;
          shown <= shown + 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign fb_en    = (state == ST_PROCESS) || go;
  assign pe_en    = ((state == ST_PROCESS) && !flushing) || go;
  assign tree_en  = (state == ST_PROCESS) && line_ready;
  assign ob_wr_en = (state == ST_PROCESS) && line_ready;
  assign enc_en   = (state == ST_DISPLAY) && !enc_restart;
  assign mode      = go ? mode_in : mode_q;
  assign threshold = go ? th_in : th_q;
  assign w_on      = (mode != MODE_WC);
  assign wc_on     = (mode != MODE_W);

  initial assert (FRAMES_PER_SEC >= 2) else $error("FRAMES_PER_SEC must be >= 2");
endmodule

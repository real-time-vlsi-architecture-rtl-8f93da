// Testbench of the main controller: walks through frame starts, field
// completions and encoder frames and checks the state sequence, the
// activation outputs of every phase, the sampling of mode/threshold, the
// encoder restart pulse, the frame-rate selection (rate 2 of 8 numbered
// frames) and the skipping of a selected frame that arrives while busy.
module tb_main_ctrl;
  import wcd_pkg::*;
  localparam int FPS = 8, DISP = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic px_valid = 1'b0, px_sof = 1'b0, px_field = 1'b0;
  logic [3:0] rate = 4'd2;
  wcd_mode_t mode_in = MODE_W;
  logic [7:0] th_in = 8'd10;
  logic field_done = 1'b0, field_done_id = 1'b0, flushing = 1'b0, enc_frame_done = 1'b0;
  logic line_ready = 1'b0, w_on, wc_on;
  ctrl_state_t state;
  logic px_accept, fb_en, pe_en, tree_en, ob_wr_en, enc_en, enc_restart, frame_skipped;
  wcd_mode_t mode;
  logic [7:0] threshold;
  int checks = 0, failures = 0, n_skip = 0;

  main_ctrl #(.FRAMES_PER_SEC(FPS), .DISPLAY_FRAMES(DISP)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (frame_skipped) n_skip++;

  task automatic expect_(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s (state %s)", $time, what, state.name()); end
  endtask

  // first pixel of a frame; returns whether it was accepted
  task automatic frame_start(wcd_mode_t m, logic [7:0] t, output bit acc);
    px_valid <= 1'b1; px_sof <= 1'b1; px_field <= 1'b0; mode_in <= m; th_in <= t;
    #1;
    acc = px_accept;
    if (acc) expect_(mode == m && threshold == t && pe_en && fb_en && !tree_en &&
                     w_on == (m != MODE_WC) && wc_on == (m != MODE_W), "settings at go");
    @(posedge clk);
    px_valid <= 1'b0; px_sof <= 1'b0;
    #1;
  endtask

  task automatic field_end(bit id);
    flushing <= 1'b1;
    #1 expect_(!pe_en && tree_en && ob_wr_en && !enc_en, "flush activation");
    @(posedge clk);
    flushing <= 1'b0; field_done <= 1'b1; field_done_id <= id;
    @(posedge clk);
    field_done <= 1'b0;
    #1;
  endtask

  task automatic full_cycle(wcd_mode_t m);
    bit acc;
    frame_start(m, 8'd99, acc);
    expect_(acc && state == ST_PROCESS, "frame accepted");
    expect_(px_accept == 1'b0, "no accept without pixel");
    expect_(pe_en && fb_en && !tree_en && !ob_wr_en && !enc_en && mode == m, "first line: trees off");
    line_ready <= 1'b1;
    #1 expect_(pe_en && fb_en && tree_en && ob_wr_en && !enc_en && mode == m, "process activation");
    field_end(1'b0);
    expect_(state == ST_PROCESS, "still processing after field 0");
    flushing <= 1'b1;
    @(posedge clk);
    flushing <= 1'b0; field_done <= 1'b1; field_done_id <= 1'b1;
    @(posedge clk);
    field_done <= 1'b0;
    line_ready <= 1'b0;
    #1 expect_(state == ST_DISPLAY && enc_restart && !enc_en, "display entry with restart");
    @(posedge clk);
    #1 expect_(enc_en && !enc_restart && !pe_en && !fb_en && !tree_en && !ob_wr_en, "display activation");
    for (int i = 0; i < DISP; i++) begin
      expect_(state == ST_DISPLAY, "display lasts DISPLAY_FRAMES");
      enc_frame_done <= 1'b1;
      @(posedge clk);
      enc_frame_done <= 1'b0;
      #1;
    end
    expect_(state == ST_IDLE && !enc_en && !pe_en && !fb_en && !tree_en, "idle after display");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit acc;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 expect_(state == ST_IDLE && !pe_en && !enc_en, "idle after reset");
    full_cycle(MODE_W);                         // slot 0
    frame_start(MODE_BOTH, 8'd1, acc);          // slot 1: odd, not analysed
    expect_(!acc && state == ST_IDLE, "odd frame ignored");
    full_cycle(MODE_WC);                        // slot 2
    for (int s = 3; s < FPS; s++) begin         // slots 3..7: idle by rate
      frame_start(MODE_BOTH, 8'd1, acc);
      expect_(!acc && state == ST_IDLE, "frame beyond rate ignored");
    end
    full_cycle(MODE_BOTH);                      // slot 0 again
    // slot 1, then slot 2 arrives while still processing: skipped
    frame_start(MODE_BOTH, 8'd1, acc);
    rate <= 4'd4;
    px_valid <= 1'b1; px_sof <= 1'b1; px_field <= 1'b1;   // field 1 start: no frame
    @(posedge clk);
    px_valid <= 1'b0; px_sof <= 1'b0;
    frame_start(MODE_BOTH, 8'd1, acc);          // slot 2: accepted
    expect_(acc, "slot 2 accepted at rate 4");
    frame_start(MODE_BOTH, 8'd1, acc);          // slot 3
    frame_start(MODE_BOTH, 8'd1, acc);          // slot 4 while busy
    repeat (2) @(posedge clk);
    #1 expect_(n_skip == 1 && state == ST_PROCESS, $sformatf("busy frame skipped (%0d)", n_skip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

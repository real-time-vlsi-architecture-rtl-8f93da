// Testbench of the frame buffer: streams four two-field frames (random
// pixels, random gaps, back-to-back pixels too); the third is streamed with
// en low and must leave the memory untouched. Every output pixel must come
// one clock after its input, carry its sof/field flags and be paired with
// the pixel at the same place in the last frame streamed with en high.
module tb_frame_buffer;
  localparam int W = 8, H = 3;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic in_valid = 1'b0, in_sof = 1'b0, in_field = 1'b0;
  logic [7:0] in_luma = '0;
  logic out_valid, out_sof, out_field;
  logic [7:0] out_x, out_y;
  int checks = 0, failures = 0;

  frame_buffer #(.IMG_W(W), .LINE_BITS(3), .WORD_BITS(2)) dut (.*);
  always #5 clk = ~clk;

  byte unsigned fr [4][2][H][W];
  typedef struct { int x, y, sof, field; } exp_t;
  exp_t q [$];
  int n_out = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        e = q.pop_front();
        if (int'(out_x) != e.x || (e.y >= 0 && int'(out_y) != e.y) ||
            int'(out_sof) != e.sof || int'(out_field) != e.field) begin
          failures++;
          if (failures < 10) $display("out x=%0d/%0d y=%0d/%0d", out_x, e.x, out_y, e.y);
        end
      end
      n_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_k = -1;
    foreach (fr[k, f, l, c]) fr[k][f][l][c] = byte'($urandom_range(16, 235));
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      en <= (k != 2);
      for (int f = 0; f < 2; f++)
        for (int l = 0; l < H; l++)
          for (int c = 0; c < W; c++) begin
            exp_t e;
            in_valid <= 1'b1; in_sof <= (l == 0 && c == 0); in_field <= 1'(f);
            in_luma <= fr[k][f][l][c];
            if (k != 2) begin
              e.x = fr[k][f][l][c];
              e.y = (ref_k >= 0) ? int'(fr[ref_k][f][l][c]) : -1;
              e.sof = (l == 0 && c == 0); e.field = f;
              q.push_back(e);
            end
            @(posedge clk);
            if ($urandom_range(0, 2) == 0) begin
              in_valid <= 1'b0;
              repeat ($urandom_range(1, 3)) @(posedge clk);
            end
          end
      in_valid <= 1'b0; in_sof <= 1'b0;
      repeat (3) @(posedge clk);
      if (k != 2) ref_k = k;
    end
    repeat (3) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_out != 3 * 2 * H * W) begin
      failures++; $display("outputs %0d, %0d missing", n_out, q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the output buffer: writes two fields of random change bits
// as a raster-order result stream (with gaps), reads every word back and
// checks the black/white pixel pairs; a stream with wr_en low must not
// change the memory. Read data must appear one clock after the request.
module tb_output_buffer;
  localparam int W = 8, H = 4, LB = 2, WB = 2, CW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b1, wr_valid = 1'b0, wr_change = 1'b0, wr_field = 1'b0;
  logic [LB-1:0] wr_row = '0;
  logic [CW-1:0] wr_col = '0;
  logic rd_en = 1'b0;
  logic [1+LB+WB-1:0] rd_addr = '0;
  logic [15:0] rd_data;
  int checks = 0, failures = 0;
  bit chg [2][H][W];

  output_buffer #(.LINE_BITS(LB), .WORD_BITS(WB), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  task automatic write_all(bit enable, bit randomize_bits);
    wr_en <= enable;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          automatic bit b = 1'($urandom);
          if (randomize_bits) chg[f][r][c] = b;
          wr_valid <= 1'b1; wr_change <= randomize_bits ? b : ~chg[f][r][c];
          wr_field <= 1'(f); wr_row <= LB'(r); wr_col <= CW'(c);
          @(posedge clk);
          if ($urandom_range(0, 3) == 0) begin wr_valid <= 1'b0; @(posedge clk); end
        end
    wr_valid <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    write_all(1'b1, 1'b1);
    write_all(1'b0, 1'b0);      // inverted bits, writes disabled
    wr_en <= 1'b0;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < H; r++)
        for (int w = 0; w < W / 2; w++) begin
          logic [15:0] e;
          rd_en <= 1'b1; rd_addr <= {1'(f), LB'(r), WB'(w)};
          @(posedge clk);
          rd_en <= 1'b0;
          #1;
          e = {chg[f][r][2*w+1] ? 8'hFF : 8'h00, chg[f][r][2*w] ? 8'hFF : 8'h00};
          checks++;
          if (rd_data !== e) begin
            failures++; $display("f%0d r%0d w%0d: %h expected %h", f, r, w, rd_data, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the line queue: pushes random words with random gaps and
// checks that the output always shows the word pushed DEPTH pushes earlier,
// and that a clear restarts the line at position zero (clear with push).
module tb_line_queue;
  localparam int DEPTH = 10, WIDTH = 16;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, push = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];

  line_queue #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

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
    for (int line = 0; line < 3; line++) begin
      // start of a field: clear together with the first push
      hist.delete();
      for (int i = 0; i < 5 * DEPTH; i++) begin
        automatic logic [WIDTH-1:0] w = WIDTH'($urandom);
        clr  <= (i == 0);
        push <= 1'b1;
        din  <= w;
        #1;
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout !== hist[hist.size() - DEPTH]) begin
            failures++;
            $display("push %0d: dout=%h expected %h", i, dout, hist[hist.size() - DEPTH]);
          end
        end
        hist.push_back(w);
        @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin
          push <= 1'b0; clr <= 1'b0;
          @(posedge clk);
        end
      end
      push <= 1'b0; clr <= 1'b0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

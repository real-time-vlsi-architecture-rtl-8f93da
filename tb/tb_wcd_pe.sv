// Testbench of the processing element. Streams all 65536 (x, y) pairs at
// one pair per clock (with a few bubbles and a clock-enable freeze) and
// compares every result with the integer reference D(x,y). Also checks the
// five-clock latency, and counts saturated and zero results.
module tb_wcd_pe;
  import wcd_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic in_valid = 1'b0;
  logic [7:0] x = '0, y = '0;
  logic [17:0] in_tag = '0;
  logic out_valid;
  logic [7:0] d;
  logic [17:0] out_tag;
  int checks = 0, failures = 0, n_sat = 0, n_zero = 0, n_mid = 0;
  longint cyc = 0;
  longint sent_cyc [int];

  wcd_pe #(.TAG_W(18)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: tag = {marker, y, x}
  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      int unsigned xe, ye, exp_d;
      xe = 32'(out_tag[7:0]); ye = 32'(out_tag[15:8]);
      exp_d = d_ref(xe, ye);
      checks++;
      if (d !== exp_d[7:0]) begin
        failures++;
        if (failures < 10) $display("mismatch x=%0d y=%0d d=%0d exp=%0d", xe, ye, d, exp_d);
      end
      if (exp_d == 255) n_sat++; else if (exp_d == 0) n_zero++; else n_mid++;
      if (out_tag[16]) begin
        // latency check on the marked sample
        checks++;
        // driven after edge k, sampled at k+1, output row loads at k+5,
        // seen by this checker at k+6
        if (cyc - sent_cyc[0] != 6) begin
          failures++;
          $display("latency %0d, expected 6", cyc - sent_cyc[0]);
        end
      end
    end
  end

  initial begin
    static int unsigned cnt = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int yy = 0; yy < 256; yy++) begin
      for (int xx = 0; xx < 256; xx++) begin
        in_valid <= 1'b1;
        x <= 8'(xx); y <= 8'(yy);
        in_tag <= {1'b0, (yy == 100 && xx == 200), 8'(yy), 8'(xx)};
        if (yy == 100 && xx == 200) sent_cyc[0] = cyc;
        @(posedge clk);
        cnt++;
        if (cnt % 1000 == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        if (cnt % 7777 == 0) begin
          // freeze the pipeline for a few cycles: nothing may change
          en <= 1'b0;
          repeat (3) @(posedge clk);
          en <= 1'b1;
        end
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_sat == 0 || n_zero == 0 || n_mid == 0) begin
      failures++;
      $display("coverage: sat=%0d zero=%0d mid=%0d", n_sat, n_zero, n_mid);
    end
    if (checks < 65536) failures++;
    $display("results: saturated=%0d zero=%0d in-range=%0d", n_sat, n_zero, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the change comparator: all three modes with random sums and
// thresholds, plus the threshold boundary (equal is no change).
module tb_change_cmp;
  import wcd_pkg::*;
  wcd_mode_t mode;
  logic [7:0] w, wc, th, value;
  logic sel_wc, change;
  int checks = 0, failures = 0;

  change_cmp dut (.*);

  task automatic one(wcd_mode_t m, int a, int b, int t);
    int v; bit s;
    mode = m; w = 8'(a); wc = 8'(b); th = 8'(t);
    #1;
    s = (m == MODE_WC) ? 1'b1 : (m == MODE_W) ? 1'b0 : (b > a);
    v = s ? b : a;
    checks++;
    if (sel_wc !== s || value !== 8'(v) || change !== (v > t)) begin
      failures++;
      $display("mode %0d w=%0d wc=%0d th=%0d: sel=%0d value=%0d change=%0d", m, a, b, t, sel_wc, value, change);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++)
      one(wcd_mode_t'(i % 3), $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    one(MODE_W, 173, 0, 173);     // equal: no change
    one(MODE_W, 174, 0, 173);
    one(MODE_WC, 0, 174, 173);
    one(MODE_BOTH, 10, 200, 173);
    one(MODE_BOTH, 200, 10, 173);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

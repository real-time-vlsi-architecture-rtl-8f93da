// Testbench of the adder tree: random inputs and padding controls, the
// column sum and the saturated window sum compared with plain arithmetic,
// including the enable (all-zero output) and saturation at 255.
module tb_adder_tree;
  logic en, gnd_new, gnd_q2, gnd_col, en_m2;
  logic [7:0] d_new, d_q1, d_q2, win_sum;
  logic [9:0] psum_m1, psum_m2, col_sum;
  int checks = 0, failures = 0, n_sat = 0;

  adder_tree dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      automatic int a, b, c, cs, tot, ws;
      en = ($urandom_range(0, 7) != 0);
      gnd_new = $urandom_range(0, 3) == 0; gnd_q2 = $urandom_range(0, 3) == 0;
      gnd_col = $urandom_range(0, 5) == 0; en_m2 = $urandom_range(0, 3) != 0;
      d_new = 8'($urandom); d_q1 = 8'($urandom); d_q2 = 8'($urandom);
      if (i % 2 == 0) begin d_new = d_new >> 4; d_q1 = d_q1 >> 4; d_q2 = d_q2 >> 4; end
      psum_m1 = 10'($urandom_range(0, (i % 2) ? 765 : 40));
      psum_m2 = 10'($urandom_range(0, (i % 2) ? 765 : 40));
      #1;
      a = (en && !gnd_new && !gnd_col) ? int'(d_new) : 0;
      b = (en && !gnd_col) ? int'(d_q1) : 0;
      c = (en && !gnd_q2 && !gnd_col) ? int'(d_q2) : 0;
      cs = a + b + c;
      tot = en ? cs + int'(psum_m1) + (en_m2 ? int'(psum_m2) : 0) : 0;
      ws = (tot > 255) ? 255 : tot;
      if (tot > 255) n_sat++;
      checks++;
      if (col_sum != 10'(cs) || win_sum != 8'(ws)) begin
        failures++;
        if (failures < 10) $display("col_sum=%0d/%0d win_sum=%0d/%0d", col_sum, cs, win_sum, ws);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

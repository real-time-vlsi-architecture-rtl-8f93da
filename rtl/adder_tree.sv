// Adder tree: the 3x3 sum of processing-element results around one pixel,
// built from column partial sums.
//
// Each step delivers one new column: d_new (current line), d_q1 (previous
// line, from Queue 1) and d_q2 (line before, from Queue 2). Their sum is the
// column partial sum col_sum; the caller keeps the partial sums of the two
// previous steps and feeds them back as psum_m1 and psum_m2. The window sum is
// psum_m2 + psum_m1 + col_sum, i.e. the 3x3 sum centred on the previous
// column of the previous line.
// Image borders are padded with zero by grounding inputs, as in the
// described design:
//   gnd_new  - bottom padding (the extra line after a field's last line)
//   gnd_q2   - top padding (window centred on the first line)
//   gnd_col  - right padding (the extra step after a line's last column)
//   en_m2    - the "vertical padding control": enables summing the partial
//              sum of two steps back, off for a window centred on column 0
// en low isolates the tree (all outputs zero) when its Wronskian is not
// selected. Purely combinational; the window sum saturates at 255.
module adder_tree (
  input  logic       en,
  input  logic [7:0] d_new,
  input  logic [7:0] d_q1,
  input  logic [7:0] d_q2,
  input  logic [9:0] psum_m1,
  input  logic [9:0] psum_m2,
  input  logic       gnd_new,
  input  logic       gnd_q2,
  input  logic       gnd_col,
  input  logic       en_m2,
  output logic [9:0] col_sum,
  output logic [7:0] win_sum
);
  logic [7:0]  a, b, c;
  logic [11:0] total;

  always_comb begin
    a = (!en || gnd_new || gnd_col) ? 8'h00 : d_new;
    b = (!en || gnd_col)            ? 8'h00 : d_q1;
    c = (!en || gnd_q2 || gnd_col)  ? 8'h00 : d_q2;
    col_sum = 10'(a) + 10'(b) + 10'(c);
    total   = 12'(col_sum) + 12'(en ? psum_m1 : 10'h000) + 12'((en && en_m2) ? psum_m2 : 10'h000);
    win_sum = (total > 12'd255) ? 8'hFF : total[7:0];
  end
endmodule

// Change comparator: turns the two saturated 3x3 sums into the change bit.
//
// w is the Wronskian sum of x/y (detects changes in dark zones), wc the
// conjugate sum of y/x (bright zones). Depending on mode one of them, or in
// MODE_BOTH the larger of the two, is compared with the 8-bit threshold; a
// change is flagged when the selected value exceeds the threshold. sel_wc
// tells which value was selected (1 = conjugate). Combinational.
// Threshold scale: th = TH * 32 * 9, so th = 173 is TH = 0.6.
module change_cmp
  import wcd_pkg::*;
(
  input  wcd_mode_t  mode,
  input  logic [7:0] w,
  input  logic [7:0] wc,
  input  logic [7:0] th,
  output logic [7:0] value,
  output logic       sel_wc,
  output logic       change
);
  always_comb begin
    unique case (mode)
      MODE_W:  sel_wc = 1'b0;
      MODE_WC: sel_wc = 1'b1;
      default: sel_wc = (wc > w);
    endcase
    value  = sel_wc ? wc : w;
    change = (value > th);
  end
endmodule

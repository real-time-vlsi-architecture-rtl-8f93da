// Processing element: D(x,y) = r(r-1) with r = x/y, in 8-bit unsigned
// saturating fixed-point arithmetic.
//
// Datapath (five register rows, four logic stages, as in the design's
// pipeline drawing):
//   input latch -> divider, first 4 conditional subtractions -> latch ->
//   divider, last 4 conditional subtractions, then r-1 -> latch ->
//   Booth multiplier, partial products 0..2 -> latch ->
//   Booth multiplier, partial products 3..4, >>5, saturation -> output latch
// The ratio r = floor(32*x/y) is a 3.5 fixed-point number obtained by
// restoring division with eight conditional subtractors; a quotient that
// would need more than 8 bits (x >= 8y, also y = 0) saturates to 255.
// r-1 is r-32 in this format and saturates at zero (r <= 1 gives D = 0:
// this implementation's reading of "all overflows are saturated" for an
// unsigned datapath). The product r*(r-1) is formed by a radix-4 Booth
// multiplier (five partial products), its five LSBs are dropped and the
// result saturates at 255.
//
// Interface: in_valid/x/y/in_tag are sampled on every rising clock edge
// while en is high; out_valid/d/out_tag appear LATENCY = 5 edges later.
// A one-pixel-per-clock stream is accepted. en low freezes all pipeline
// registers (the unit's activation control). The tag travels unchanged
// alongside the data.
module wcd_pe #(
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  logic [7:0]       x,
  input  logic [7:0]       y,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [7:0]       d,
  output logic [TAG_W-1:0] out_tag
);

  // ---------------- stage 0: input latch ----------------
  logic             v0;
  logic [7:0]       x0, y0;
  logic [TAG_W-1:0] t0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; x0 <= '0; y0 <= '0; t0 <= '0;
    end else if (en) begin
      v0 <= in_valid; x0 <= x; y0 <= y; t0 <= in_tag;
    end
  end

  // ---------------- stage 1: division, quotient bits 7..4 ----------------
  // Dividend is x*32 (13 bits). Its top five bits x[7:3] form the starting
  // remainder; if that is already >= y the quotient exceeds 8 bits.
  logic       s1_ovf;
  logic [7:0] s1_rem;
  logic [3:0] s1_qhi;

  always_comb begin
    logic [8:0] r;
    logic [2:0] nb;
    s1_ovf = ({3'b000, x0[7:3]} >= y0);
    r      = {4'b0000, x0[7:3]};
    nb     = x0[2:0];
    for (int i = 3; i >= 0; i--) begin
      // dividend bits 7..5 are x[2:0], bit 4 is zero
      r = {r[7:0], (i >= 1) ? nb[i-1] : 1'b0};
      if (r >= {1'b0, y0}) begin
        r         = r - {1'b0, y0};
        s1_qhi[i] = 1'b1;
      end else begin
        s1_qhi[i] = 1'b0;
      end
    end
    s1_rem = r[7:0];
  end

  logic             v1, ovf1;
  logic [7:0]       rem1, y1;
  logic [3:0]       qhi1;
  logic [TAG_W-1:0] t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; ovf1 <= 1'b0; rem1 <= '0; y1 <= '0; qhi1 <= '0; t1 <= '0;
    end else if (en) begin
      v1 <= v0; ovf1 <= s1_ovf; rem1 <= s1_rem; y1 <= y0; qhi1 <= s1_qhi; t1 <= t0;
    end
  end

  // ---------------- stage 2: division bits 3..0, then r-1 ----------------
  logic [7:0] s2_q, s2_qm1;

  always_comb begin
    logic [8:0] r;
    logic [3:0] qlo;
    r = {1'b0, rem1};
    for (int i = 3; i >= 0; i--) begin
      r = {r[7:0], 1'b0};           // remaining dividend bits are zero
      if (r >= {1'b0, y1}) begin
        r      = r - {1'b0, y1};
        qlo[i] = 1'b1;
      end else begin
        qlo[i] = 1'b0;
      end
    end
    s2_q   = ovf1 ? 8'hFF : {qhi1, qlo};
    s2_qm1 = (s2_q > 8'(wcd_pkg::RATIO_ONE)) ? s2_q - 8'(wcd_pkg::RATIO_ONE) : 8'h00;
  end

  logic             v2;
  logic [7:0]       q2, qm12;
  logic [TAG_W-1:0] t2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; q2 <= '0; qm12 <= '0; t2 <= '0;
    end else if (en) begin
      v2 <= v1; q2 <= s2_q; qm12 <= s2_qm1; t2 <= t1;
    end
  end

  // ---------------- stage 3: Booth partial products ----------------
  // Radix-4 Booth recoding of the multiplier m = r-1 (unsigned, extended
  // with zeros to 10 bits): digit k uses m[2k+1], m[2k], m[2k-1].
  logic signed [17:0] pp [5];

  always_comb begin
    logic [10:0] m;
    logic [2:0]  grp;
    logic signed [17:0] a;
    m = {2'b00, qm12, 1'b0};      // m[0] is the implicit bit -1
    a = 18'(signed'({10'b0, q2}));
    for (int k = 0; k < 5; k++) begin
      grp = m[2*k +: 3];
      unique case (grp)
        3'b000, 3'b111: pp[k] = '0;
        3'b001, 3'b010: pp[k] = a <<< (2*k);
        3'b011:         pp[k] = a <<< (2*k + 1);
        3'b100:         pp[k] = -(a <<< (2*k + 1));
        default:        pp[k] = -(a <<< (2*k));   // 101, 110
      endcase
    end
  end

  logic               v3;
  logic signed [17:0] part3, pp3_3, pp4_3;
  logic [TAG_W-1:0]   t3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; part3 <= '0; pp3_3 <= '0; pp4_3 <= '0; t3 <= '0;
    end else if (en) begin
      v3 <= v2; part3 <= pp[0] + pp[1] + pp[2]; pp3_3 <= pp[3]; pp4_3 <= pp[4]; t3 <= t2;
    end
  end

  // ---------------- stage 4: final sum, >>5, saturation ----------------
  logic signed [17:0] prod;
  logic [12:0]        scaled;
  logic [7:0]         s4_d;

  always_comb begin
    prod   = part3 + pp3_3 + pp4_3;   // r*(r-1) <= 255*223, never negative
    scaled = prod[17:5];
    s4_d   = (scaled > 13'd255) ? 8'hFF : scaled[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; d <= '0; out_tag <= '0;
    end else if (en) begin
      out_valid <= v3; d <= s4_d; out_tag <= t3;
    end
  end

endmodule

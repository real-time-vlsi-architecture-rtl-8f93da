// Single-port synchronous RAM, 2**AW words of DW bits, one access per clock.
//
// Models one bank of the board's 512K x 16 SRAM as the design uses it: a
// single port shared by reads and writes. On a clock edge with ce high the
// word at addr is written (we high) or read into rdata (we low); rdata keeps
// its value until the next read. Read latency is one clock. The external
// asynchronous SRAM's own timing is not modelled; this synchronous port is
// this design's simplification.
module sram_sp #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule

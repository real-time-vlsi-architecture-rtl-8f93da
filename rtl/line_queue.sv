// Line queue: a first-in first-out delay of exactly DEPTH entries, used to
// hold one video line of processing-element results so that the adder trees
// see the same column of the previous line (Queue 1) and of the line before
// that (Queue 2).
//
// The queue is a circular buffer of DEPTH words with one pointer. dout always
// shows the entry at the pointer, i.e. the value pushed DEPTH pushes ago (the
// read is asynchronous, as a distributed RAM). On push, din is written at the
// pointer and the pointer advances, wrapping at DEPTH. clr returns the pointer
// to zero (start of a field); the stored words are kept, and the user ignores
// them until a full line has been pushed. clr together with push writes the
// first entry of the new line at position zero. The document names the queues; the
// circular-buffer structure is this design's choice.
module line_queue #(
  parameter int unsigned DEPTH = 640,
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    ptr;

  logic [PW-1:0]    eptr;   // pointer after an eventual clear

  assign eptr = clr ? '0 : ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ptr <= '0;
    else if (push) ptr <= (eptr == PW'(DEPTH - 1)) ? '0 : eptr + 1'b1;
    else if (clr)  ptr <= '0;
  end

  always_ff @(posedge clk) begin
    if (push) mem[eptr] <= din;
  end

  assign dout = mem[eptr];
endmodule

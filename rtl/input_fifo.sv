// input_fifo: input buffer of the parallel reduction circuit.
//
// When both adders of the parallel method are busy (one still coalescing
// the previous set while the other has not finished its own), arriving
// values wait here until an adder becomes free. The document sizes this
// buffer at alpha * ceil(lg(alpha) + 1) words; the size is set by the
// instantiating module through DEPTH.
//
// How it works: a circular buffer in an array with read and write pointers
// and a word count; the oldest word is always visible on head_data
// (first-word fall-through), so a reader sees a value in the cycle after it
// was written.
//
// Interface and timing: push/push_data write at the rising clk edge, pop
// removes head_data at the same edge; a push and a pop may happen together,
// also when the FIFO is full. A push into a full FIFO with no pop is lost and
// sets the sticky overflow flag (and an assertion warns); a pop of an empty
// FIFO is ignored. rst_n is an active-low synchronous reset. Pointer-based
// storage and the overflow flag are this design's choices.
module input_fifo #(
  parameter int unsigned WIDTH = 74,
  parameter int unsigned DEPTH = 70
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           push_data,
  input  logic                       pop,
  output logic [WIDTH-1:0]           head_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [CW-1:0]    count_q;
  logic             ovf_q;
  logic             do_pop, do_push;

  assign do_pop  = pop && (count_q != '0);
  assign do_push = push && (count_q != CW'(DEPTH) || do_pop);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q    <= '0;
      wr_q    <= '0;
      count_q <= '0;
      ovf_q   <= 1'b0;
    end else begin
      if (do_push) wr_q <= next_ptr(wr_q);
      if (do_pop)  rd_q <= next_ptr(rd_q);
      count_q <= count_q + CW'(do_push) - CW'(do_pop);
      if (push && !do_push) ovf_q <= 1'b1;
    end
  end

  assign head_data = mem[rd_q];
  assign empty     = (count_q == '0);
  assign count     = count_q;
  assign overflow  = ovf_q;

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(push && !do_push)) else $warning("input_fifo: push into a full FIFO, word lost");
  end

endmodule

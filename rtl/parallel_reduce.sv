// parallel_reduce: the parallel reduction circuit.
//
// Reduces sets of floating-point values that arrive one value per clock,
// back to back, each set of any length, to one sum per set, using two
// ALPHA-stage pipelined adders (each inside a par_reduce_unit) and an input
// FIFO. One unit owns the incoming set and folds every new value into the
// partial sums circulating in its pipeline. When it reads the set's last
// value, ALPHA partial sums are still in its pipeline; it starts combining
// them (coalesce mode) while input ownership passes to the other unit,
// which begins on the next set as soon as it is back in its wait mode.
// Values that arrive while the owning unit cannot yet take them wait in the
// FIFO, which holds ALPHA * ceil(lg(ALPHA) + 1) words.
//
// Ownership alternates between the units set by set, starting with unit 0
// after reset. Each value is written to the FIFO together with its
// last-of-set flag and a set number counted at the input; the set number
// leaves with the sum, since a short set can finish before the set that
// came in ahead of it.
//
// Interface and timing: in_valid, in_data and in_last (last value of a set)
// are sampled at the rising clk edge; there is no ready signal. out_valid,
// out_data and out_id are registered, one result per cycle; when both units
// finish in the same cycle, unit 0 goes first and unit 1 holds its sum one
// more cycle. mode reports each unit's mode, fifo_count the FIFO level.
// overflow is set, sticky, if the FIFO was full when a value arrived.
// rst_n is an active-low synchronous reset.
//
// The two adders, the FIFO and its size, and the four modes follow the
// document; ownership alternation, the set number and the output
// arbitration are this design's own choices.
module parallel_reduce
  import reduce_pkg::*;
#(
  parameter int unsigned EXP_W      = 11,
  parameter int unsigned MAN_W      = 52,
  parameter int unsigned ALPHA      = 14,
  parameter int unsigned FIFO_DEPTH = ALPHA * ($clog2(ALPHA) + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic [EXP_W+MAN_W:0]             in_data,
  input  logic                             in_last,
  output logic                             out_valid,
  output logic [EXP_W+MAN_W:0]             out_data,
  output set_id_t                          out_id,
  output mode_t                            mode [2],
  output logic [$clog2(FIFO_DEPTH+1)-1:0]  fifo_count,
  output logic                             overflow
);

  localparam int unsigned W = EXP_W + MAN_W + 1;

  typedef struct packed {
    logic [W-1:0] data;
    logic         last;
    set_id_t      id;
  } word_t;

  set_id_t in_id_q;
  word_t   push_word, head_word;
  logic    fifo_empty, fifo_pop;
  logic    owner_q;

  logic         pop       [2];
  logic         took_last [2];
  logic         res_valid [2];
  logic         res_ready [2];
  logic [W-1:0] res_data  [2];
  set_id_t      res_id    [2];

  always_ff @(posedge clk) begin
    if (!rst_n)                    in_id_q <= '0;
    else if (in_valid && in_last)  in_id_q <= in_id_q + 1'b1;
  end

  assign push_word = '{data: in_data, last: in_last, id: in_id_q};

  input_fifo #(.WIDTH($bits(word_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(in_valid), .push_data(push_word),
    .pop(fifo_pop), .head_data(head_word),
    .empty(fifo_empty), .count(fifo_count), .overflow
  );

  for (genvar u = 0; u < 2; u++) begin : g_unit
    par_reduce_unit #(.EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA)) u_unit (
      .clk, .rst_n,
      .own(owner_q == 1'(u)),
      .fifo_valid(!fifo_empty),
      .fifo_data(head_word.data), .fifo_last(head_word.last), .fifo_id(head_word.id),
      .pop(pop[u]), .took_last(took_last[u]),
      .res_valid(res_valid[u]), .res_data(res_data[u]), .res_id(res_id[u]),
      .res_ready(res_ready[u]),
      .mode(mode[u])
    );
  end

  // only the owning unit ever pops
  assign fifo_pop     = pop[0] || pop[1];
  assign res_ready[0] = 1'b1;
  assign res_ready[1] = !res_valid[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      owner_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (took_last[0] || took_last[1]) owner_q <= !owner_q;
      out_valid <= res_valid[0] || res_valid[1];
    end
  end

  always_ff @(posedge clk) begin
    if (res_valid[0]) begin
      out_data <= res_data[0];
      out_id   <= res_id[0];
    end else if (res_valid[1]) begin
      out_data <= res_data[1];
      out_id   <= res_id[1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(pop[0] && pop[1])) else $error("parallel_reduce: both units popped");
  end

endmodule

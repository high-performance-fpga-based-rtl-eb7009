// level_buffer: one level of the buffer of the serial reduction circuit.
//
// Level k of the buffer holds partial sums of tree level k (sums of up to
// 2^k input values) until the control pairs them in adder B or sends a
// finished sum to the output. The serial method uses lg(n) such levels of
// three words each (DEPTH = 3).
//
// How it works: the words are kept in arrival order in a small array; entry
// 0 is the oldest. The control may remove one or two words from the front
// in the same cycle in which one new word is appended, so the two oldest
// words are always presented side by side for pairing. The word count is
// exported for the control.
//
// Interface and timing: push/push_data/push_tag append a word at the rising
// clk edge; pop1 removes the oldest word, pop2 the two oldest (pop2 wins
// when both are set). Popping more words than are held is ignored. A push
// into a full level (after the pops of the same cycle) is lost and raises
// the sticky overflow flag; an assertion reports it. rst_n is an active-low
// synchronous reset that empties the level. The word width and tag width are
// parameters; how words are stored inside a level is this design's choice.
module level_buffer #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned TAG_W = 10,
  parameter int unsigned DEPTH = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push,
  input  logic [WIDTH-1:0]        push_data,
  input  logic [TAG_W-1:0]        push_tag,
  input  logic                    pop1,
  input  logic                    pop2,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [WIDTH-1:0]        head_data,
  output logic [TAG_W-1:0]        head_tag,
  output logic [WIDTH-1:0]        next_data,
  output logic [TAG_W-1:0]        next_tag,
  output logic                    overflow
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] data_q [DEPTH];
  logic [TAG_W-1:0] tag_q  [DEPTH];
  logic [CW-1:0]    count_q;
  logic             ovf_q;

  logic [CW-1:0]    n_pop;
  logic [CW-1:0]    kept;

  initial begin
    assert (DEPTH >= 2) else $error("level_buffer: DEPTH must be at least 2");
  end

  always_comb begin
    if (pop2 && count_q >= CW'(2))      n_pop = CW'(2);
    else if ((pop1 || pop2) && count_q != '0) n_pop = CW'(1);
    else                                 n_pop = '0;
    kept = count_q - n_pop;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (i + int'(n_pop) < int'(DEPTH)) begin
        data_q[i] <= data_q[i + int'(n_pop)];
        tag_q[i]  <= tag_q[i + int'(n_pop)];
      end
      if (push && i == int'(kept)) begin
        data_q[i] <= push_data;
        tag_q[i]  <= push_tag;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count_q <= '0;
      ovf_q   <= 1'b0;
    end else begin
      if (push && kept < CW'(DEPTH)) count_q <= kept + CW'(1);
      else                           count_q <= kept;
      if (push && kept >= CW'(DEPTH)) ovf_q <= 1'b1;
    end
  end

  assign count     = count_q;
  assign head_data = data_q[0];
  assign head_tag  = tag_q[0];
  assign next_data = data_q[1];
  assign next_tag  = tag_q[1];
  assign overflow  = ovf_q;

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(push && kept >= CW'(DEPTH)))
      else $warning("level_buffer: push into a full level, word lost");
  end

endmodule

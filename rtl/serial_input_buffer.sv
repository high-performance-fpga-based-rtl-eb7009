// serial_input_buffer: input buffer in front of adder A of the serial method.
//
// Adder A computes level 0 of the reduction tree: it adds the input values
// of a set two by two. This buffer holds the first value of each pair until
// its partner arrives and then issues both to adder A. A set of odd length
// leaves its last value without a partner; that value is issued with +0.0 so
// that every set still yields at least one level-1 partial sum, and a set of
// one value flows through the tree like any other.
//
// Each issued pair carries a reduce_pkg::tag_t: the set number (counted up
// at the last value of every set), "first" for the pair that starts its set
// and "last" for the pair that ends it. Sets may follow each other with no
// gap and with idle cycles anywhere.
//
// Interface and timing: in_valid/in_data/in_last are sampled at the rising
// clk edge; in_last marks the final value of a set. The pair is issued
// combinationally in the cycle its second value arrives (issue_valid,
// issue_a, issue_b, issue_tag), so at most one issue per cycle. rst_n is an
// active-low synchronous reset. Holding one word is this design's reading of
// the input "buffer"; the pairing rule is its own choice.
module serial_input_buffer
  import reduce_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_last,
  output logic             issue_valid,
  output logic [WIDTH-1:0] issue_a,
  output logic [WIDTH-1:0] issue_b,
  output tag_t             issue_tag
);

  logic             held_q;        // a value waits for its partner
  logic [WIDTH-1:0] held_data_q;
  logic             held_first_q;  // the waiting value opened its set
  logic             mid_set_q;     // some value of the current set has arrived
  set_id_t          id_q;

  always_comb begin
    issue_valid = in_valid && (held_q || in_last);
    issue_a     = held_q ? held_data_q : in_data;
    issue_b     = held_q ? in_data : '0;
    issue_tag.first = held_q ? held_first_q : !mid_set_q;
    issue_tag.last  = in_last;
    issue_tag.id    = id_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_q    <= 1'b0;
      mid_set_q <= 1'b0;
      id_q      <= '0;
    end else if (in_valid) begin
      if (in_last) begin
        held_q    <= 1'b0;
        mid_set_q <= 1'b0;
        id_q      <= id_q + 1'b1;
      end else begin
        held_q    <= !held_q;
        mid_set_q <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !held_q && !in_last) begin
      held_data_q  <= in_data;
      held_first_q <= !mid_set_q;
    end
  end

endmodule

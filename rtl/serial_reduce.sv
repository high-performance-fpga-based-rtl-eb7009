// serial_reduce: the serial reduction circuit.
//
// Reduces sets of floating-point values that arrive one value per clock,
// back to back, each set of any length from 1 to 2^LOG_N values, to one sum
// per set, without ever stalling the input. The circuit is a binary
// reduction tree folded onto two ALPHA-stage pipelined adders:
//   * serial_input_buffer pairs consecutive values of a set and adder A adds
//     each pair: tree level 0, at most one addition per cycle.
//   * LOG_N level_buffer instances of BUF_DEPTH (3) words hold the partial
//     sums of tree levels 1 .. LOG_N.
//   * serial_control picks every cycle one level whose front words can be
//     added and sends them through adder B, whose sum is written back into
//     the next level; and it sends any finished set sum to the output.
// Levels k >= 1 together need at most half as many additions as level 0,
// which is why a single adder B can serve all of them.
//
// Every word carries a reduce_pkg::tag_t (set number, first/last of its set
// at its level); adder B's tag also carries the destination level. Odd
// numbers of words at any level are completed with +0.0. Because a sum of a
// short set can finish before the sum of a longer set that came earlier,
// each result leaves with its set number.
//
// Interface and timing: in_valid, in_data, in_last (last value of a set)
// are sampled at the rising clk edge; there is no ready signal. out_valid,
// out_data and out_id are registered, one result per cycle at most. A set
// of m values finishes roughly (lg m + 1) * ALPHA cycles after its last
// value, plus waiting for adder B. overflow is set when a level buffer
// overflowed, too_long when a set exceeded 2^LOG_N values; both are sticky.
// rst_n is an active-low synchronous reset.
//
// What follows the document: two ALPHA-stage adders, lg(n) buffer levels
// of three words, the input buffer, and a control that feeds adder B and
// the output. What is this design's own: the tag scheme, the zero padding,
// the lowest-level-first schedule and the set number on the output.
module serial_reduce
  import reduce_pkg::*;
#(
  parameter int unsigned EXP_W     = 11,
  parameter int unsigned MAN_W     = 52,
  parameter int unsigned ALPHA     = 14,
  parameter int unsigned LOG_N     = 20,
  parameter int unsigned BUF_DEPTH = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [EXP_W+MAN_W:0]   in_data,
  input  logic                   in_last,
  output logic                   out_valid,
  output logic [EXP_W+MAN_W:0]   out_data,
  output set_id_t                out_id,
  output logic                   overflow,
  output logic                   too_long
);

  localparam int unsigned W  = EXP_W + MAN_W + 1;
  localparam int unsigned L  = LOG_N;
  localparam int unsigned SW = $clog2(L);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  initial begin
    assert (LOG_N >= 2) else $error("serial_reduce: LOG_N must be at least 2");
  end

  // ---------------- level 0: input buffer and adder A ----------------
  logic         a_in_valid;
  logic [W-1:0] a_in_a, a_in_b;
  tag_t         a_in_tag;
  logic         a_out_valid;
  logic [W-1:0] a_out_sum;
  tag_t         a_out_tag;

  serial_input_buffer #(.WIDTH(W)) u_in_buf (
    .clk, .rst_n,
    .in_valid, .in_data, .in_last,
    .issue_valid(a_in_valid), .issue_a(a_in_a), .issue_b(a_in_b),
    .issue_tag(a_in_tag)
  );

  fp_add_pipe #(.EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA), .TAG_W(TAG_W)) u_add_a (
    .clk, .rst_n,
    .in_valid(a_in_valid), .in_a(a_in_a), .in_b(a_in_b), .in_tag(a_in_tag),
    .out_valid(a_out_valid), .out_sum(a_out_sum), .out_tag(a_out_tag)
  );

  // ---------------- buffer levels 1 .. L ----------------
  logic [CW-1:0] lvl_count    [L];
  logic [W-1:0]  lvl_head     [L];
  logic [W-1:0]  lvl_next     [L];
  tag_t          lvl_head_tag [L];
  tag_t          lvl_next_tag [L];
  logic [L-1:0]  lvl_push, lvl_pop1, lvl_pop2, lvl_ovf;
  logic [W-1:0]  lvl_push_data [L];
  tag_t          lvl_push_tag  [L];

  // adder B
  typedef struct packed {
    logic [SW-1:0] dest;   // index of the level the sum is written to
    tag_t          tag;
  } b_tag_t;

  logic          b_valid, b_pair;
  logic [SW-1:0] b_sel;
  tag_t          b_tag;
  b_tag_t        b_in_tag, b_out_tag;
  logic [W-1:0]  b_in_a, b_in_b, b_out_sum;
  logic          b_out_valid;
  logic          ctl_out_valid, ctl_too_long;
  logic [SW-1:0] ctl_out_sel;

  always_comb begin
    for (int i = 0; i < int'(L); i++) begin
      if (i == 0) begin
        lvl_push[i]      = a_out_valid;
        lvl_push_data[i] = a_out_sum;
        lvl_push_tag[i]  = a_out_tag;
      end else begin
        lvl_push[i]      = b_out_valid && (b_out_tag.dest == SW'(i));
        lvl_push_data[i] = b_out_sum;
        lvl_push_tag[i]  = b_out_tag.tag;
      end
    end
  end

  for (genvar g = 0; g < int'(L); g++) begin : g_level
    level_buffer #(.WIDTH(W), .TAG_W(TAG_W), .DEPTH(BUF_DEPTH)) u_level (
      .clk, .rst_n,
      .push(lvl_push[g]), .push_data(lvl_push_data[g]), .push_tag(lvl_push_tag[g]),
      .pop1(lvl_pop1[g]), .pop2(lvl_pop2[g]),
      .count(lvl_count[g]),
      .head_data(lvl_head[g]), .head_tag(lvl_head_tag[g]),
      .next_data(lvl_next[g]), .next_tag(lvl_next_tag[g]),
      .overflow(lvl_ovf[g])
    );
  end

  serial_control #(.LEVELS(L), .CW(CW)) u_ctl (
    .count(lvl_count), .head_tag(lvl_head_tag), .next_tag(lvl_next_tag),
    .b_valid, .b_sel, .b_pair, .b_tag,
    .out_valid(ctl_out_valid), .out_sel(ctl_out_sel),
    .pop1(lvl_pop1), .pop2(lvl_pop2),
    .too_long(ctl_too_long)
  );

  assign b_in_a        = lvl_head[b_sel];
  assign b_in_b        = b_pair ? lvl_next[b_sel] : '0;
  assign b_in_tag.dest = b_sel + 1'b1;
  assign b_in_tag.tag  = b_tag;

  fp_add_pipe #(.EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA), .TAG_W($bits(b_tag_t))) u_add_b (
    .clk, .rst_n,
    .in_valid(b_valid), .in_a(b_in_a), .in_b(b_in_b), .in_tag(b_in_tag),
    .out_valid(b_out_valid), .out_sum(b_out_sum), .out_tag(b_out_tag)
  );

  // ---------------- output ----------------
  logic too_long_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      too_long_q <= 1'b0;
    end else begin
      out_valid  <= ctl_out_valid;
      too_long_q <= too_long_q | ctl_too_long;
    end
  end

  always_ff @(posedge clk) begin
    if (ctl_out_valid) begin
      out_data <= lvl_head[ctl_out_sel];
      out_id   <= lvl_head_tag[ctl_out_sel].id;
    end
  end

  assign overflow = |lvl_ovf;
  assign too_long = too_long_q;

endmodule

// serial_control: buffer read schedule of the serial reduction circuit.
//
// The serial method shares one adder (adder B) among all levels of the
// reduction tree above level 0. Every cycle this block looks at the front of
// the LEVELS buffer levels and decides:
//   * which level, if any, sends a word pair to adder B. A level is ready
//     when its two oldest words belong together (the oldest is not the last
//     of its set at that level and a second word is present), or when its
//     oldest word is the lone last word of its set at that level and is not
//     also the first; such a word is sent with +0.0 so that it moves up one
//     level. The lowest ready level wins.
//   * which level, if any, hands a finished sum to the output: a word that
//     is both the first and the last of its set at its level is the sum of
//     the whole set. The lowest such level wins.
// The two choices never pick the same level, since they need different
// kinds of front word. The top level only ever delivers finished sums; a
// word there that is not finished means a set was longer than 2^LEVELS
// values, which is flagged on too_long.
//
// The document gives the control only as a block and states that its
// schedule never lets the buffers overflow; the rules above (pairing by
// set flags, zero-padding of odd tails, lowest level first) are this
// design's own schedule.
//
// Interface and timing: purely combinational. Level i of the ports is tree
// level i+1. pop1/pop2 go straight to the level buffers; b_* select the
// operands for adder B in the same cycle, and b_tag is the tag of the sum
// (its destination is level b_sel+1).
module serial_control
  import reduce_pkg::*;
#(
  parameter int unsigned LEVELS = 20,
  parameter int unsigned CW     = 2
) (
  input  logic [CW-1:0]             count    [LEVELS],
  input  tag_t                      head_tag [LEVELS],
  input  tag_t                      next_tag [LEVELS],
  output logic                      b_valid,
  output logic [$clog2(LEVELS)-1:0] b_sel,
  output logic                      b_pair,
  output tag_t                      b_tag,
  output logic                      out_valid,
  output logic [$clog2(LEVELS)-1:0] out_sel,
  output logic [LEVELS-1:0]         pop1,
  output logic [LEVELS-1:0]         pop2,
  output logic                      too_long
);

  localparam int unsigned SW = $clog2(LEVELS);

  logic [LEVELS-1:0] is_final, can_pair, can_pad;

  always_comb begin
    for (int i = 0; i < int'(LEVELS); i++) begin
      is_final[i] = (count[i] != '0) && head_tag[i].first && head_tag[i].last;
      can_pair[i] = (count[i] >= CW'(2)) && !head_tag[i].last && (i < int'(LEVELS) - 1);
      can_pad[i]  = (count[i] != '0) && head_tag[i].last && !head_tag[i].first
                    && (i < int'(LEVELS) - 1);
    end
    too_long = (count[LEVELS-1] != '0) && !is_final[LEVELS-1];

    b_valid = 1'b0;
    b_sel   = '0;
    b_pair  = 1'b0;
    for (int i = int'(LEVELS) - 1; i >= 0; i--) begin
      if (can_pair[i] || can_pad[i]) begin
        b_valid = 1'b1;
        b_sel   = SW'(i);
        b_pair  = can_pair[i];
      end
    end
    b_tag.first = head_tag[b_sel].first;
    b_tag.last  = b_pair ? next_tag[b_sel].last : 1'b1;
    b_tag.id    = head_tag[b_sel].id;

    out_valid = 1'b0;
    out_sel   = '0;
    for (int i = int'(LEVELS) - 1; i >= 0; i--) begin
      if (is_final[i]) begin
        out_valid = 1'b1;
        out_sel   = SW'(i);
      end
    end

    pop1 = '0;
    pop2 = '0;
    if (out_valid) pop1[out_sel] = 1'b1;
    if (b_valid) begin
      if (b_pair) pop2[b_sel] = 1'b1;
      else        pop1[b_sel] = 1'b1;
    end
  end

endmodule

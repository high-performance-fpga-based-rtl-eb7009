// tb_serial_control: self-checking testbench of the serial circuit's
// schedule, with 6 buffer levels.
//
// The control is combinational. The testbench applies random level states
// (word count 0..3 and random front-word flags per level) and compares the
// control's decisions with its own model of the schedule: adder B takes the
// lowest level below the top whose two front words pair up (front word not
// last, two words present) or whose front word is a lone last word that is
// not also first (sent with +0.0); the output takes the lowest level whose
// front word is both first and last; the pops, the tag of adder B's sum and
// the too_long flag follow from those choices.
module tb_serial_control;

  import reduce_pkg::*;

  localparam int unsigned LEVELS = 6;
  localparam int unsigned CW     = 2;

  int checks = 0;
  int failures = 0;

  logic [CW-1:0]  count    [LEVELS];
  tag_t           head_tag [LEVELS];
  tag_t           next_tag [LEVELS];
  logic           b_valid, b_pair, out_valid, too_long;
  logic [2:0]     b_sel, out_sel;
  tag_t           b_tag;
  logic [LEVELS-1:0] pop1, pop2;

  serial_control #(.LEVELS(LEVELS), .CW(CW)) dut (.*);

  initial begin
    int exp_b, exp_o;
    logic exp_pair, exp_long;
    logic [LEVELS-1:0] e_pop1, e_pop2;
    tag_t exp_tag;
    for (int it = 0; it < 20000; it++) begin
      for (int i = 0; i < int'(LEVELS); i++) begin
        count[i]    = CW'($urandom % 4);
        if ($urandom % 3 == 0) count[i] = 0;
        head_tag[i] = tag_t'($urandom);
        next_tag[i] = tag_t'($urandom);
      end
      #1;
      exp_b = -1; exp_o = -1; exp_pair = 0;
      for (int i = 0; i < int'(LEVELS); i++) begin
        if (exp_o < 0 && count[i] != 0 && head_tag[i].first && head_tag[i].last) exp_o = i;
        if (exp_b < 0 && i < int'(LEVELS) - 1 && count[i] != 0) begin
          if (!head_tag[i].last && count[i] >= 2) begin exp_b = i; exp_pair = 1; end
          else if (head_tag[i].last && !head_tag[i].first) begin exp_b = i; exp_pair = 0; end
        end
      end
      exp_long = count[LEVELS-1] != 0 && !(head_tag[LEVELS-1].first && head_tag[LEVELS-1].last);
      e_pop1 = '0; e_pop2 = '0;
      if (exp_o >= 0) e_pop1[exp_o] = 1;
      if (exp_b >= 0) begin
        if (exp_pair) e_pop2[exp_b] = 1; else e_pop1[exp_b] = 1;
        exp_tag.first = head_tag[exp_b].first;
        exp_tag.last  = exp_pair ? next_tag[exp_b].last : 1'b1;
        exp_tag.id    = head_tag[exp_b].id;
      end
      checks++;
      if (b_valid != (exp_b >= 0) || out_valid != (exp_o >= 0) || too_long != exp_long
          || pop1 != e_pop1 || pop2 != e_pop2
          || (exp_b >= 0 && (int'(b_sel) != exp_b || b_pair != exp_pair || b_tag != exp_tag))
          || (exp_o >= 0 && int'(out_sel) != exp_o)) begin
        failures++;
        if (failures < 10)
          $display("FAIL it %0d: b %b/%0d/%b exp %0d/%b, out %b/%0d exp %0d", it,
                   b_valid, b_sel, b_pair, exp_b, exp_pair, out_valid, out_sel, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

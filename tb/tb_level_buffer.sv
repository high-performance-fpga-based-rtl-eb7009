// tb_level_buffer: self-checking testbench of one buffer level (three words).
//
// Random pushes, single pops and double pops, in any combination per cycle,
// are applied and the word count, the two front words and the overflow flag
// are compared every cycle with a queue model kept in the testbench. The
// test ends by filling the level and pushing once more, which must set the
// sticky overflow flag (an assertion in the level warns about that push).
module tb_level_buffer;

  localparam int unsigned WIDTH = 64;
  localparam int unsigned TAG_W = 10;
  localparam int unsigned DEPTH = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;

  logic             push, pop1, pop2, overflow;
  logic [WIDTH-1:0] push_data, head_data, next_data;
  logic [TAG_W-1:0] push_tag, head_tag, next_tag;
  logic [1:0]       count;

  level_buffer #(.WIDTH(WIDTH), .TAG_W(TAG_W), .DEPTH(DEPTH)) dut (.*);

  typedef struct { logic [WIDTH-1:0] d; logic [TAG_W-1:0] t; } word_t;
  word_t model[$];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (model size %0d, count %0d)", what, model.size(), count);
    end
  endtask

  task automatic compare();
    check("count", int'(count) == model.size());
    if (model.size() >= 1) check("head", head_data == model[0].d && head_tag == model[0].t);
    if (model.size() >= 2) check("next", next_data == model[1].d && next_tag == model[1].t);
    check("no overflow", !overflow);
  endtask

  initial begin
    word_t w;
    int npop;
    push = 0; pop1 = 0; pop2 = 0; push_data = 0; push_tag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      compare();
      // choose operations that keep the level within its three words
      pop2 = ($urandom % 4 == 0);
      pop1 = !pop2 && ($urandom % 3 == 0);
      npop = pop2 ? (model.size() >= 2 ? 2 : (model.size() >= 1 ? 1 : 0))
                  : (pop1 && model.size() >= 1 ? 1 : 0);
      push = ($urandom % 2 == 0) && (model.size() - npop < DEPTH);
      push_data = {$urandom, $urandom};
      push_tag  = TAG_W'($urandom);
      for (int k = 0; k < npop; k++) void'(model.pop_front());
      if (push) begin
        w.d = push_data; w.t = push_tag;
        model.push_back(w);
      end
    end
    // fill and push once more: overflow
    @(negedge clk);
    pop1 = 0; pop2 = 0; push = 1;
    repeat (DEPTH + 1) @(negedge clk);
    push = 0;
    @(negedge clk);
    checks++;
    if (!overflow || count != 2'(DEPTH)) begin
      failures++;
      $display("FAIL overflow not flagged (count %0d)", count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_input_fifo: self-checking testbench of the parallel circuit's input
// FIFO at its default size (70 words, for 14-stage adders).
//
// Phases of random pushes and pops with different push/pop odds drive the
// FIFO from empty to full and back; every cycle the count, empty flag and
// head word are compared with a queue model. A push with a pop on a full
// FIFO must be accepted. Finally a push into a full FIFO without a pop must
// set the sticky overflow flag.
module tb_input_fifo;

  localparam int unsigned WIDTH = 74;
  localparam int unsigned DEPTH = 70;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;
  int full_seen = 0;

  logic             push, pop, empty, overflow;
  logic [WIDTH-1:0] push_data, head_data;
  logic [6:0]       count;

  input_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] model[$];

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (model %0d, count %0d)", what, model.size(), count);
    end
  endtask

  initial begin
    int push_pct;
    push = 0; pop = 0; push_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 8; phase++) begin
      push_pct = (phase % 2 == 0) ? 80 : 25;
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        check("count", int'(count) == model.size());
        check("empty", empty == (model.size() == 0));
        if (model.size() != 0) check("head", head_data == model[0]);
        if (model.size() == DEPTH) full_seen++;
        pop  = ($urandom % 100 >= 100 - (100 - push_pct)) && model.size() != 0;
        push = ($urandom % 100 < push_pct) && (model.size() < DEPTH || pop);
        push_data = {10'($urandom), $urandom, $urandom};
        if (pop) void'(model.pop_front());
        if (push) model.push_back(push_data);
      end
    end
    check("full reached", full_seen > 0);
    // fill completely, then push once more without a pop
    pop = 0;
    while (model.size() < DEPTH) begin
      push = 1; push_data = {10'($urandom), $urandom, $urandom};
      model.push_back(push_data);
      @(negedge clk);
    end
    push = 1;
    @(negedge clk);
    push = 0;
    @(negedge clk);
    check("overflow flagged", overflow && int'(count) == DEPTH && head_data == model[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

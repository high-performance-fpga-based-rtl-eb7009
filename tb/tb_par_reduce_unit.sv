// tb_par_reduce_unit: self-checking testbench of one adder of the parallel
// method with its mode controller (double precision, 14-stage adder).
//
// The testbench plays the input FIFO: it offers the values of one set after
// another, with random gaps, and keeps ownership with the unit. Set lengths
// run from 1 to 80, so sets shorter and longer than the pipeline occur.
// Values are small integers so each sum is exact in any order. Checked:
// every sum and set number; that every value of a set after the first is
// taken in the cycle it is offered (the unit never stalls its input); that
// coalescing ends within ALPHA * ceil(lg ALPHA + 1) cycles, the size the
// parallel method gives its input buffer; and that the modes
// only change along wait->fill, fill->steady, fill->coalesce,
// steady->coalesce and coalesce->wait, each of which must occur. The output
// is sometimes held off with res_ready low.
module tb_par_reduce_unit;

  import reduce_pkg::*;

  localparam int unsigned EXP_W = 11;
  localparam int unsigned MAN_W = 52;
  localparam int unsigned ALPHA = 14;
  localparam int unsigned N_SETS = 200;
  localparam int unsigned COALESCE_MAX = ALPHA * ($clog2(ALPHA) + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;

  logic                 own, fifo_valid, fifo_last, pop, took_last, res_valid, res_ready;
  logic [EXP_W+MAN_W:0] fifo_data, res_data;
  set_id_t              fifo_id, res_id;
  mode_t                mode;

  par_reduce_unit #(.EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA)) dut (.*);

  // transitions seen: [from][to]
  int trans [4][4];
  mode_t prev_mode;
  int coalesce_len = 0, max_coalesce = 0;

  always @(negedge clk) if (rst_n) begin
    if (mode != prev_mode) begin
      trans[prev_mode][mode]++;
      checks++;
      if (!((prev_mode == MODE_WAIT && mode == MODE_FILL) ||
            (prev_mode == MODE_FILL && mode == MODE_STEADY) ||
            (prev_mode == MODE_FILL && mode == MODE_COALESCE) ||
            (prev_mode == MODE_STEADY && mode == MODE_COALESCE) ||
            (prev_mode == MODE_COALESCE && mode == MODE_WAIT))) begin
        failures++;
        $display("FAIL: mode %s -> %s", prev_mode.name(), mode.name());
      end
    end
    if (mode == MODE_COALESCE && !(res_valid && !res_ready)) coalesce_len++;
    if (mode != MODE_COALESCE) coalesce_len = 0;
    if (coalesce_len > max_coalesce) max_coalesce = coalesce_len;
    prev_mode = mode;
  end

  real exp_sum [N_SETS];
  int  n_out = 0;

  initial begin
    int m, t_read;
    real v;
    own = 1; fifo_valid = 0; fifo_last = 0; fifo_data = 0; fifo_id = 0; res_ready = 1;
    prev_mode = MODE_WAIT;
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) trans[a][b] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < N_SETS; s++) begin
      m = ($urandom % 3 == 0) ? 1 + $urandom % 10 : 1 + $urandom % 80;
      exp_sum[s] = 0.0;
      for (int i = 0; i < m; i++) begin
        v = real'(int'($urandom % 2001) - 1000);
        exp_sum[s] += v;
        // a gap now and then while the set is being read
        if (i > 0 && $urandom % 10 == 0) begin
          fifo_valid = 0;
          @(negedge clk);
        end
        fifo_valid = 1;
        fifo_data  = $realtobits(v);
        fifo_last  = (i == m - 1);
        fifo_id    = set_id_t'(s);
        #1;
        t_read = 0;
        while (!pop) begin
          t_read++;
          @(negedge clk);
          #1;
        end
        // once the set has started, an offered value must be taken at once
        if (i > 0) begin
          checks++;
          if (t_read != 0 || (mode != MODE_FILL && mode != MODE_STEADY)) begin
            failures++; $display("FAIL: set %0d value %0d taken in mode %s", s, i, mode.name());
          end
        end
        @(negedge clk);
      end
      fifo_valid = 0;
      // the unit waits for the result before the next set (one unit only)
      while (n_out <= s) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
      if (trans[a][b] != 0) $display("mode %0d -> %0d : %0d times", a, b, trans[a][b]);
    $display("longest coalesce: %0d cycles (bound %0d)", max_coalesce, COALESCE_MAX);
    checks++;
    if (trans[MODE_WAIT][MODE_FILL] == 0 || trans[MODE_FILL][MODE_STEADY] == 0 ||
        trans[MODE_FILL][MODE_COALESCE] == 0 || trans[MODE_STEADY][MODE_COALESCE] == 0 ||
        trans[MODE_COALESCE][MODE_WAIT] == 0) begin
      failures++; $display("FAIL: a mode transition never occurred");
    end
    checks++;
    if (max_coalesce > int'(COALESCE_MAX)) begin
      failures++; $display("FAIL: coalesce took %0d cycles", max_coalesce);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result check, with random back-pressure; res_ready is chosen first,
  // and the unit takes the result at the next rising edge if both are high
  always @(negedge clk) if (rst_n) begin
    res_ready = ($urandom % 4 != 0);
    if (res_valid && res_ready) begin
      checks++;
      if (int'(res_id) != n_out || $bitstoreal(res_data) != exp_sum[n_out]) begin
        failures++;
        $display("FAIL: result %0d id %0d got %f exp %f", n_out, res_id, $bitstoreal(res_data), exp_sum[n_out]);
      end
      n_out++;
    end
  end

  // the unit may only pop when it owns the input and a value is offered
  always @(negedge clk) if (rst_n && pop && !fifo_valid) begin
    failures++; $display("FAIL: pop without a value");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_parallel_reduce: self-checking testbench of the parallel reduction
// circuit at its default size (double precision, 14-stage adders, 70-word
// input FIFO).
//
// Sets are streamed back to back, one value per cycle with a few idle
// cycles: first long sets (70 to 300 values), then a repeating pattern of a
// long set, a short set of 1 to 10 values, and a long set followed by idle
// cycles. A set that follows a short set must wait in the FIFO while one
// adder still coalesces and the other is busy; the idle cycles let the
// FIFO drain again (values stay in the FIFO until the input pauses, since
// both arrive and leave at one per cycle). Values are small integers so sums are exact
// in any order. Checked: every set's sum comes out once, with its set
// number; the FIFO never overflows and never holds more than
// ALPHA * ceil(lg ALPHA + 1) words; each mode transition of each unit, both
// units coalescing at once, and values waiting in the FIFO all occur. The
// largest FIFO fill is reported.
module tb_parallel_reduce;

  import reduce_pkg::*;

  localparam int unsigned EXP_W = 11;
  localparam int unsigned MAN_W = 52;
  localparam int unsigned ALPHA = 14;
  localparam int unsigned DEPTH = ALPHA * ($clog2(ALPHA) + 1);
  localparam int unsigned N_SETS = 240;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;

  logic                 in_valid, in_last, out_valid, overflow;
  logic [EXP_W+MAN_W:0] in_data, out_data;
  set_id_t              out_id;
  mode_t                mode [2];
  logic [6:0]           fifo_count;

  parallel_reduce #(.EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA)) dut (.*);

  real exp_sum [N_SETS];
  bit  seen    [N_SETS];
  int  n_out = 0;

  // mechanism counters
  int    trans [2][4][4];
  mode_t prev   [2];
  int    max_fifo = 0, n_waiting = 0, n_both_coalesce = 0;

  always @(negedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) begin
      if (mode[u] != prev[u]) trans[u][prev[u]][mode[u]]++;
      prev[u] = mode[u];
    end
    if (int'(fifo_count) > max_fifo) max_fifo = int'(fifo_count);
    if (fifo_count > 1 && mode[0] == MODE_COALESCE && mode[1] == MODE_COALESCE) n_waiting++;
    if (mode[0] == MODE_COALESCE && mode[1] == MODE_COALESCE) n_both_coalesce++;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int s;
    s = int'(out_id);
    checks++;
    if (s >= N_SETS || seen[s]) begin
      failures++; $display("FAIL: unexpected result for set %0d", s);
    end else begin
      seen[s] = 1;
      n_out++;
      if ($bitstoreal(out_data) != exp_sum[s]) begin
        failures++;
        $display("FAIL set %0d: got %f exp %f", s, $bitstoreal(out_data), exp_sum[s]);
      end
    end
  end

  // set lengths: long sets first, then a repeating pattern of a long set, a
  // short set and a long set followed by idle cycles
  function automatic int pick_len(input int s);
    if (s < 60) return 70 + $urandom % 231;
    case (s % 3)
      0:       return 100 + $urandom % 201;
      1:       return 1 + $urandom % 10;
      default: return 70 + $urandom % 131;
    endcase
  endfunction

  function automatic int gap_after(input int s);
    return (s >= 60 && s % 3 == 2) ? 2 * int'(DEPTH) : 0;
  endfunction

  initial begin
    int m;
    real v;
    in_valid = 0; in_last = 0; in_data = 0;
    for (int u = 0; u < 2; u++) begin
      prev[u] = MODE_WAIT;
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) trans[u][a][b] = 0;
    end
    for (int i = 0; i < int'(N_SETS); i++) seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < int'(N_SETS); s++) begin
      m = pick_len(s);
      exp_sum[s] = 0.0;
      for (int i = 0; i < m; i++) begin
        if ($urandom % 32 == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        v = real'(int'($urandom % 2001) - 1000);
        exp_sum[s] += v;
        in_valid = 1;
        in_data  = $realtobits(v);
        in_last  = (i == m - 1);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (gap_after(s)) @(negedge clk);
    end
    in_valid = 0;
    repeat (20 * DEPTH) @(negedge clk);

    checks++;
    if (n_out != int'(N_SETS)) begin failures++; $display("FAIL: %0d of %0d results", n_out, N_SETS); end
    checks++;
    if (overflow || max_fifo > int'(DEPTH)) begin failures++; $display("FAIL: FIFO overflow"); end
    for (int u = 0; u < 2; u++) begin
      $display("unit %0d: wait->fill %0d, fill->steady %0d, fill->coalesce %0d, steady->coalesce %0d, coalesce->wait %0d",
               u, trans[u][MODE_WAIT][MODE_FILL], trans[u][MODE_FILL][MODE_STEADY],
               trans[u][MODE_FILL][MODE_COALESCE], trans[u][MODE_STEADY][MODE_COALESCE],
               trans[u][MODE_COALESCE][MODE_WAIT]);
      checks++;
      if (trans[u][MODE_WAIT][MODE_FILL] == 0 || trans[u][MODE_FILL][MODE_STEADY] == 0 ||
          trans[u][MODE_FILL][MODE_COALESCE] == 0 || trans[u][MODE_STEADY][MODE_COALESCE] == 0 ||
          trans[u][MODE_COALESCE][MODE_WAIT] == 0) begin
        failures++; $display("FAIL: unit %0d missed a mode transition", u);
      end
    end
    $display("largest FIFO fill %0d of %0d; cycles with values waiting while both units coalesce %0d",
             max_fifo, DEPTH, n_waiting);
    checks++;
    if (n_waiting == 0 || n_both_coalesce == 0) begin
      failures++; $display("FAIL: values never had to wait in the FIFO");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

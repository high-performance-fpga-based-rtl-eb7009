// tb_serial_reduce: self-checking testbench of the serial reduction circuit
// in double precision with 14-stage adders and 7 buffer levels (sets of up
// to 128 values).
//
// Sets of random length are streamed back to back, one value per cycle,
// with idle cycles now and then: many short sets (1 to 5 values), medium
// ones and sets of exactly 128 values; then, with no idle cycles, sets of
// 2^k + 1 values, which load adder B most with +0.0 padding. Values are small integers, so every
// sum is exact in any order of addition and the reference sum does not
// depend on the shape of the tree. Each set must come out exactly once,
// with its set number and its sum, within a latency bound of
// m + (lg m + 2) * (ALPHA + 4) + 40 cycles after its first value (m values);
// no level may overflow. The testbench also counts how often each mechanism
// is used (pairs and zero-padded words in adder B, finished sums taken from
// each level, level buffers holding 3 words) and fails if one never is.
// Last, a set of 129 values must raise too_long.
module tb_serial_reduce;

  import reduce_pkg::*;

  localparam int unsigned EXP_W = 11;
  localparam int unsigned MAN_W = 52;
  localparam int unsigned ALPHA = 14;
  localparam int unsigned LOG_N = 7;
  localparam int unsigned N_SETS = 250;  // below 256: set numbers do not wrap

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                 in_valid, in_last, out_valid, overflow, too_long;
  logic [EXP_W+MAN_W:0] in_data, out_data;
  set_id_t              out_id;

  serial_reduce #(.EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA), .LOG_N(LOG_N)) dut (.*);

  // expected results, indexed by set number
  real             exp_sum  [N_SETS];
  int              exp_len  [N_SETS];
  longint unsigned t_first  [N_SETS];
  bit              seen     [N_SETS];
  int              n_out = 0;

  // mechanism counters
  int n_b_pair = 0, n_b_pad = 0, n_full_level = 0;
  int finals_at [LOG_N];

  always @(negedge clk) if (rst_n) begin
    if (dut.b_valid &&  dut.b_pair) n_b_pair++;
    if (dut.b_valid && !dut.b_pair) n_b_pad++;
    if (dut.ctl_out_valid) finals_at[dut.ctl_out_sel]++;
  end

  for (genvar g = 0; g < int'(LOG_N); g++) begin : g_mon
    always @(negedge clk) if (rst_n && dut.g_level[g].u_level.count == 2'd3) n_full_level++;
  end

  // check results
  always @(negedge clk) if (rst_n && out_valid) begin
    int s;
    longint unsigned bound;
    s = int'(out_id);
    checks++;
    if (s >= N_SETS || seen[s]) begin
      failures++;
      $display("FAIL: unexpected result for set %0d", s);
    end else begin
      seen[s] = 1;
      n_out++;
      bound = longint'(exp_len[s]) + longint'(($clog2(exp_len[s]) + 2) * (ALPHA + 4) + 40);
      if ($bitstoreal(out_data) != exp_sum[s] || cycle - t_first[s] > bound) begin
        failures++;
        $display("FAIL set %0d (len %0d): got %f exp %f, latency %0d bound %0d", s, exp_len[s],
                 $bitstoreal(out_data), exp_sum[s], cycle - t_first[s], bound);
      end
    end
  end

  // first 150 sets: mixed lengths with idle cycles; last 100 sets: lengths
  // 2^k + 1 back to back with no idle cycle, the heaviest load of +0.0
  // padding on adder B
  function automatic int pick_len(input int s);
    int r;
    if (s >= 150) return (s % 5 == 0) ? (1 << ($urandom % (LOG_N + 1)))
                                      : (1 << ($urandom % LOG_N)) + 1;
    r = $urandom % 10;
    if (r < 5) return 1 + $urandom % 5;
    if (r < 9) return 6 + $urandom % 60;
    return 1 << LOG_N;
  endfunction

  initial begin
    int m;
    real v;
    in_valid = 0; in_last = 0; in_data = 0;
    for (int i = 0; i < int'(LOG_N); i++) finals_at[i] = 0;
    for (int i = 0; i < int'(N_SETS); i++) seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < N_SETS; s++) begin
      m = pick_len(s);
      exp_len[s] = m;
      exp_sum[s] = 0.0;
      for (int i = 0; i < m; i++) begin
        if (s < 150 && $urandom % 16 == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        v = real'(int'($urandom % 2001) - 1000);
        exp_sum[s] += v;
        in_valid = 1;
        in_data  = $realtobits(v);
        in_last  = (i == m - 1);
        if (i == 0) t_first[s] = cycle;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (30 * (ALPHA + 4) * LOG_N) @(negedge clk);
    checks++;
    if (n_out != N_SETS) begin
      failures++;
      $display("FAIL: %0d of %0d results", n_out, N_SETS);
    end
    checks++;
    if (overflow || too_long) begin
      failures++;
      $display("FAIL: overflow=%b too_long=%b", overflow, too_long);
    end
    $display("adder B pairs=%0d zero-padded=%0d, level-full cycles=%0d", n_b_pair, n_b_pad, n_full_level);
    for (int i = 0; i < int'(LOG_N); i++) begin
      $display("finished sums taken from level %0d: %0d", i + 1, finals_at[i]);
      checks++;
      if (finals_at[i] == 0) begin failures++; $display("FAIL: no sum finished at level %0d", i + 1); end
    end
    checks++;
    if (n_b_pair == 0 || n_b_pad == 0 || n_full_level == 0) begin
      failures++;
      $display("FAIL: a mechanism was never used");
    end
    // a set longer than 2^LOG_N values
    for (int i = 0; i <= (1 << LOG_N); i++) begin
      in_valid = 1;
      in_data  = $realtobits(1.0);
      in_last  = (i == (1 << LOG_N));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10 * (ALPHA + 4)) @(negedge clk);
    checks++;
    if (!too_long) begin failures++; $display("FAIL: too_long not raised"); end
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

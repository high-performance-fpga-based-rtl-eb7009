// tb_reduction_top: end-to-end testbench of both reduction circuits at
// their default size (double precision, 14-stage adders, serial circuit for
// sets of up to 2^20 values, parallel circuit with a 70-word FIFO).
//
// Two streams run at the same time, one per circuit, each one value per
// cycle with occasional idle cycles. Serial circuit: 150 sets of mixed
// length (1 to 5, 6 to 300, and 1000 to 5000 values) and one set of
// exactly 2^20 values, the largest it accepts. Parallel circuit: a
// repeating pattern of a long set, a short set, and a long set followed by
// idle cycles. Values are small integers so every sum is exact in any
// order. Each result must come out once, with its set number and sum; no
// buffer may overflow. Counted, and required at least once: adder B
// pairing two words, adder B moving a lone word up with +0.0, a level
// holding three words, finished sums leaving from level 1 and from level
// 20 of the serial circuit; each mode transition of the parallel circuit,
// and values waiting in its FIFO while both adders are busy.
module tb_reduction_top;

  import reduce_pkg::*;

  localparam int unsigned LOG_N   = 20;
  localparam int unsigned ALPHA   = 14;
  localparam int unsigned DEPTH   = ALPHA * ($clog2(ALPHA) + 1);
  localparam int unsigned S_SETS  = 151;
  localparam int unsigned P_SETS  = 150;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;

  logic        s_in_valid, s_in_last, s_out_valid, s_overflow, s_too_long;
  logic [63:0] s_in_data, s_out_data;
  set_id_t     s_out_id;
  logic        p_in_valid, p_in_last, p_out_valid, p_overflow;
  logic [63:0] p_in_data, p_out_data;
  set_id_t     p_out_id;
  mode_t       p_mode [2];
  logic [6:0]  p_fifo_count;

  reduction_top dut (.*);

  real s_exp [S_SETS];
  real p_exp [P_SETS];
  bit  s_seen [S_SETS];
  bit  p_seen [P_SETS];
  int  s_out = 0, p_out = 0;

  // ---------------- mechanism counters ----------------
  int n_b_pair = 0, n_b_pad = 0, n_full_level = 0, n_fin_l1 = 0, n_fin_top = 0;
  int trans [4][4];
  mode_t prev [2];
  int n_wait_fifo = 0;

  always @(negedge clk) if (rst_n) begin
    if (dut.u_serial.b_valid &&  dut.u_serial.b_pair) n_b_pair++;
    if (dut.u_serial.b_valid && !dut.u_serial.b_pair) n_b_pad++;
    if (dut.u_serial.ctl_out_valid && dut.u_serial.ctl_out_sel == 0) n_fin_l1++;
    if (dut.u_serial.ctl_out_valid && dut.u_serial.ctl_out_sel == 5'(LOG_N - 1)) n_fin_top++;
    for (int u = 0; u < 2; u++) begin
      if (p_mode[u] != prev[u]) trans[prev[u]][p_mode[u]]++;
      prev[u] = p_mode[u];
    end
    if (p_fifo_count > 1 && p_mode[0] != MODE_WAIT && p_mode[1] != MODE_WAIT) n_wait_fifo++;
  end

  for (genvar g = 0; g < int'(LOG_N); g++) begin : g_mon
    always @(negedge clk) if (rst_n && dut.u_serial.g_level[g].u_level.count == 2'd3) n_full_level++;
  end

  // ---------------- result checks ----------------
  always @(negedge clk) if (rst_n) begin
    if (s_out_valid) begin
      checks++;
      if (int'(s_out_id) >= S_SETS || s_seen[s_out_id] || $bitstoreal(s_out_data) != s_exp[s_out_id]) begin
        failures++; $display("FAIL serial set %0d: got %f", s_out_id, $bitstoreal(s_out_data));
      end else begin
        s_seen[s_out_id] = 1; s_out++;
      end
    end
    if (p_out_valid) begin
      checks++;
      if (int'(p_out_id) >= P_SETS || p_seen[p_out_id] || $bitstoreal(p_out_data) != p_exp[p_out_id]) begin
        failures++; $display("FAIL parallel set %0d: got %f", p_out_id, $bitstoreal(p_out_data));
      end else begin
        p_seen[p_out_id] = 1; p_out++;
      end
    end
  end

  function automatic int s_len(input int s);
    int r;
    if (s == 75) return 1 << LOG_N;
    r = $urandom % 10;
    if (r < 4) return 1 + $urandom % 5;
    if (r < 9) return 6 + $urandom % 295;
    return 1000 + $urandom % 4001;
  endfunction

  function automatic int p_len(input int s);
    case (s % 3)
      0:       return 100 + $urandom % 201;
      1:       return 1 + $urandom % 10;
      default: return 70 + $urandom % 131;
    endcase
  endfunction

  task automatic serial_stream();
    int m;
    real v;
    for (int s = 0; s < int'(S_SETS); s++) begin
      m = s_len(s);
      s_exp[s] = 0.0;
      for (int i = 0; i < m; i++) begin
        if ($urandom % 16 == 0) begin
          s_in_valid = 0;
          @(negedge clk);
        end
        v = real'(int'($urandom % 2001) - 1000);
        s_exp[s] += v;
        s_in_valid = 1;
        s_in_data  = $realtobits(v);
        s_in_last  = (i == m - 1);
        @(negedge clk);
      end
    end
    s_in_valid = 0;
  endtask

  task automatic parallel_stream();
    int m;
    real v;
    for (int s = 0; s < int'(P_SETS); s++) begin
      m = p_len(s);
      p_exp[s] = 0.0;
      for (int i = 0; i < m; i++) begin
        v = real'(int'($urandom % 2001) - 1000);
        p_exp[s] += v;
        p_in_valid = 1;
        p_in_data  = $realtobits(v);
        p_in_last  = (i == m - 1);
        @(negedge clk);
      end
      p_in_valid = 0;
      if (s % 3 == 2) repeat (2 * DEPTH) @(negedge clk);
    end
    p_in_valid = 0;
  endtask

  initial begin
    s_in_valid = 0; s_in_last = 0; s_in_data = 0;
    p_in_valid = 0; p_in_last = 0; p_in_data = 0;
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) trans[a][b] = 0;
    prev[0] = MODE_WAIT; prev[1] = MODE_WAIT;
    for (int i = 0; i < int'(S_SETS); i++) s_seen[i] = 0;
    for (int i = 0; i < int'(P_SETS); i++) p_seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      serial_stream();
      parallel_stream();
    join
    repeat (30 * (ALPHA + 4) * 4 + 20 * DEPTH) @(negedge clk);

    checks++;
    if (s_out != int'(S_SETS) || p_out != int'(P_SETS)) begin
      failures++; $display("FAIL: serial %0d of %0d, parallel %0d of %0d results", s_out, S_SETS, p_out, P_SETS);
    end
    checks++;
    if (s_overflow || s_too_long || p_overflow) begin
      failures++; $display("FAIL: overflow or too_long raised");
    end
    $display("serial: adder B pairs %0d, zero-padded %0d, level-full cycles %0d, sums from level 1 %0d, from level %0d %0d",
             n_b_pair, n_b_pad, n_full_level, n_fin_l1, LOG_N, n_fin_top);
    $display("parallel: wait->fill %0d fill->steady %0d fill->coalesce %0d steady->coalesce %0d coalesce->wait %0d, cycles with values waiting %0d",
             trans[MODE_WAIT][MODE_FILL], trans[MODE_FILL][MODE_STEADY], trans[MODE_FILL][MODE_COALESCE],
             trans[MODE_STEADY][MODE_COALESCE], trans[MODE_COALESCE][MODE_WAIT], n_wait_fifo);
    checks++;
    if (n_b_pair == 0 || n_b_pad == 0 || n_full_level == 0 || n_fin_l1 == 0 || n_fin_top == 0) begin
      failures++; $display("FAIL: a serial mechanism never occurred");
    end
    checks++;
    if (trans[MODE_WAIT][MODE_FILL] == 0 || trans[MODE_FILL][MODE_STEADY] == 0 ||
        trans[MODE_FILL][MODE_COALESCE] == 0 || trans[MODE_STEADY][MODE_COALESCE] == 0 ||
        trans[MODE_COALESCE][MODE_WAIT] == 0 || n_wait_fifo == 0) begin
      failures++; $display("FAIL: a parallel mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_serial_workloads: the serial circuit run at the set sizes of its
// evaluation: n = 2^4, 2^6, ..., 2^20 values per set, in single precision
// (8-bit exponent, 23-bit fraction) and in double precision, both built for
// sets of up to 2^20 values with 14-stage adders.
//
// For each n, four sets of exactly n values are streamed back to back into
// both circuits at once, one value per cycle. Values are integers from -15
// to 15, so every partial sum stays below 2^24 in magnitude and all sums
// are exact in both precisions. Each set's sum and set number are checked,
// and the time from a set's first value to its sum must stay within
// n + (lg n + 2) * (ALPHA + 4) + 40 cycles: linear in n, as the method
// promises.
module tb_serial_workloads;

  import reduce_pkg::*;

  localparam int unsigned LOG_N = 20;
  localparam int unsigned ALPHA = 14;
  localparam int unsigned REPS  = 4;
  localparam int unsigned N_SETS = 9 * REPS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        in_valid, in_last;
  logic [63:0] d64_in, d64_out;
  logic [31:0] d32_in, d32_out;
  logic        v64_out, v32_out, ovf64, ovf32, long64, long32;
  set_id_t     id64, id32;

  serial_reduce #(.LOG_N(LOG_N), .ALPHA(ALPHA)) dut64 (
    .clk, .rst_n, .in_valid, .in_data(d64_in), .in_last,
    .out_valid(v64_out), .out_data(d64_out), .out_id(id64),
    .overflow(ovf64), .too_long(long64)
  );

  serial_reduce #(.EXP_W(8), .MAN_W(23), .LOG_N(LOG_N), .ALPHA(ALPHA)) dut32 (
    .clk, .rst_n, .in_valid, .in_data(d32_in), .in_last,
    .out_valid(v32_out), .out_data(d32_out), .out_id(id32),
    .overflow(ovf32), .too_long(long32)
  );

  int              exp_sum [N_SETS];
  int              len     [N_SETS];
  longint unsigned t0      [N_SETS];
  int              n64 = 0, n32 = 0;

  // single-precision encoding of a small integer (|v| < 2^24), built from
  // its binary digits
  function automatic logic [31:0] int_to_f32(input int v);
    int a, e;
    logic [31:0] m;
    if (v == 0) return 32'h0;
    a = (v < 0) ? -v : v;
    e = 31;
    while (((a >> e) & 1) == 0) e--;
    m = 32'(a) << (23 - e);
    return {v < 0, 8'(127 + e), m[22:0]};
  endfunction

  function automatic longint unsigned bound(input int s);
    return longint'(len[s]) + longint'(($clog2(len[s]) + 2) * (ALPHA + 4) + 40);
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (v64_out) begin
      checks++;
      if (int'(id64) >= N_SETS || $bitstoreal(d64_out) != real'(exp_sum[id64])
          || cycle - t0[id64] > bound(id64)) begin
        failures++; $display("FAIL double set %0d: got %f", id64, $bitstoreal(d64_out));
      end
      n64++;
    end
    if (v32_out) begin
      checks++;
      if (int'(id32) >= N_SETS || d32_out != int_to_f32(exp_sum[id32])
          || cycle - t0[id32] > bound(id32)) begin
        failures++; $display("FAIL single set %0d: got %h", id32, d32_out);
      end
      n32++;
    end
  end

  initial begin
    int v, s;
    in_valid = 0; in_last = 0; d64_in = 0; d32_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    s = 0;
    for (int k = 4; k <= 20; k += 2) begin
      for (int r = 0; r < int'(REPS); r++) begin
        len[s] = 1 << k;
        exp_sum[s] = 0;
        t0[s] = cycle;
        for (int i = 0; i < len[s]; i++) begin
          v = int'($urandom % 31) - 15;
          exp_sum[s] += v;
          in_valid = 1;
          d64_in   = $realtobits(real'(v));
          d32_in   = int_to_f32(v);
          in_last  = (i == len[s] - 1);
          @(negedge clk);
        end
        s++;
      end
      $display("n = 2^%0d done", k);
    end
    in_valid = 0;
    repeat (30 * (ALPHA + 4)) @(negedge clk);
    checks++;
    if (n64 != int'(N_SETS) || n32 != int'(N_SETS) || ovf64 || ovf32 || long64 || long32) begin
      failures++;
      $display("FAIL: results %0d/%0d of %0d, flags %b%b%b%b", n64, n32, N_SETS, ovf64, ovf32, long64, long32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

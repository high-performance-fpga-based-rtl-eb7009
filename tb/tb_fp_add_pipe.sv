// tb_fp_add_pipe: self-checking testbench of the pipelined floating-point
// adder, in double precision (default parameters, 14 stages) and in single
// precision (5 stages).
//
// Reference values come from the simulator's own double-precision
// arithmetic. For single precision the exact double sum of two singles is
// rounded to single (nearest even) by rebiasing the exponent and rounding
// the 52-bit fraction to 23 bits; rounding twice is exact here because a
// double has more than twice the precision of a single plus two bits.
// Operands are normal numbers whose exponents keep results in the normal
// range, plus directed cases: cancellation, zeros, infinities, NaN,
// overflow, far-apart exponents and ties. Each result must appear exactly
// ALPHA cycles after its operands, with its tag.
module tb_fp_add_pipe;

  localparam int unsigned A64 = 14;
  localparam int unsigned A32 = 5;
  localparam int unsigned N_RANDOM = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- DUTs ----------------
  logic        v64_in, v64_out, v32_in, v32_out;
  logic [63:0] a64, b64, s64;
  logic [31:0] a32, b32, s32;
  logic [15:0] t64_in, t64_out, t32_in, t32_out;

  fp_add_pipe #(.TAG_W(16)) dut64 (
    .clk, .rst_n, .in_valid(v64_in), .in_a(a64), .in_b(b64), .in_tag(t64_in),
    .out_valid(v64_out), .out_sum(s64), .out_tag(t64_out)
  );

  fp_add_pipe #(.EXP_W(8), .MAN_W(23), .ALPHA(A32), .TAG_W(16)) dut32 (
    .clk, .rst_n, .in_valid(v32_in), .in_a(a32), .in_b(b32), .in_tag(t32_in),
    .out_valid(v32_out), .out_sum(s32), .out_tag(t32_out)
  );

  // ---------------- reference ----------------
  function automatic logic [63:0] ref64(input logic [63:0] a, input logic [63:0] b);
    return $realtobits($bitstoreal(a) + $bitstoreal(b));
  endfunction

  function automatic logic [63:0] widen(input logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'hff) return {f[31], 11'h7ff, f[22:0], 29'd0};
    if (f[30:23] == 8'h00) return {f[31], 63'd0};
    e = 11'(f[30:23]) + 11'd896;
    return {f[31], e, f[22:0], 29'd0};
  endfunction

  function automatic logic [31:0] narrow(input logic [63:0] d);
    logic        s;
    int          e;
    logic [51:0] m;
    logic [23:0] r;
    logic        g, st;
    s = d[63];
    e = int'(d[62:52]);
    m = d[51:0];
    if (e == 2047) return (m != 0) ? 32'h7fc00000 : {s, 8'hff, 23'd0};
    if (e == 0) return {s, 31'd0};
    e = e - 1023 + 127;
    g  = m[28];
    st = |m[27:0];
    r  = {1'b0, m[51:29]} + 24'(g && (st || m[29]));
    if (r[23]) e = e + 1;
    if (e >= 255) return {s, 8'hff, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), r[22:0]};
  endfunction

  function automatic logic [31:0] ref32(input logic [31:0] a, input logic [31:0] b);
    return narrow($realtobits($bitstoreal(widen(a)) + $bitstoreal(widen(b))));
  endfunction

  function automatic logic is_nan64(input logic [63:0] x);
    return x[62:52] == 11'h7ff && x[51:0] != 0;
  endfunction
  function automatic logic is_nan32(input logic [31:0] x);
    return x[30:23] == 8'hff && x[22:0] != 0;
  endfunction

  // ---------------- scoreboards ----------------
  typedef struct { logic [63:0] exp_val; logic [15:0] tag; longint unsigned t; } exp64_t;
  typedef struct { logic [31:0] exp_val; logic [15:0] tag; longint unsigned t; } exp32_t;
  exp64_t q64[$];
  exp32_t q32[$];

  // outputs are sampled at the falling edge, clear of the rising-edge updates
  always @(negedge clk) begin
    if (rst_n && v64_out) begin
      exp64_t e;
      checks++;
      if (q64.size() == 0) begin
        failures++; $display("FAIL 64: unexpected output");
      end else begin
        e = q64.pop_front();
        if (!((s64 == e.exp_val) || (is_nan64(s64) && is_nan64(e.exp_val)))
            || t64_out != e.tag || cycle - e.t != A64) begin
          failures++;
          $display("FAIL 64: tag %0d got %h exp %h latency %0d", e.tag, s64, e.exp_val, cycle - e.t);
        end
      end
    end
    if (rst_n && v32_out) begin
      exp32_t e;
      checks++;
      if (q32.size() == 0) begin
        failures++; $display("FAIL 32: unexpected output");
      end else begin
        e = q32.pop_front();
        if (!((s32 == e.exp_val) || (is_nan32(s32) && is_nan32(e.exp_val)))
            || t32_out != e.tag || cycle - e.t != A32) begin
          failures++;
          $display("FAIL 32: tag %0d got %h exp %h latency %0d", e.tag, s32, e.exp_val, cycle - e.t);
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  function automatic logic [63:0] rnd64();
    logic [10:0] e;
    e = 11'(1023 - 60 + ($urandom % 121));
    return {1'($urandom), e, $urandom, 20'($urandom)};
  endfunction
  function automatic logic [31:0] rnd32();
    logic [7:0] e;
    e = 8'(127 - 30 + ($urandom % 61));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // inputs change at the falling edge and are taken at the next rising edge
  task automatic send(input logic [63:0] a, input logic [63:0] b,
                      input logic [31:0] c, input logic [31:0] d, input logic [15:0] tag);
    @(negedge clk);
    a64 = a; b64 = b; a32 = c; b32 = d;
    t64_in = tag; t32_in = tag;
    v64_in = 1'b1; v32_in = 1'b1;
    q64.push_back('{ref64(a, b), tag, cycle});
    q32.push_back('{ref32(c, d), tag, cycle});
  endtask

  task automatic idle();
    @(negedge clk);
    v64_in = 1'b0; v32_in = 1'b0;
  endtask

  logic [63:0] dir64 [$];
  logic [31:0] dir32 [$];

  initial begin
    logic [63:0] x, y;
    logic [31:0] p, r;
    v64_in = 0; v32_in = 0; a64 = 0; b64 = 0; a32 = 0; b32 = 0; t64_in = 0; t32_in = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // directed pairs (double, single)
    dir64 = '{64'h3ff0000000000000, 64'h3ff0000000000000,   // 1 + 1
              64'h3ff0000000000000, 64'hbff0000000000000,   // 1 - 1 = +0
              64'h0000000000000000, 64'h8000000000000000,   // +0 + -0
              64'h8000000000000000, 64'h8000000000000000,   // -0 + -0
              64'h7ff0000000000000, 64'h3ff0000000000000,   // inf + 1
              64'h7ff0000000000000, 64'hfff0000000000000,   // inf - inf = NaN
              64'h7ff8000000000000, 64'h3ff0000000000000,   // NaN + 1
              64'h7fefffffffffffff, 64'h7fefffffffffffff,   // overflow
              64'h3ff0000000000000, 64'h3ca0000000000000,   // 1 + 2^-53 tie -> even
              64'h3ff0000000000001, 64'h3ca0000000000000,   // tie -> up
              64'h3ff0000000000000, 64'h0010000000000000,   // far apart
              64'h3ff0000000000000, 64'hbca0000000000001,   // 1 - just over 2^-53
              64'h4000000000000000, 64'hbfffffffffffffff,   // cancellation
              64'h0000000000000001, 64'h3ff0000000000000};  // subnormal read as 0
    dir32 = '{32'h3f800000, 32'h3f800000,
              32'h3f800000, 32'hbf800000,
              32'h00000000, 32'h80000000,
              32'h80000000, 32'h80000000,
              32'h7f800000, 32'h3f800000,
              32'h7f800000, 32'hff800000,
              32'h7fc00000, 32'h3f800000,
              32'h7f7fffff, 32'h7f7fffff,
              32'h3f800000, 32'h33800000,
              32'h3f800001, 32'h33800000,
              32'h3f800000, 32'h00800000,
              32'h3f800000, 32'hb3800001,
              32'h40000000, 32'hbfffffff,
              32'h00000001, 32'h3f800000};
    for (int i = 0; i < dir64.size(); i += 2)
      send(dir64[i], dir64[i+1], dir32[i], dir32[i+1], 16'(i));

    // random pairs, back to back, with occasional idle cycles
    for (int i = 0; i < N_RANDOM; i++) begin
      x = rnd64(); y = rnd64(); p = rnd32(); r = rnd32();
      if (i % 7 == 3) begin y = {~x[63], x[62:0]}; y[3:0] = 4'($urandom); end  // near cancellation
      if (i % 7 == 5) begin r = {~p[31], p[30:0]}; r[2:0] = 3'($urandom); end
      if (i % 11 == 0) begin y[62:52] = x[62:52]; r[30:23] = p[30:23]; end      // same exponent
      send(x, y, p, r, 16'(i + 100));
      if ($urandom % 8 == 0) idle();
    end
    idle();
    repeat (A64 + 4) @(posedge clk);
    if (q64.size() != 0 || q32.size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d results missing", q64.size(), q32.size());
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

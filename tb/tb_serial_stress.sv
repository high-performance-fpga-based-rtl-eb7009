// tb_serial_stress: load test of the serial circuit's three-word buffer
// levels.
//
// Three serial circuits (8 buffer levels, adders of 5, 14 and 30 stages)
// receive the same stream: twelve patterns of 400 back-to-back sets each,
// with no idle cycle. The patterns are the set lengths that stress adder B
// and the buffer levels most: constant short odd lengths (3, 5, 7, 9, 17),
// alternating 2 and 3, lengths 2^k + 1, a 255-value set followed by very
// short ones, 129 and 3 alternating, and random lengths. Every value is
// 1.0, so a set's sum is its length. Checked: every sum and set number, and
// that no level ever overflows.
module tb_serial_stress;

  import reduce_pkg::*;

  localparam int unsigned LOG_N   = 8;
  localparam int unsigned N_PAT   = 12;
  localparam int unsigned PER_PAT = 400;
  localparam int unsigned N_SETS  = N_PAT * PER_PAT;
  localparam int unsigned NDUT    = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;

  logic        in_valid, in_last;
  logic [63:0] in_data;
  logic        out_valid [NDUT];
  logic [63:0] out_data  [NDUT];
  set_id_t     out_id    [NDUT];
  logic        overflow  [NDUT];
  logic        too_long  [NDUT];

  serial_reduce #(.ALPHA(5),  .LOG_N(LOG_N)) dut_a5 (
    .clk, .rst_n, .in_valid, .in_data, .in_last, .out_valid(out_valid[0]),
    .out_data(out_data[0]), .out_id(out_id[0]), .overflow(overflow[0]), .too_long(too_long[0]));
  serial_reduce #(.ALPHA(14), .LOG_N(LOG_N)) dut_a14 (
    .clk, .rst_n, .in_valid, .in_data, .in_last, .out_valid(out_valid[1]),
    .out_data(out_data[1]), .out_id(out_id[1]), .overflow(overflow[1]), .too_long(too_long[1]));
  serial_reduce #(.ALPHA(30), .LOG_N(LOG_N)) dut_a30 (
    .clk, .rst_n, .in_valid, .in_data, .in_last, .out_valid(out_valid[2]),
    .out_data(out_data[2]), .out_id(out_id[2]), .overflow(overflow[2]), .too_long(too_long[2]));

  // set lengths, indexed by set number modulo 256 (set numbers wrap; a set
  // always finishes long before its number is reused)
  int len [256];
  int n_out [NDUT];

  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < int'(NDUT); d++) if (out_valid[d]) begin
      checks++;
      n_out[d]++;
      if ($bitstoreal(out_data[d]) != real'(len[out_id[d]])) begin
        failures++;
        $display("FAIL circuit %0d set %0d: got %f exp %0d", d, out_id[d], $bitstoreal(out_data[d]), len[out_id[d]]);
      end
    end
  end

  function automatic int pick_len(input int p, input int s);
    case (p)
      0:  return 3;
      1:  return 5;
      2:  return (s % 2) ? 2 : 3;
      3:  return 1 + $urandom % 4;
      4:  return (1 << ($urandom % LOG_N)) + 1;
      5:  return 1 + $urandom % 20;
      6:  return (s % 3 == 0) ? 255 : 1 + $urandom % 3;
      7:  return 9;
      8:  return 17;
      9:  return 7;
      10: return (s % 2) ? 129 : 3;
      default: return 1 + $urandom % (1 << LOG_N);
    endcase
  endfunction

  initial begin
    int m, s;
    in_valid = 0; in_last = 0; in_data = 0;
    for (int d = 0; d < int'(NDUT); d++) n_out[d] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    s = 0;
    for (int p = 0; p < int'(N_PAT); p++) begin
      for (int k = 0; k < int'(PER_PAT); k++) begin
        m = pick_len(p, k);
        len[s % 256] = m;
        for (int i = 0; i < m; i++) begin
          in_valid = 1;
          in_data  = $realtobits(1.0);
          in_last  = (i == m - 1);
          @(negedge clk);
        end
        s++;
      end
    end
    in_valid = 0;
    repeat (2000) @(negedge clk);
    for (int d = 0; d < int'(NDUT); d++) begin
      checks++;
      if (n_out[d] != int'(N_SETS) || overflow[d] || too_long[d]) begin
        failures++;
        $display("FAIL circuit %0d: %0d of %0d results, overflow=%b too_long=%b",
                 d, n_out[d], N_SETS, overflow[d], too_long[d]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

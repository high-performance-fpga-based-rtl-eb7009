// tb_serial_input_buffer: self-checking testbench of the input buffer of the
// serial circuit.
//
// Sets of random length (1 to 9 values, so both odd and even lengths and
// single-value sets occur) are fed back to back with random idle cycles.
// For every input value the testbench works out from the value's index i in
// its set of length m what must be issued to adder A in that cycle: nothing
// for an even i below m-1, the pair (value i-1, value i) for an odd i, and
// (value i, +0.0) for an even i equal to m-1; "first" is set for the pair
// that holds index 0 and "last" for the pair that holds index m-1.
module tb_serial_input_buffer;

  import reduce_pkg::*;

  localparam int unsigned WIDTH = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0;
  int failures = 0;
  int n_pairs = 0, n_pads = 0;

  logic             in_valid, in_last, issue_valid;
  logic [WIDTH-1:0] in_data, issue_a, issue_b;
  tag_t             issue_tag;

  serial_input_buffer #(.WIDTH(WIDTH)) dut (.*);

  initial begin
    logic [WIDTH-1:0] vals [$];
    int m;
    logic exp_v, exp_first, exp_last;
    logic [WIDTH-1:0] exp_a, exp_b;
    in_valid = 0; in_last = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 600; s++) begin
      m = 1 + $urandom % 9;
      vals.delete();
      for (int i = 0; i < m; i++) begin
        while ($urandom % 4 == 0) begin
          @(negedge clk);
          in_valid = 0;
          #1;
          checks++;
          if (issue_valid) begin failures++; $display("FAIL issue without input"); end
        end
        @(negedge clk);
        in_valid = 1;
        in_data  = {$urandom, $urandom};
        in_last  = (i == m - 1);
        vals.push_back(in_data);
        exp_v = (i % 2 == 1) || (i == m - 1);
        exp_a = (i % 2 == 1) ? vals[i-1] : vals[i];
        exp_b = (i % 2 == 1) ? vals[i] : '0;
        exp_first = (i <= 1);
        exp_last  = (i == m - 1);
        #1;
        checks++;
        if (issue_valid != exp_v ||
            (exp_v && (issue_a != exp_a || issue_b != exp_b || issue_tag.first != exp_first
                       || issue_tag.last != exp_last || issue_tag.id != set_id_t'(s)))) begin
          failures++;
          $display("FAIL set %0d idx %0d of %0d: v=%b a=%h b=%h tag=%p", s, i, m,
                   issue_valid, issue_a, issue_b, issue_tag);
        end
        if (exp_v && (i % 2 == 1)) n_pairs++;
        if (exp_v && (i % 2 == 0)) n_pads++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (n_pairs == 0 || n_pads == 0) begin failures++; $display("FAIL: pairs or pads never seen"); end
    $display("pairs=%0d zero-padded=%0d", n_pairs, n_pads);
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

// reduction_top: the serial and the parallel reduction circuits side by
// side.
//
// Both circuits solve the same problem: sets of floating-point values of
// arbitrary length arrive one value per clock with no gap between sets, and
// each set must be reduced to its sum without stalling the input and with
// small, bounded buffering. The serial circuit (serial_reduce) folds a
// binary reduction tree onto two pipelined adders and lg(n) three-word
// buffer levels, for sets of up to n = 2^LOG_N values; the parallel circuit
// (parallel_reduce) accumulates each set in one adder's pipeline and
// coalesces the partial sums while the second adder starts the next set.
// The two are independent: each has its own input and output ports (s_* for
// the serial circuit, p_* for the parallel one) and only clock and reset are
// shared.
//
// Parameters: EXP_W/MAN_W select the IEEE-754 format (11/52: double
// precision), ALPHA the adder pipeline depth, LOG_N the serial circuit's
// maximum set length 2^LOG_N, BUF_DEPTH the words per buffer level.
// Timing of each port group is described in serial_reduce and
// parallel_reduce.
module reduction_top
  import reduce_pkg::*;
#(
  parameter int unsigned EXP_W     = 11,
  parameter int unsigned MAN_W     = 52,
  parameter int unsigned ALPHA     = 14,
  parameter int unsigned LOG_N     = 20,
  parameter int unsigned BUF_DEPTH = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // serial reduction circuit
  input  logic                 s_in_valid,
  input  logic [EXP_W+MAN_W:0] s_in_data,
  input  logic                 s_in_last,
  output logic                 s_out_valid,
  output logic [EXP_W+MAN_W:0] s_out_data,
  output set_id_t              s_out_id,
  output logic                 s_overflow,
  output logic                 s_too_long,
  // parallel reduction circuit
  input  logic                 p_in_valid,
  input  logic [EXP_W+MAN_W:0] p_in_data,
  input  logic                 p_in_last,
  output logic                 p_out_valid,
  output logic [EXP_W+MAN_W:0] p_out_data,
  output set_id_t              p_out_id,
  output mode_t                p_mode [2],
  output logic [$clog2(ALPHA*($clog2(ALPHA)+1)+1)-1:0] p_fifo_count,
  output logic                 p_overflow
);

  serial_reduce #(
    .EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA), .LOG_N(LOG_N), .BUF_DEPTH(BUF_DEPTH)
  ) u_serial (
    .clk, .rst_n,
    .in_valid(s_in_valid), .in_data(s_in_data), .in_last(s_in_last),
    .out_valid(s_out_valid), .out_data(s_out_data), .out_id(s_out_id),
    .overflow(s_overflow), .too_long(s_too_long)
  );

  parallel_reduce #(
    .EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA)
  ) u_parallel (
    .clk, .rst_n,
    .in_valid(p_in_valid), .in_data(p_in_data), .in_last(p_in_last),
    .out_valid(p_out_valid), .out_data(p_out_data), .out_id(p_out_id),
    .mode(p_mode), .fifo_count(p_fifo_count), .overflow(p_overflow)
  );

endmodule

// par_reduce_unit: one adder of the parallel reduction circuit with its
// mode controller.
//
// The unit reduces one set at a time with a single ALPHA-stage pipelined
// adder. It moves through the four modes of the parallel method:
//   WAIT     - idle; the first value of a new set is taken from the FIFO and
//              sent into the adder with +0.0, and the unit enters FILL.
//   FILL     - each new value enters the adder with +0.0 while the pipeline
//              fills and no sum has come out yet. The first sum out of the
//              pipeline moves the unit to STEADY.
//   STEADY   - each sum leaving the pipeline is added to the next value from
//              the FIFO and sent back in, so ALPHA running partial sums
//              circulate in the pipeline.
//   COALESCE - entered when the last value of the set is read (from FILL, or
//              from STEADY). Sums leaving the pipeline are paired with each
//              other: the first of a pair waits in a hold register, the
//              second is added to it. When the pipeline is empty and a
//              single value remains in the hold register, that value is the
//              set's sum; once the output takes it, the unit returns to WAIT.
// A hold register also absorbs gaps in the input: a pipeline sum that finds
// no new value waits there and is added to the next one that appears.
//
// The four modes and their transitions (wait->fill, fill->steady,
// fill->coalesce, steady->coalesce, coalesce->wait) follow the document;
// the hold register, the exact pairing rules and the gap handling are this
// design's own. A set read in WAIT that is only one value long passes
// through FILL for one cycle before COALESCE.
//
// Interface and timing: the unit reads the FIFO only while own is high and
// it is in WAIT, FILL or STEADY with the set's last value not yet read.
// fifo_* present the FIFO's oldest word (fifo_valid = not empty); pop takes
// it at the rising clk edge, and took_last says the word was the set's
// last, which passes input ownership to the other unit. res_valid/res_data/
// res_id hold the set's sum until res_ready. rst_n is an active-low
// synchronous reset. The adder's side tag is not needed here (all sums in
// the pipeline belong to the set being reduced), so its tag output is left
// unused.
module par_reduce_unit
  import reduce_pkg::*;
#(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52,
  parameter int unsigned ALPHA = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 own,
  input  logic                 fifo_valid,
  input  logic [EXP_W+MAN_W:0] fifo_data,
  input  logic                 fifo_last,
  input  set_id_t              fifo_id,
  output logic                 pop,
  output logic                 took_last,
  output logic                 res_valid,
  output logic [EXP_W+MAN_W:0] res_data,
  output set_id_t              res_id,
  input  logic                 res_ready,
  output mode_t                mode
);

  localparam int unsigned W  = EXP_W + MAN_W + 1;
  localparam int unsigned FW = $clog2(ALPHA + 1);

  mode_t         mode_q, mode_n;
  logic          hold_v_q, hold_v_n;
  logic [W-1:0]  hold_q, hold_n;
  logic [FW-1:0] inflight_q;
  logic          last_seen_q;
  set_id_t       id_q;

  logic          add_in_valid, add_out_valid;
  logic [W-1:0]  add_in_a, add_in_b, add_out_sum;
  logic          add_out_tag;
  logic          take;      // a FIFO value is available to this unit
  logic          o;         // a sum leaves the pipeline this cycle

  assign o    = add_out_valid;
  assign take = own && fifo_valid &&
                ((mode_q == MODE_WAIT) ||
                 ((mode_q == MODE_FILL || mode_q == MODE_STEADY) && !last_seen_q));
  assign res_valid = (mode_q == MODE_COALESCE) && (inflight_q == '0) && hold_v_q;
  assign res_data  = hold_q;
  assign res_id    = id_q;
  assign took_last = pop && fifo_last;
  assign mode      = mode_q;

  always_comb begin
    add_in_valid = 1'b0;
    add_in_a     = '0;
    add_in_b     = '0;
    pop          = 1'b0;
    hold_v_n     = hold_v_q;
    hold_n       = hold_q;
    if (mode_q == MODE_WAIT) begin
      if (take) begin
        add_in_valid = 1'b1;
        add_in_a     = fifo_data;
        pop          = 1'b1;
      end
    end else if (o && take) begin            // pipeline sum + new value
      add_in_valid = 1'b1;
      add_in_a     = add_out_sum;
      add_in_b     = fifo_data;
      pop          = 1'b1;
    end else if (o && hold_v_q) begin        // pipeline sum + held sum
      add_in_valid = 1'b1;
      add_in_a     = add_out_sum;
      add_in_b     = hold_q;
      hold_v_n     = 1'b0;
    end else if (take && hold_v_q) begin     // held sum + new value
      add_in_valid = 1'b1;
      add_in_a     = hold_q;
      add_in_b     = fifo_data;
      pop          = 1'b1;
      hold_v_n     = 1'b0;
    end else if (o) begin                    // sum waits for a partner
      hold_v_n     = 1'b1;
      hold_n       = add_out_sum;
    end else if (take) begin                 // fill: value + 0
      add_in_valid = 1'b1;
      add_in_a     = fifo_data;
      pop          = 1'b1;
    end
    if (res_valid && res_ready) hold_v_n = 1'b0;
  end

  always_comb begin
    mode_n = mode_q;
    unique case (mode_q)
      MODE_WAIT:     if (take) mode_n = MODE_FILL;
      MODE_FILL:     if (last_seen_q || took_last) mode_n = MODE_COALESCE;
                     else if (o) mode_n = MODE_STEADY;
      MODE_STEADY:   if (took_last) mode_n = MODE_COALESCE;
      MODE_COALESCE: if (res_valid && res_ready) mode_n = MODE_WAIT;
      default:       mode_n = MODE_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q      <= MODE_WAIT;
      hold_v_q    <= 1'b0;
      inflight_q  <= '0;
      last_seen_q <= 1'b0;
    end else begin
      mode_q     <= mode_n;
      hold_v_q   <= hold_v_n;
      inflight_q <= inflight_q + FW'(add_in_valid) - FW'(o);
      if (pop) last_seen_q <= fifo_last;
    end
  end

  always_ff @(posedge clk) begin
    hold_q <= hold_n;
    if (mode_q == MODE_WAIT && take) id_q <= fifo_id;
  end

  fp_add_pipe #(.EXP_W(EXP_W), .MAN_W(MAN_W), .ALPHA(ALPHA), .TAG_W(1)) u_add (
    .clk, .rst_n,
    .in_valid(add_in_valid), .in_a(add_in_a), .in_b(add_in_b), .in_tag(1'b0),
    .out_valid(add_out_valid), .out_sum(add_out_sum), .out_tag(add_out_tag)
  );

  always_ff @(posedge clk) begin
    if (rst_n) assert (inflight_q <= FW'(ALPHA)) else $error("par_reduce_unit: pipeline count out of range");
  end

endmodule

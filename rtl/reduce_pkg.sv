// reduce_pkg: types and constants shared by the serial and the parallel
// reduction circuits.
//
// Every value that travels through a reduction circuit carries a small tag:
// the number of the set it belongs to and two flags that mark where the value
// sits in its set at its level of the reduction tree. The flags let the
// circuits delimit sets of any length without counters per set, and let two
// consecutive sets share the adders with no gap between them.
// The set number is this design's own addition: finished sums can leave the
// circuits in a different order from their sets, and the number says which
// set a sum belongs to.
package reduce_pkg;

  // Width of the set number carried with every value (wraps around).
  localparam int unsigned SET_ID_W = 8;

  typedef logic [SET_ID_W-1:0] set_id_t;

  // Position of a value within its set at one level of the reduction tree.
  //   first : the value is the first one of its set at this level
  //   last  : the value is the last one of its set at this level
  // A value with both flags set is the finished sum of the set.
  typedef struct packed {
    logic    first;
    logic    last;
    set_id_t id;
  } tag_t;

  localparam int unsigned TAG_W = $bits(tag_t);

  // Modes of one adder of the parallel method.
  typedef enum logic [1:0] {
    MODE_WAIT     = 2'd0,  // waiting for a new set
    MODE_FILL     = 2'd1,  // pipeline filling, no output yet
    MODE_STEADY   = 2'd2,  // pipeline output combined with new values
    MODE_COALESCE = 2'd3   // last value read, partial sums being combined
  } mode_t;

endpackage

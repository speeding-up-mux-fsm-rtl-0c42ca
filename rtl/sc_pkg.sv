// sc_pkg: types and helper functions shared by the split-shift MUX-FSM
// stochastic-computing multiplier.
//
// The controller drives every lane with one command per clock, a cnt_cmd_t.
// A command tells the lane what to do with its counter and which activation
// bits to count. It has R_MAX slots; a lane with bit-parallel level R uses
// slots 0..R-1, and the serial lane (R = 1) only slot 0. Each enabled slot
// selects one activation bit through the MUX and gives the weight, as a left
// shift, at which that bit is added.
//
// The index-sequence helper gives the MUX index of each position of the fixed
// sequence the conventional MUX-FSM uses: position k (k = 1, 2, ...) of an
// n-bit sequence selects bit n-1-tz(k) of the activation, where tz(k) is the
// number of trailing zeros of k.
package sc_pkg;

  // Counter operation issued to every lane.
  typedef enum logic [2:0] {
    CNT_NONE      = 3'd0,  // hold
    CNT_CLR       = 3'd1,  // clear the counter and capture the activation input
    CNT_SHIFT     = 3'd2,  // counter <= counter << 1
    CNT_ADD       = 3'd3,  // counter <= counter + slots
    CNT_SHIFT_ADD = 3'd4   // counter <= (counter << 1) + slots
  } cnt_op_e;

  // Sizes of the command fields: operands of up to 16 bits and up to eight
  // bits counted per cycle. The modules check that their N and R fit.
  localparam int unsigned SEL_W = 4;
  localparam int unsigned WSH_W = 3;
  localparam int unsigned R_MAX = 8;

  typedef struct packed {
    logic             en;   // slot counts a bit this cycle
    logic [SEL_W-1:0] sel;  // index of the activation bit the MUX selects
    logic [WSH_W-1:0] wsh;  // weight of the increment, as a left shift
  } cnt_slot_t;

  typedef struct packed {
    cnt_op_e                     op;
    cnt_slot_t [R_MAX-1:0]       slot;
  } cnt_cmd_t;

  localparam cnt_cmd_t CMD_NONE = '{op: CNT_NONE, slot: '0};

  // Number of trailing zeros of a non-zero value (0 for zero).
  function automatic int unsigned tz(input logic [15:0] k);
    int unsigned t;
    logic        found;
    t     = 0;
    found = 1'b0;
    for (int b = 0; b < 16; b++) begin
      if (!found && k[b]) begin
        t     = b;
        found = 1'b1;
      end
    end
    return t;
  endfunction

endpackage

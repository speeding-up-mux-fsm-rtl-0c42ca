// sc_controller: the FSM controller of the split-shift MUX-FSM multiplier.
//
// It holds the master FSM, the three slave FSMs (step 1: common bit streams,
// step 2: tail bits, step 3: the W_L bit stream) and the tail lookup table
// inside tail_fsm. For a weight W, given with a one-cycle start, it emits one
// counter command per cycle on cmd; every lane that obeys the commands ends
// with the MUX-FSM approximation of I * W / 2**N in its counter. Since the
// commands depend only on W, one controller can serve any number of lanes.
//
// R is the number of activation bits a lane counts per cycle: 1 for the
// serial architecture (the default), more for the bit-parallel extension.
//
// Timing: the command in the start cycle is CNT_CLR. Then, with W_H and W_L
// the upper and lower N/2 bits of W, follow
//   R = 1: popcount(W_H)*N/2 + max(bitlen(W_H)-1, 0) + W_H + W_L
//   R > 1: bitlen(W_H) + popcount(W_H)*(ceil(N/2/R)-1)
//          + ceil(W_H/R) + ceil(W_L/R)
// command cycles (busy high), after which done pulses for one cycle with the
// lane results valid. A start while busy is ignored.
//
// The partitioning into a master and three slaves and both cycle counts
// follow the document.
module sc_controller
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned R = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] w,
  output cnt_cmd_t     cmd,
  output logic         busy,
  output logic         done
);

  logic           go1, go2, go3;
  logic           last1, last2, last3;
  logic           act1, act2, act3;
  logic [N/2-1:0] wh, wl;
  cnt_cmd_t       cmd1, cmd2, cmd3;

  master_fsm #(.N(N)) u_master (
    .clk, .rst_n, .start, .w,
    .go1, .go2, .go3, .wh, .wl,
    .last1, .last2, .last3,
    .cmd1, .cmd2, .cmd3,
    .cmd, .busy, .done
  );

  cbs_fsm #(.N(N), .R(R)) u_step1 (
    .clk, .rst_n, .go(go1), .wh,
    .cmd(cmd1), .active(act1), .last(last1)
  );

  tail_fsm #(.N(N), .R(R)) u_step2 (
    .clk, .rst_n, .go(go2), .wh,
    .cmd(cmd2), .active(act2), .last(last2)
  );

  wl_fsm #(.N(N), .R(R)) u_step3 (
    .clk, .rst_n, .go(go3), .wl,
    .cmd(cmd3), .active(act3), .last(last3)
  );

  // At most one slave runs at a time.
  one_step : assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({act1, act2, act3}))
    else $error("sc_controller: two steps active at once");

endmodule

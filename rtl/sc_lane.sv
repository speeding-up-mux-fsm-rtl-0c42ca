// sc_lane: one MUX-FSM stochastic-computing multiplier datapath.
//
// A lane holds the activation I and a counter. Every clock the shared
// controller sends one command (sc_pkg::cnt_cmd_t). The lane's MUX picks, for
// each of its R command slots that is enabled, bit act_q[slot.sel] of I; the
// counter then holds, clears, doubles (a one-bit left shift), adds the picked
// bits each at weight 2**slot.wsh, or doubles and adds in one step.
//
// With R = 1 (the default) this is the serial datapath: a 1-bit MUX, a
// counter and the one-bit shift logic. Plain one-bit counting (wsh = 0) is
// what the conventional MUX-FSM does; the shift and the weighted add are what
// the split-shift scheme adds, so that one common bit stream is counted in
// N/2 cycles and then reused by doubling. With R > 1 it is the bit-parallel
// datapath: R MUXes and an accumulator that adds up to R bits per cycle.
//
// CNT_CLR clears the counter and captures act in the same cycle, so act needs
// to be valid only in the controller's start cycle. The counter is N bits
// wide, which holds any result: the count never exceeds W < 2**N. Every
// command takes effect at the next rising clock edge.
//
// The MUX, the counter, the shift and the R-bit accumulation follow the
// document's architecture. Capturing I at the start, the asynchronous reset
// and the weighted add (rather than counting into a shifted counter) are
// choices of this design.
module sc_lane
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned R = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cnt_cmd_t     cmd,
  input  logic [N-1:0] act,
  output logic [N-1:0] count
);

  logic [N-1:0] act_q;
  logic [N-1:0] inc;

  // The MUXes and the weighting of the picked bits.
  always_comb begin
    inc = '0;
    for (int j = 0; j < R; j++) begin
      if (cmd.slot[j].en)
        inc += N'(act_q[cmd.slot[j].sel[$clog2(N)-1:0]]) << cmd.slot[j].wsh;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= '0;
      count <= '0;
    end else begin
      unique case (cmd.op)
        CNT_CLR: begin
          act_q <= act;
          count <= '0;
        end
        CNT_SHIFT:     count <= count << 1;
        CNT_ADD:       count <= count + inc;
        CNT_SHIFT_ADD: count <= (count << 1) + inc;
        default:       ;
      endcase
    end
  end

  initial begin
    assert (N >= 2 && N <= 16 && N % 2 == 0)
      else $error("sc_lane: N must be even and between 2 and 16");
    assert (R >= 1 && R <= R_MAX)
      else $error("sc_lane: R must be between 1 and R_MAX");
  end

endmodule

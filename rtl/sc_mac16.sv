// sc_mac16: sum of LANES stochastic-computing products with a shared weight,
// I_1*W + I_2*W + ... + I_LANES*W.
//
// One sc_controller runs the split-shift MUX-FSM schedule for the weight W
// and broadcasts its counter command to LANES sc_lane datapaths, each holding
// one activation. When the controller finishes, every lane counter holds its
// product approximation sum_k I[N-1-tz(k)] over k = 1..W (about I*W/2**N) and
// an adder tree sums them; the registered sum is valid when done is high and
// is held until the next done.
//
// Interface: pulse start for one cycle with w and act[] valid (act[] is
// captured in that cycle). done pulses one cycle after the last counter
// command, and sum and count[] are valid from then until the next start.
// Cycles from the start cycle to the done cycle: 2 plus the command cycles
// given in sc_controller, for serial lanes (R = 1, the default)
// popcount(W_H)*N/2 + max(bitlen(W_H)-1, 0) + W_H + W_L, with W_H and W_L the
// upper and lower halves of W. R > 1 selects the bit-parallel extension, in
// which each lane counts up to R bits per cycle.
//
// Sixteen MUX-counter lanes under one shared controller follow the
// document's area and energy evaluation; the adder tree and output register
// are this design's choice.
module sc_mac16
  import sc_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned LANES = 16,
  parameter int unsigned R     = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [N-1:0]                      w,
  input  logic [LANES-1:0][N-1:0]           act,
  output logic                              busy,
  output logic                              done,
  output logic [LANES-1:0][N-1:0]           count,
  output logic [N+$clog2(LANES+1)-1:0]      sum
);

  localparam int unsigned SUM_W = N + $clog2(LANES + 1);

  cnt_cmd_t       cmd;
  logic           done_ctl;
  logic [SUM_W-1:0] sum_d;

  sc_controller #(.N(N), .R(R)) u_ctrl (
    .clk, .rst_n, .start, .w,
    .cmd, .busy, .done(done_ctl)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    sc_lane #(.N(N), .R(R)) u_lane (
      .clk, .rst_n, .cmd,
      .act   (act[l]),
      .count (count[l])
    );
  end

  always_comb begin
    sum_d = '0;
    for (int l = 0; l < LANES; l++) sum_d += SUM_W'(count[l]);
  end

  // The sum is taken in the cycle the controller reports done, one cycle after
  // the last command, and presented together with done.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      done <= 1'b0;
    end else begin
      done <= done_ctl;
      if (done_ctl) sum <= sum_d;
    end
  end

endmodule

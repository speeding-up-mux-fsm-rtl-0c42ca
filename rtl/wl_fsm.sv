// wl_fsm: slave FSM for step 3, counting the bit stream for W_L.
//
// The last, partial group of the index sequence is W_L positions long and is
// the start of the ordinary MUX-FSM sequence: position k (k = 1 .. W_L)
// selects activation bit N-1-tz(k), tz() counting trailing zeros. As in the
// conventional MUX-FSM, a counter walks k and a trailing-zero detector forms
// the MUX index. With serial lanes (R = 1) one CNT_ADD of weight 1 is issued
// per cycle and step 3 takes W_L cycles; with bit-parallel lanes positions
// k .. k+R-1 are counted together and it takes ceil(W_L / R) cycles.
//
// Interface: a one-cycle go with wl != 0 loads the FSM; it is active from the
// next cycle, drives one command per active cycle and raises last in its
// final active cycle. cmd is CMD_NONE when inactive.
//
// The sequence and the cycle counts follow the document; the handshake is
// this design's.
module wl_fsm
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned R = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,
  input  logic [N/2-1:0] wl,
  output cnt_cmd_t       cmd,
  output logic           active,
  output logic           last
);

  localparam int unsigned H   = N / 2;
  localparam int unsigned K_W = H + 4;   // k + R never overflows

  logic [H-1:0]   wl_q;
  logic [K_W-1:0] k;   // first sequence position of this cycle, 1 .. W_L

  always_comb begin
    cmd  = CMD_NONE;
    last = 1'b0;
    if (active) begin
      cmd.op = CNT_ADD;
      for (int j = 0; j < R; j++) begin
        cmd.slot[j].en  = (k + K_W'(j) <= K_W'(wl_q));
        cmd.slot[j].sel = SEL_W'(N - 1 - tz(16'(k + K_W'(j))));
      end
      last = (k + K_W'(R) > K_W'(wl_q));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      wl_q   <= '0;
      k      <= '0;
    end else if (go) begin
      active <= 1'b1;
      wl_q   <= wl;
      k      <= K_W'(1);
    end else if (active) begin
      if (last) active <= 1'b0;
      else      k      <= k + K_W'(R);
    end
  end

  go_nonzero : assert property (@(posedge clk) disable iff (!rst_n) go |-> wl != '0)
    else $error("wl_fsm: started with W_L = 0");

endmodule

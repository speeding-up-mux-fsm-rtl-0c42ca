// tail_fsm: slave FSM for step 2, counting the W_H tail bits.
//
// Each of the W_H full groups of the index sequence ends in one tail bit
// whose MUX index depends on the group number m. The FSM walks m from 0 to
// W_H - 1, reads the indices from tail_lut and issues CNT_ADD commands of
// weight 1: one tail bit per cycle with serial lanes (R = 1), so step 2 takes
// W_H cycles, or R tail bits per cycle with bit-parallel lanes, taking
// ceil(W_H / R) cycles.
//
// Interface: a one-cycle go with wh != 0 loads the FSM; it is active from the
// next cycle, drives one command per active cycle and raises last in its
// final active cycle. cmd is CMD_NONE when inactive.
//
// The LUT-driven counting and its cycle counts follow the document; the
// handshake is this design's.
module tail_fsm
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned R = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,
  input  logic [N/2-1:0] wh,
  output cnt_cmd_t       cmd,
  output logic           active,
  output logic           last
);

  localparam int unsigned H   = N / 2;
  localparam int unsigned M_W = H + 4;   // m + R never overflows

  logic [H-1:0]              wh_q;
  logic [M_W-1:0]            m;
  logic [R-1:0][SEL_W-1:0]   lut_sel;

  tail_lut #(.N(N), .R(R)) u_lut (
    .addr (m[H-1:0]),
    .sel  (lut_sel)
  );

  always_comb begin
    cmd  = CMD_NONE;
    last = 1'b0;
    if (active) begin
      cmd.op = CNT_ADD;
      for (int j = 0; j < R; j++) begin
        cmd.slot[j].en  = (m + M_W'(j) < M_W'(wh_q));
        cmd.slot[j].sel = lut_sel[j];
      end
      last = (m + M_W'(R) >= M_W'(wh_q));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      wh_q   <= '0;
      m      <= '0;
    end else if (go) begin
      active <= 1'b1;
      wh_q   <= wh;
      m      <= '0;
    end else if (active) begin
      if (last) active <= 1'b0;
      else      m      <= m + M_W'(R);
    end
  end

  go_nonzero : assert property (@(posedge clk) disable iff (!rst_n) go |-> wh != '0)
    else $error("tail_fsm: started with W_H = 0");

endmodule

// cbs_fsm: slave FSM for step 1, counting the common bit streams (CBSs).
//
// The first W_H groups of 2**(N/2) positions of the index sequence all start
// with the same 2**(N/2) - 1 positions, the common bit stream. In it bit
// I[N-1] appears 2**(N/2-1) times, I[N-2] half as often, down to I[N/2] once,
// so its count is C = sum_i I[N-1-i] * 2**(N/2-1-i). This FSM adds W_H * C to
// the lane counters by binary multiplication, MSB of W_H first.
//
// Serial lanes (R = 1):
//   - for a 1 bit of W_H: N/2 cycles of CNT_ADD, cycle i adding I[N-1-i] at
//     weight 2**(N/2-1-i), which counts one whole CBS;
//   - before each lower bit of W_H: one CNT_SHIFT cycle that doubles the
//     counter.
//   Step 1 takes popcount(W_H)*N/2 + bitlen(W_H) - 1 cycles; for N = 6,
//   W_H = 3 that is 3 + 1 + 3 = 7 cycles.
// Bit-parallel lanes (R > 1): a CBS is added R bits at a time, in
//   NCH = ceil(N/2 / R) cycles, and the doubling before a 1 bit is merged
//   into the first of them (CNT_SHIFT_ADD); a 0 bit costs one CNT_SHIFT.
//   Step 1 takes bitlen(W_H) + popcount(W_H)*(NCH - 1) cycles, which is
//   bitlen(W_H) when R >= N/2.
//
// Interface: a one-cycle go with wh != 0 loads the FSM; it is active from the
// next cycle on, drives one command per active cycle on cmd, and raises last
// in its final active cycle. cmd is CMD_NONE when inactive.
//
// Both cycle counts and the count-then-double idea follow the document. That
// each CBS is added with weighted increments, so the counter is never shifted
// while it already holds a partial result, is this design's reading.
module cbs_fsm
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

  localparam int unsigned H     = N / 2;
  localparam int unsigned NCH   = (H + R - 1) / R;       // cycles per CBS
  localparam int unsigned BP_W  = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned CH_W  = (NCH > 1) ? $clog2(NCH) : 1;
  localparam bit          MERGE = (R > 1);               // shift merged into add

  typedef enum logic {PH_ADD, PH_SHIFT} phase_e;

  logic [H-1:0]    wh_q;
  logic [BP_W-1:0] bp;     // bit of W_H being processed
  logic [CH_W-1:0] ch;     // chunk of the CBS being added
  phase_e          phase;
  logic [BP_W-1:0] msb;
  logic            bit_done;

  // Position of the leading one of wh.
  always_comb begin
    msb = '0;
    for (int b = 0; b < H; b++) begin
      if (wh[b]) msb = BP_W'(b);
    end
  end

  // Slots for chunk c of the CBS: bit i = c*R + j, weight 2**(H-1-i).
  function automatic cnt_cmd_t chunk_cmd(input cnt_op_e op, input int unsigned c);
    cnt_cmd_t k;
    k    = CMD_NONE;
    k.op = op;
    for (int unsigned j = 0; j < R; j++) begin
      if (c * R + j < H) begin
        k.slot[j].en  = 1'b1;
        k.slot[j].sel = SEL_W'(N - 1 - (c * R + j));
        k.slot[j].wsh = WSH_W'(H - 1 - (c * R + j));
      end
    end
    return k;
  endfunction

  always_comb begin
    cmd      = CMD_NONE;
    last     = 1'b0;
    bit_done = 1'b0;
    if (active) begin
      if (phase == PH_ADD) begin
        cmd      = chunk_cmd(CNT_ADD, int'(ch));
        bit_done = (ch == CH_W'(NCH - 1));
      end else if (MERGE && wh_q[bp]) begin
        cmd      = chunk_cmd(CNT_SHIFT_ADD, 0);
        bit_done = (NCH == 1);
      end else begin
        cmd.op   = CNT_SHIFT;
        bit_done = !wh_q[bp];
      end
      last = bit_done && (bp == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      wh_q   <= '0;
      bp     <= '0;
      ch     <= '0;
      phase  <= PH_ADD;
    end else if (go) begin
      active <= 1'b1;
      wh_q   <= wh;
      bp     <= msb;
      ch     <= '0;
      phase  <= PH_ADD;
    end else if (active) begin
      if (last) begin
        active <= 1'b0;
      end else if (bit_done) begin
        bp    <= bp - 1'b1;
        phase <= PH_SHIFT;
      end else if (phase == PH_ADD) begin
        ch <= ch + 1'b1;
      end else begin
        // a 1 bit after its shift: the remaining chunks of the CBS
        phase <= PH_ADD;
        ch    <= MERGE ? CH_W'(1) : '0;
      end
    end
  end

  go_nonzero : assert property (@(posedge clk) disable iff (!rst_n) go |-> wh != '0)
    else $error("cbs_fsm: started with W_H = 0");
  go_idle : assert property (@(posedge clk) disable iff (!rst_n) go |-> !active || last)
    else $error("cbs_fsm: started while busy");

endmodule

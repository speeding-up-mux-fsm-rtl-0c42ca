// master_fsm: sequences the three steps of the split-shift multiplication.
//
// On start (accepted only when idle) the weight W is split into W_H, its
// upper N/2 bits, and W_L, its lower N/2 bits. In the start cycle the master
// sends CNT_CLR to the lanes and starts the first step that has work:
//   step 1 (cbs_fsm) and step 2 (tail_fsm) when W_H != 0,
//   step 3 (wl_fsm) when W_L != 0.
// Each following step is started in the final cycle of the one before, so the
// lanes get a command in every cycle and no cycle is spent between steps.
// While a step runs, the master forwards that slave's command to the lanes.
// done pulses for one cycle after the last command has taken effect; with
// W = 0 it pulses in the cycle after start. busy is high from the cycle after
// start up to and including the last command cycle.
//
// Three slave FSMs under one master and the skipping of empty steps follow
// the document; the go/last handshake and done timing are this design's.
module master_fsm
  import sc_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   w,
  // slave handshake
  output logic           go1,
  output logic           go2,
  output logic           go3,
  output logic [N/2-1:0] wh,
  output logic [N/2-1:0] wl,
  input  logic           last1,
  input  logic           last2,
  input  logic           last3,
  input  cnt_cmd_t       cmd1,
  input  cnt_cmd_t       cmd2,
  input  cnt_cmd_t       cmd3,
  // to the lanes
  output cnt_cmd_t       cmd,
  output logic           busy,
  output logic           done
);

  localparam int unsigned H = N / 2;

  typedef enum logic [1:0] {ST_IDLE, ST_STEP1, ST_STEP2, ST_STEP3} state_e;

  state_e       state, state_d;
  logic [N-1:0] w_q;
  logic         done_d;

  // Operands for the slaves: straight from w in the start cycle, latched after.
  assign wh = (state == ST_IDLE) ? w[N-1:H] : w_q[N-1:H];
  assign wl = (state == ST_IDLE) ? w[H-1:0] : w_q[H-1:0];

  assign busy = (state != ST_IDLE);

  always_comb begin
    state_d = state;
    done_d  = 1'b0;
    go1     = 1'b0;
    go2     = 1'b0;
    go3     = 1'b0;
    cmd     = CMD_NONE;
    unique case (state)
      ST_IDLE: begin
        if (start) begin
          cmd.op = CNT_CLR;
          if (wh != '0) begin
            go1     = 1'b1;
            state_d = ST_STEP1;
          end else if (wl != '0) begin
            go3     = 1'b1;
            state_d = ST_STEP3;
          end else begin
            done_d  = 1'b1;
          end
        end
      end
      ST_STEP1: begin
        cmd = cmd1;
        if (last1) begin
          go2     = 1'b1;
          state_d = ST_STEP2;
        end
      end
      ST_STEP2: begin
        cmd = cmd2;
        if (last2) begin
          if (wl != '0) begin
            go3     = 1'b1;
            state_d = ST_STEP3;
          end else begin
            done_d  = 1'b1;
            state_d = ST_IDLE;
          end
        end
      end
      ST_STEP3: begin
        cmd = cmd3;
        if (last3) begin
          done_d  = 1'b1;
          state_d = ST_IDLE;
        end
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      w_q   <= '0;
      done  <= 1'b0;
    end else begin
      state <= state_d;
      done  <= done_d;
      if (state == ST_IDLE && start) w_q <= w;
    end
  end

  // In a running step the forwarded slave command is never empty.
  no_gap : assert property (@(posedge clk) disable iff (!rst_n) busy |-> cmd.op != CNT_NONE)
    else $error("master_fsm: idle cycle inside a multiplication");

endmodule

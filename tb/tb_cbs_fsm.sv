// tb_cbs_fsm: checks the step-1 slave FSM for serial lanes at N = 8 and
// N = 6 and for bit-parallel lanes (R = 4 and R = 2) at N = 8.
// For every non-zero W_H and random activations, the commands the FSM emits
// are applied to a model counter. The result must equal W_H times the count
// of the first 2**(N/2)-1 positions of the MUX-FSM sequence (one common bit
// stream). The FSM must run popcount(W_H)*N/2 + bitlen(W_H)-1 cycles with
// serial lanes, bitlen(W_H) + popcount(W_H)*(ceil(N/2/R)-1) with R > 1, and
// raise last in the final one; the N = 6, W_H = 3 example must take 7 cycles.
module tb_cbs_fsm;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [3:0] fin = '0;
  int   shifts_seen = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (fin == 4'b1111);
    checks++;
    if (shifts_seen == 0) begin
      failures++;
      $display("no shift command was seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS[4] = '{8, 6, 8, 8};
  localparam int RS[4] = '{1, 1, 4, 2};

  for (genvar g = 0; g < 4; g++) begin : g_n
    localparam int N = NS[g];
    localparam int R = RS[g];
    localparam int H = N / 2;

    logic         go;
    logic [H-1:0] wh;
    cnt_cmd_t     cmd;
    logic         active, last;

    cbs_fsm #(.N(N), .R(R)) dut (.clk, .rst_n, .go, .wh, .cmd, .active, .last);

    task automatic run_one(input int whv, input int iv);
      int acc = 0, cyc = 0, exp_acc, exp_cyc;
      bit saw_last = 0;
      go = 1'b1;
      wh = H'(whv);
      @(posedge clk);
      #1;
      go = 1'b0;
      while (active) begin
        cyc++;
        if (cmd.op == CNT_SHIFT || cmd.op == CNT_SHIFT_ADD) shifts_seen++;
        if (cmd.op == CNT_CLR || cmd.op == CNT_NONE || (R == 1 && cmd.op == CNT_SHIFT_ADD)) begin
          failures++;
          $display("N=%0d R=%0d: bad op", N, R);
        end
        acc = model_apply(cmd, iv, acc);
        if (last) saw_last = 1;
        else if (saw_last) failures++;
        @(posedge clk);
        #1;
        if (cyc > 100) break;
      end
      exp_acc = whv * ref_product(N, iv, (1 << H) - 1);
      exp_cyc = ref_step1_cycles(N, whv, R);
      checks += 3;
      if (acc != exp_acc) begin
        failures++;
        $display("N=%0d W_H=%0d I=%0d: count %0d expected %0d", N, whv, iv, acc, exp_acc);
      end
      if (cyc != exp_cyc) begin
        failures++;
        $display("N=%0d R=%0d W_H=%0d: %0d cycles expected %0d", N, R, whv, cyc, exp_cyc);
      end
      if (!saw_last) begin
        failures++;
        $display("N=%0d W_H=%0d: last never raised", N, whv);
      end
      // Table value for bit-parallel lanes with R >= N/2: ceil(log2(W_H+1))
      if (R >= H) begin
        checks++;
        if (cyc != $clog2(whv + 1)) begin
          failures++;
          $display("N=%0d R=%0d W_H=%0d: %0d cycles, not ceil(log2(W_H+1))", N, R, whv, cyc);
        end
      end
      if (N == 6 && R == 1 && whv == 3) begin
        checks++;
        if (cyc != 7) begin
          failures++;
          $display("worked example took %0d cycles, not 7", cyc);
        end
      end
    endtask

    initial begin
      go = 1'b0;
      wh = '0;
      @(posedge rst_n);
      @(posedge clk);
      #1;
      for (int whv = 1; whv < (1 << H); whv++) begin
        run_one(whv, (1 << N) - 1);
        for (int r = 0; r < 20; r++) run_one(whv, $urandom_range(0, (1 << N) - 1));
      end
      fin[g] = 1'b1;
    end
  end
endmodule

// tb_wl_fsm: checks the step-3 slave FSM for serial lanes at N = 8
// and N = 6 and for bit-parallel lanes (R = 4 and R = 3) at N = 8 and N = 6.
// For every non-zero W_L and activations with one bit set or random, the
// emitted commands are applied to a model counter; the result must be the
// sum of the activation bits at positions 1..W_L of the MUX-FSM sequence, and
// the FSM must take exactly ceil(W_L/R) cycles with last in the final
// one.
module tb_wl_fsm;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [3:0] fin = '0;

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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS[4] = '{8, 6, 8, 6};
  localparam int RS[4] = '{1, 1, 4, 3};

  for (genvar g = 0; g < 4; g++) begin : g_n
    localparam int N = NS[g];
    localparam int R = RS[g];
    localparam int H = N / 2;

    logic         go;
    logic [H-1:0] wl;
    cnt_cmd_t     cmd;
    logic         active, last;

    wl_fsm #(.N(N), .R(R)) dut (.clk, .rst_n, .go, .wl, .cmd, .active, .last);

    task automatic run_one(input int wlv, input int iv);
      int acc = 0, cyc = 0, exp_acc = 0;
      bit saw_last = 0;
      go = 1'b1;
      wl = H'(wlv);
      @(posedge clk);
      #1;
      go = 1'b0;
      while (active) begin
        cyc++;
        if (cmd.op != CNT_ADD || cmd.slot[0].wsh != 0) begin
          failures++;
          $display("N=%0d: unexpected command", N);
        end
        acc = model_apply(cmd, iv, acc);
        if (last) saw_last = 1;
        else if (saw_last) failures++;
        @(posedge clk);
        #1;
        if (cyc > 100) break;
      end
      exp_acc = ref_product(N, iv, wlv);
      checks += 3;
      if (acc != exp_acc) begin
        failures++;
        $display("N=%0d W_L=%0d I=%0d: count %0d expected %0d", N, wlv, iv, acc, exp_acc);
      end
      if (cyc != ceil_div(wlv, R)) begin
        failures++;
        $display("N=%0d W_L=%0d: %0d cycles", N, wlv, cyc);
      end
      if (!saw_last) begin
        failures++;
        $display("N=%0d W_L=%0d: last never raised", N, wlv);
      end
    endtask

    initial begin
      go = 1'b0;
      wl = '0;
      @(posedge rst_n);
      @(posedge clk);
      #1;
      for (int wlv = 1; wlv < (1 << H); wlv++) begin
        for (int b = 0; b < N; b++) run_one(wlv, 1 << b);
        for (int r = 0; r < 10; r++) run_one(wlv, $urandom_range(0, (1 << N) - 1));
      end
      fin[g] = 1'b1;
    end
  end
endmodule

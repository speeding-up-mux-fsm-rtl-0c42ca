// tb_sc_controller: checks the whole controller for serial lanes at N = 8
// and N = 6 and for bit-parallel lanes (R = 4 and R = 2) at N = 8.
// Every weight W is run with four random activations. The commands are
// applied to four model counters, which must end with the conventional
// MUX-FSM product sum_k I[N-1-tz(k)], k = 1..W. The number of command cycles
// must match popcount(W_H)*N/2 + bitlen(W_H)-1 + W_H + W_L for serial lanes,
// and ceil(log2(W_H+1)) + ceil(W_H/R) + ceil(W_L/R) for R = 4; done must
// come one cycle after the last command.
module tb_sc_controller;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int LN = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [3:0] fin = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  localparam int NS[4] = '{8, 6, 8, 8};
  localparam int RS[4] = '{1, 1, 4, 2};

  for (genvar g = 0; g < 4; g++) begin : g_n
    localparam int N = NS[g];
    localparam int R = RS[g];

    logic         start;
    logic [N-1:0] w;
    cnt_cmd_t     cmd;
    logic         busy, done;

    sc_controller #(.N(N), .R(R)) dut (.clk, .rst_n, .start, .w, .cmd, .busy, .done);

    task automatic run_one(input int wv);
      int iv[LN], acc[LN];
      int cyc = 0, busy_cyc = 0;
      for (int l = 0; l < LN; l++) iv[l] = $urandom_range(0, (1 << N) - 1);
      iv[0] = (1 << N) - 1;
      start = 1'b1;
      w     = N'(wv);
      #1;
      if (cmd.op == CNT_CLR) for (int l = 0; l < LN; l++) acc[l] = 0;
      else begin
        failures++;
        $display("N=%0d W=%0d: no CLR at start", N, wv);
      end
      @(posedge clk);
      #1;
      start = 1'b0;
      while (!done) begin
        cyc++;
        if (busy) busy_cyc++;
        for (int l = 0; l < LN; l++) acc[l] = model_apply(cmd, iv[l], acc[l]);
        @(posedge clk);
        #1;
        if (cyc > 300) break;
      end
      if (R == 4 && N == 8) begin
        int whv = wv >> 4, wlv = wv % 16;
        checks++;
        if (busy_cyc != $clog2(whv + 1) + ceil_div(whv, 4) + ceil_div(wlv, 4)) begin
          failures++;
          $display("N=8 R=4 W=%0d: %0d cycles, not the table value", wv, busy_cyc);
        end
      end
      for (int l = 0; l < LN; l++) begin
        checks++;
        if (acc[l] != ref_product(N, iv[l], wv)) begin
          failures++;
          $display("N=%0d R=%0d W=%0d I=%0d: %0d expected %0d", N, R, wv, iv[l], acc[l],
                   ref_product(N, iv[l], wv));
        end
      end
      checks += 2;
      if (busy_cyc != ref_cycles(N, wv, R)) begin
        failures++;
        $display("N=%0d W=%0d: %0d command cycles, expected %0d", N, wv, busy_cyc,
                 ref_cycles(N, wv, R));
      end
      if (cyc != ref_cycles(N, wv, R)) begin
        failures++;
        $display("N=%0d W=%0d: done after %0d cycles, expected %0d", N, wv, cyc + 1,
                 ref_cycles(N, wv, R) + 1);
      end
    endtask

    initial begin
      start = 1'b0;
      w     = '0;
      @(posedge rst_n);
      @(posedge clk);
      #1;
      // the worked example: W = 26 = 011 || 010 takes 7 + 3 + 2 = 12 cycles
      if (N == 6 && R == 1) begin
        checks++;
        if (ref_cycles(6, 26) != 12) failures++;
      end
      for (int wv = 0; wv < (1 << N); wv++) run_one(wv);
      fin[g] = 1'b1;
    end
  end
endmodule

// tb_cycle_sweep: weight sweep of the 16-lane unit at N = 6 and N = 8, with
// serial lanes (R = 1) and with bit-parallel lanes (R = 4).
// Every weight 0..2**N-1 is run once with random activations; each run's
// latency (start cycle to done cycle) must be ref_cycles(W) + 2 and each lane
// must hold the conventional MUX-FSM product. The average number of command
// cycles is printed next to the average of the conventional serial MUX-FSM
// (W cycles) and of the conventional bit-parallel one (ceil(W/R) cycles).
module tb_cycle_sweep;
  import tb_sc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [3:0] fin = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin == 4'b1111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS[4] = '{8, 6, 8, 6};
  localparam int RS[4] = '{1, 1, 4, 4};

  for (genvar g = 0; g < 4; g++) begin : g_n
    localparam int N     = NS[g];
    localparam int R     = RS[g];
    localparam int LANES = 16;

    logic                    start;
    logic [N-1:0]            w;
    logic [LANES-1:0][N-1:0] act;
    logic                    busy, done;
    logic [LANES-1:0][N-1:0] count;
    logic [N+4:0]            sum;

    sc_mac16 #(.N(N), .LANES(LANES), .R(R)) dut (.clk, .rst_n, .start, .w, .act, .busy, .done,
                                          .count, .sum);

    initial begin
      int total_cyc = 0, total_serial = 0;
      start = 1'b0;
      w     = '0;
      act   = '0;
      @(posedge rst_n);
      @(posedge clk);
      #1;
      for (int wv = 0; wv < (1 << N); wv++) begin
        int iv[LANES];
        int cyc;
        cyc = 0;
        for (int l = 0; l < LANES; l++) begin
          iv[l]  = $urandom_range(0, (1 << N) - 1);
          act[l] = N'(iv[l]);
        end
        start = 1'b1;
        w     = N'(wv);
        @(posedge clk);
        #1;
        start = 1'b0;
        while (!done && cyc < 200) begin
          cyc++;
          @(posedge clk);
          #1;
        end
        checks++;
        if (cyc != ref_cycles(N, wv, R) + 1) begin
          failures++;
          $display("N=%0d R=%0d W=%0d: latency %0d, expected %0d", N, R, wv, cyc + 1, ref_cycles(N, wv, R) + 2);
        end
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (int'(count[l]) != ref_product(N, iv[l], wv)) begin
            failures++;
            $display("N=%0d W=%0d lane %0d: wrong product", N, wv, l);
          end
        end
        total_cyc    += cyc - 1;
        total_serial += ceil_div(wv, R);
        @(posedge clk);
        #1;
      end
      $display("N=%0d R=%0d: average %0.3f command cycles per multiplication, conventional MUX-FSM %0.3f",
               N, R, real'(total_cyc) / (1 << N), real'(total_serial) / (1 << N));
      checks++;
      if (total_cyc >= total_serial) begin
        failures++;
        $display("N=%0d: no cycle saving", N);
      end
      fin[g] = 1'b1;
    end
  end
endmodule

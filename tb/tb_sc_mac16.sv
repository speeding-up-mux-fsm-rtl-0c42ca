// tb_sc_mac16: end-to-end test of the 16-lane shared-weight unit at its
// default size (N = 8, 16 lanes). Every weight 0..255, then random ones, is
// run with random activations. Each lane result must equal the conventional
// MUX-FSM product sum_k I[N-1-tz(k)], k = 1..W, and sum must be their total.
// done must arrive ref_cycles(W) + 2 cycles after start (start cycle, command
// cycles, controller done, registered sum). The test counts how often each
// mechanism was needed by a run whose results all checked out (doubling
// shifts, weighted adds for the common bit streams, tail counting, W_L
// counting, skipped steps, W = 0, a start while busy) and fails if one never
// was.
module tb_sc_mac16;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int N     = 8;
  localparam int LANES = 16;
  localparam int SUM_W = N + $clog2(LANES + 1);

  logic                     clk = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     start;
  logic [N-1:0]             w;
  logic [LANES-1:0][N-1:0]  act;
  logic                     busy, done;
  logic [LANES-1:0][N-1:0]  count;
  logic [SUM_W-1:0]         sum;

  int checks = 0, failures = 0;
  int n_shift = 0, n_wadd = 0, n_tail = 0, n_wl = 0;
  int n_skip_h = 0, n_skip_l = 0, n_zero = 0, n_busy_start = 0;

  sc_mac16 dut (.clk, .rst_n, .start, .w, .act, .busy, .done, .count, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int wv, input bit poke);
    int iv[LANES];
    int exp_sum = 0, cyc = 0, exp_cyc, fails_before;
    bit poked = 0;
    logic [SUM_W-1:0] prev_sum;
    for (int l = 0; l < LANES; l++) begin
      iv[l]  = $urandom_range(0, (1 << N) - 1);
      act[l] = N'(iv[l]);
    end
    prev_sum = sum;
    start = 1'b1;
    w     = N'(wv);
    @(posedge clk);
    #1;
    start = 1'b0;
    act   = '0;   // activations are captured in the start cycle
    w     = '0;
    while (!done) begin
      cyc++;
      if (poke && cyc == 3 && busy) begin
        start = 1'b1;   // ignored while busy
        w     = 8'hFF;
        poked = 1;
      end else start = 1'b0;
      if (sum != prev_sum) begin
        failures++;
        $display("W=%0d: sum changed before done", wv);
      end
      @(posedge clk);
      #1;
      if (cyc > 400) break;
    end
    start = 1'b0;
    exp_cyc = ref_cycles(N, wv) + 1;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("W=%0d: done %0d cycles after start, expected %0d", wv, cyc + 1, exp_cyc + 1);
    end
    fails_before = failures;
    for (int l = 0; l < LANES; l++) begin
      int e = ref_product(N, iv[l], wv);
      exp_sum += e;
      checks++;
      if (int'(count[l]) != e) begin
        failures++;
        $display("W=%0d lane %0d I=%0d: %0d expected %0d", wv, l, iv[l], count[l], e);
      end
    end
    checks++;
    if (int'(sum) != exp_sum) begin
      failures++;
      $display("W=%0d: sum %0d expected %0d", wv, sum, exp_sum);
    end
    if (failures == fails_before) begin
      int whv = wv >> (N / 2);
      int wlv = wv % (1 << (N / 2));
      if (whv != 0) begin
        n_shift += ref_bitlen(whv) - 1;
        n_wadd  += ref_popcount(whv);
        n_tail  += whv;
      end else n_skip_h++;
      if (wlv != 0) n_wl += wlv;
      else n_skip_l++;
      if (wv == 0) n_zero++;
      if (poked) n_busy_start++;
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    start = 1'b0;
    w     = '0;
    act   = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int wv = 0; wv < (1 << N); wv++) run_one(wv, wv % 5 == 0);
    for (int t = 0; t < 200; t++) run_one($urandom_range(0, (1 << N) - 1), t % 3 == 0);
    begin
      string names[8] = '{"doubling shift", "CBS count", "tail-bit count", "W_L count",
                          "steps 1-2 skipped", "step 3 skipped", "W = 0", "start while busy"};
      int seen[8];
      seen = '{n_shift, n_wadd, n_tail, n_wl, n_skip_h, n_skip_l, n_zero, n_busy_start};
      for (int m = 0; m < 8; m++) begin
        $display("%s: %0d", names[m], seen[m]);
        checks++;
        if (seen[m] == 0) begin
          failures++;
          $display("mechanism never exercised: %s", names[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

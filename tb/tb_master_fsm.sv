// tb_master_fsm: checks the master FSM with simple slave models.
// Slave 1 runs a random number of cycles, slave 2 W_H cycles and slave 3 W_L
// cycles, each marking its commands with its own number in slot 0 of cmd. The
// testbench checks the CLR in the start cycle, the order of the steps, the
// skipping of steps 1-2 when W_H = 0 and of step 3 when W_L = 0, that no cycle
// is lost between steps, that done follows the last command by one cycle,
// and that a start while busy is ignored.
module tb_master_fsm;
  import sc_pkg::*;

  localparam int N = 8;
  localparam int H = N / 2;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start;
  logic [N-1:0] w;
  logic         go1, go2, go3, last1, last2, last3;
  logic [H-1:0] wh, wl;
  cnt_cmd_t     cmd1, cmd2, cmd3, cmd;
  logic         busy, done;

  int checks = 0, failures = 0;
  int len1;                   // length the slave-1 model runs
  int rem1, rem2, rem3;       // remaining cycles of each slave model
  int skipped_h = 0, skipped_l = 0, ignored_starts = 0;

  master_fsm #(.N(N)) dut (
    .clk, .rst_n, .start, .w,
    .go1, .go2, .go3, .wh, .wl,
    .last1, .last2, .last3,
    .cmd1, .cmd2, .cmd3,
    .cmd, .busy, .done
  );

  always #5 clk = ~clk;

  // slave models
  always_comb begin
    cmd1 = CMD_NONE; cmd2 = CMD_NONE; cmd3 = CMD_NONE;
    if (rem1 > 0) begin cmd1.op = CNT_ADD; cmd1.slot[0].sel = 4'd1; end
    if (rem2 > 0) begin cmd2.op = CNT_ADD; cmd2.slot[0].sel = 4'd2; end
    if (rem3 > 0) begin cmd3.op = CNT_ADD; cmd3.slot[0].sel = 4'd3; end
    last1 = (rem1 == 1);
    last2 = (rem2 == 1);
    last3 = (rem3 == 1);
  end

  always @(posedge clk) begin
    if (go1) rem1 <= len1; else if (rem1 > 0) rem1 <= rem1 - 1;
    if (go2) rem2 <= int'(wh); else if (rem2 > 0) rem2 <= rem2 - 1;
    if (go3) rem3 <= int'(wl); else if (rem3 > 0) rem3 <= rem3 - 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int wv, input int l1, input bit poke);
    int whv = wv >> H, wlv = wv % (1 << H);
    int exp_seq[$], got_seq[$];
    int cyc = 0;
    len1 = l1;
    if (whv != 0) begin
      repeat (l1) exp_seq.push_back(1);
      repeat (whv) exp_seq.push_back(2);
    end else skipped_h++;
    if (wlv != 0) repeat (wlv) exp_seq.push_back(3);
    else skipped_l++;
    start = 1'b1;
    w     = N'(wv);
    #1;
    checks++;
    if (cmd.op != CNT_CLR) begin
      failures++;
      $display("W=%0d: no CLR in the start cycle", wv);
    end
    @(posedge clk);
    #1;
    start = 1'b0;
    w     = ~w;  // the master must use the weight latched at start
    while (busy) begin
      cyc++;
      if (poke && cyc == 2) begin
        start = 1'b1;  // must be ignored
        ignored_starts++;
      end else start = 1'b0;
      if (cmd.op != CNT_ADD) begin
        failures++;
        $display("W=%0d: busy cycle without a command", wv);
      end
      got_seq.push_back(int'(cmd.slot[0].sel));
      checks++;
      if (done) begin
        failures++;
        $display("W=%0d: done while busy", wv);
      end
      @(posedge clk);
      #1;
      if (cyc > 200) break;
    end
    start = 1'b0;
    checks += 2;
    if (!done) begin
      failures++;
      $display("W=%0d: done not raised right after the last command", wv);
    end
    if (got_seq != exp_seq) begin
      failures++;
      $display("W=%0d: step sequence wrong (%0d cycles, expected %0d)", wv,
               got_seq.size(), exp_seq.size());
    end
    @(posedge clk);
    #1;
    checks++;
    if (done || busy) begin
      failures++;
      $display("W=%0d: done longer than one cycle or busy again", wv);
    end
  endtask

  initial begin
    start = 1'b0;
    w     = '0;
    rem1 = 0; rem2 = 0; rem3 = 0; len1 = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    run_one(0, 1, 0);
    run_one(8'h0A, 1, 0);
    run_one(8'hA0, 3, 0);
    run_one(8'h1A, 7, 0);
    run_one(8'hFF, 19, 1);
    for (int t = 0; t < 300; t++)
      run_one($urandom_range(0, 255), $urandom_range(1, 19), t % 7 == 0);
    checks += 3;
    if (skipped_h == 0) begin failures++; $display("step 1-2 skip never exercised"); end
    if (skipped_l == 0) begin failures++; $display("step 3 skip never exercised"); end
    if (ignored_starts == 0) begin failures++; $display("busy start never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sc_lane: checks the lane datapath, serial (R = 1) and bit-parallel
// (R = 4), against a model counter. Random command streams (clear with a new
// activation, shift, weighted add of up to R bits, shift-and-add, hold) are
// applied, and after every command the counter is compared with the model,
// which is written from the command definitions only. A fixed sequence checks
// one CBS count followed by a doubling.
module tb_sc_lane;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  logic [1:0] fin = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (fin == 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_r
    localparam int R = (g == 0) ? 1 : 4;

    cnt_cmd_t     cmd;
    logic [N-1:0] act;
    logic [N-1:0] count;
    int           model_cnt, model_act;

    sc_lane #(.N(N), .R(R)) dut (.clk, .rst_n, .cmd, .act, .count);

    task automatic apply(input cnt_cmd_t c, input int a);
      cmd = c;
      act = N'(a);
      @(posedge clk);
      #1;
      if (c.op == CNT_CLR) model_act = a;
      model_cnt = model_apply(c, model_act, model_cnt) % (1 << N);
      checks++;
      if (int'(count) != model_cnt) begin
        failures++;
        $display("R=%0d op=%s: got %0d expected %0d", R, c.op.name(), count, model_cnt);
      end
    endtask

    function automatic cnt_cmd_t mk(input cnt_op_e op, input int sel0, input int wsh0);
      cnt_cmd_t c;
      c = CMD_NONE;
      c.op = op;
      c.slot[0].en  = (op == CNT_ADD || op == CNT_SHIFT_ADD);
      c.slot[0].sel = SEL_W'(sel0);
      c.slot[0].wsh = WSH_W'(wsh0);
      return c;
    endfunction

    function automatic cnt_cmd_t rnd_cmd();
      cnt_cmd_t c;
      int r;
      c = CMD_NONE;
      r = $urandom_range(0, 9);
      if (r == 0)      c.op = CNT_CLR;
      else if (r <= 2) c.op = CNT_SHIFT;
      else if (r == 3) c.op = CNT_NONE;
      else if (r == 4) c.op = CNT_SHIFT_ADD;
      else             c.op = CNT_ADD;
      if (c.op == CNT_ADD || c.op == CNT_SHIFT_ADD) begin
        for (int j = 0; j < R; j++) begin
          c.slot[j].en  = 1'($urandom_range(0, 1));
          c.slot[j].sel = SEL_W'($urandom_range(0, N - 1));
          c.slot[j].wsh = WSH_W'($urandom_range(0, 3));
        end
      end
      return c;
    endfunction

    initial begin
      cmd = CMD_NONE;
      act = '0;
      model_cnt = 0;
      model_act = 0;
      @(posedge rst_n);
      @(posedge clk);
      #1;
      checks++;
      if (count != '0) begin
        failures++;
        $display("R=%0d: counter not cleared by reset", R);
      end
      // I = 0b10110101: I7 at weight 4, I6 at 2, I5 at 1, double, add I0:
      // ((4 + 0 + 1) * 2) + 1 = 11
      apply(mk(CNT_CLR, 0, 0), 8'b1011_0101);
      apply(mk(CNT_ADD, 7, 2), 0);
      apply(mk(CNT_ADD, 6, 1), 0);
      apply(mk(CNT_ADD, 5, 0), 0);
      apply(mk(CNT_SHIFT, 0, 0), 0);
      apply(mk(CNT_ADD, 0, 0), 0);
      checks++;
      if (count != 8'd11) begin
        failures++;
        $display("R=%0d fixed case: got %0d expected 11", R, count);
      end
      // act changing after the clear must not matter
      apply(mk(CNT_NONE, 0, 0), 8'hFF);
      apply(mk(CNT_ADD, 1, 0), 8'hFF);
      for (int t = 0; t < 5000; t++) apply(rnd_cmd(), $urandom_range(0, 255));
      fin[g] = 1'b1;
    end
  end
endmodule

// tb_tail_lut: checks the tail-bit index table for N = 8 and N = 6 against
// the index of position 2**(N/2) * (m+1) of the full MUX-FSM sequence.
// For N = 6 the first three entries must be 2, 1, 2.
module tb_tail_lut;
  import sc_pkg::*;
  import tb_sc_ref_pkg::*;

  logic [3:0]       addr8;
  logic [SEL_W-1:0] sel8;
  logic [2:0]       addr6;
  logic [SEL_W-1:0] sel6;

  int checks = 0, failures = 0;

  tail_lut #(.N(8)) dut8 (.addr(addr8), .sel(sel8));
  tail_lut #(.N(6)) dut6 (.addr(addr6), .sel(sel6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr8 = '0;
    addr6 = '0;
    for (int m = 0; m < 15; m++) begin
      addr8 = 4'(m);
      #1;
      checks++;
      if (int'(sel8) != ref_index(8, 16 * (m + 1))) begin
        failures++;
        $display("N=8 m=%0d: got %0d expected %0d", m, sel8, ref_index(8, 16 * (m + 1)));
      end
    end
    for (int m = 0; m < 7; m++) begin
      addr6 = 3'(m);
      #1;
      checks++;
      if (int'(sel6) != ref_index(6, 8 * (m + 1))) begin
        failures++;
        $display("N=6 m=%0d: got %0d expected %0d", m, sel6, ref_index(6, 8 * (m + 1)));
      end
    end
    // the worked example: tails 2, 1, 2 for W_H = 3
    for (int m = 0; m < 3; m++) begin
      int exp_tail [3] = '{2, 1, 2};
      addr6 = 3'(m);
      #1;
      checks++;
      if (int'(sel6) != exp_tail[m]) begin
        failures++;
        $display("N=6 example tail %0d: got %0d", m, sel6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

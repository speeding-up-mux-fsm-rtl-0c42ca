// tb_sc_ref_pkg: reference model for the testbenches.
//
// It works from the plain MUX-FSM definition, not from the split-shift
// schedule: the product of activation I and weight W is the number of ones
// among I[n-1-tz(k)] for k = 1..W, tz() counting trailing zeros of k. The
// expected cycle count of the split-shift schedule is given in closed form,
// for serial lanes (r = 1) and for bit-parallel lanes counting r bits per
// cycle. model_apply() applies one controller command to a model counter.
package tb_sc_ref_pkg;
  import sc_pkg::*;

  function automatic int ref_tz(input int k);
    int t = 0;
    while (k > 0 && (k % 2) == 0) begin
      k = k / 2;
      t++;
    end
    return t;
  endfunction

  // MUX index of position k (1-based) of the n-bit index sequence
  function automatic int ref_index(input int n, input int k);
    return n - 1 - ref_tz(k);
  endfunction

  // Conventional serial MUX-FSM result: walk the whole sequence
  function automatic int ref_product(input int n, input int i_val, input int w_val);
    int acc = 0;
    for (int k = 1; k <= w_val; k++) acc += (i_val >> ref_index(n, k)) & 1;
    return acc;
  endfunction

  function automatic int ref_popcount(input int v);
    int c = 0;
    for (int b = 0; b < 32; b++) c += (v >> b) & 1;
    return c;
  endfunction

  function automatic int ref_bitlen(input int v);
    int l = 0;
    while (v > 0) begin
      v = v / 2;
      l++;
    end
    return l;
  endfunction

  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  // Cycles of step 1 for W_H (n-bit operands, r bits counted per cycle)
  function automatic int ref_step1_cycles(input int n, input int wh, input int r = 1);
    if (wh == 0) return 0;
    if (r == 1) return ref_popcount(wh) * (n / 2) + ref_bitlen(wh) - 1;
    return ref_bitlen(wh) + ref_popcount(wh) * (ceil_div(n / 2, r) - 1);
  endfunction

  // Command cycles of the whole split-shift multiplication
  function automatic int ref_cycles(input int n, input int w_val, input int r = 1);
    int wh = w_val >> (n / 2);
    int wl = w_val % (1 << (n / 2));
    return ref_step1_cycles(n, wh, r) + ceil_div(wh, r) + ceil_div(wl, r);
  endfunction

  // Apply one command to a model counter holding activation iv
  function automatic int model_apply(input cnt_cmd_t cmd, input int iv, input int acc);
    int inc = 0;
    for (int j = 0; j < R_MAX; j++)
      if (cmd.slot[j].en) inc += ((iv >> cmd.slot[j].sel) & 1) << cmd.slot[j].wsh;
    case (cmd.op)
      CNT_CLR:       return 0;
      CNT_SHIFT:     return acc * 2;
      CNT_ADD:       return acc + inc;
      CNT_SHIFT_ADD: return acc * 2 + inc;
      default:       return acc;
    endcase
  endfunction

endpackage

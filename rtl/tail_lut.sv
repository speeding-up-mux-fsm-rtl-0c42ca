// tail_lut: MUX indices of the tail bits of the index sequence.
//
// With W split into W_H (upper N/2 bits) and W_L (lower N/2 bits), the index
// sequence falls into groups of 2**(N/2) positions. Position 2**(N/2) of group
// m (m = 0, 1, ...) is the group's tail bit. Its MUX index is
//     N/2 - 1 - tz(m + 1)
// where tz() counts trailing zeros. For N = 6 the first tails are 2, 1, 2.
// The table is filled from that formula at elaboration and read
// combinationally through R ports: sel[j] is the entry for addr + j (modulo
// the table size), valid in the same cycle as addr. The serial design uses
// one port, the bit-parallel design R.
//
// Keeping the tail indices in a lookup table follows the document; the
// formula, the read ports and the combinational read are this design's.
module tail_lut
  import sc_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned R = 1
) (
  input  logic [N/2-1:0]            addr,
  output logic [R-1:0][SEL_W-1:0]   sel
);

  localparam int unsigned H       = N / 2;
  localparam int unsigned ENTRIES = 1 << H;

  typedef logic [SEL_W-1:0] lut_t [ENTRIES];

  function automatic lut_t fill_lut();
    lut_t t;
    for (int unsigned m = 0; m < ENTRIES; m++) begin
      // the last address would need m + 1 = 2**H, which W_H never reaches
      if (m + 1 < ENTRIES) t[m] = SEL_W'(H - 1 - tz(16'(m + 1)));
      else                 t[m] = '0;
    end
    return t;
  endfunction

  localparam lut_t LUT = fill_lut();

  for (genvar j = 0; j < R; j++) begin : g_port
    logic [H-1:0] a;
    assign a      = addr + H'(j);
    assign sel[j] = LUT[a];
  end

endmodule

// f_coeff_rom: coefficient look-up table for the piecewise linear f(u1).
//
// Holds one 48-bit record per segment of f(u) = sqrt(-ln u): gradient (6 bits),
// gradient scale (5), y-intercept (32) and y-intercept scale (5), the field
// widths of the design; 59 records, 2832 bits. The contents are computed
// during elaboration by gng_coeff_pkg::f_record (a least-squares line per
// segment, see that package), so the table is a constant array that synthesis
// maps to a ROM or to logic.
//
// Interface and timing: the read is registered (one cycle, held while en is
// low), matching a block RAM. Addresses beyond the last segment read zero.
module f_coeff_rom
  import gng_pkg::*;
  import gng_coeff_pkg::*;
(
  input  logic            clk,
  input  logic            en,
  input  logic [F_AW-1:0] addr,
  output logic [47:0]     data
);

  logic [47:0] rom [F_SEGS];

  for (genvar k = 0; k < F_SEGS; k++) begin : g_rec
    localparam f_coeff_t REC = f_record(k);
    assign rom[k] = REC;
  end

  always_ff @(posedge clk) begin
    if (en) data <= (32'(addr) < F_SEGS) ? rom[addr] : '0;
  end

endmodule

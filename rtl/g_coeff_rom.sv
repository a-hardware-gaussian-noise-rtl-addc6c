// g_coeff_rom: shared coefficient look-up table for g1 and g2.
//
// Holds one 32-bit record per segment of s(x) = sin(pi/2 * x) on x in [0, 1],
// that is sin(2*pi*u2) over one quarter period: gradient (8 bits), gradient
// scale (4), y-intercept (16, signed) and y-intercept scale (4), the field
// widths of the design; 21 records, 672 bits. The design shares one table
// between g1 and g2, so it has two read ports: port A serves the sine, port B
// the cosine (looked up at the mirrored position 1 - x). The contents are
// computed during elaboration by gng_coeff_pkg::g_record; the last record is
// the single point x = 1 (gradient 0, value 1).
//
// Interface and timing: both reads are registered (one cycle, held while en
// is low). Addresses beyond the last segment read zero.
module g_coeff_rom
  import gng_pkg::*;
  import gng_coeff_pkg::*;
(
  input  logic            clk,
  input  logic            en,
  input  logic [G_AW-1:0] addr_a,
  input  logic [G_AW-1:0] addr_b,
  output logic [31:0]     data_a,
  output logic [31:0]     data_b
);

  logic [31:0] rom [G_SEGS];

  for (genvar k = 0; k < G_SEGS; k++) begin : g_rec
    localparam g_coeff_t REC = g_record(k);
    assign rom[k] = REC;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      data_a <= (32'(addr_a) < G_SEGS) ? rom[addr_a] : '0;
      data_b <= (32'(addr_b) < G_SEGS) ? rom[addr_b] : '0;
    end
  end

endmodule

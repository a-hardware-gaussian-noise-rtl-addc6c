// out_mux: toggle-controlled output multiplexor, the last stage of the generator.
//
// The two ACC(2) units (one fed by f*g1, one by f*g2) finish a sum together
// every other cycle. A toggle flip-flop steers the multiplexor so that the g1
// sum leaves on the first cycle and the g2 sum, held in a register, on the
// next, giving one sample per clock instead of two every other clock. This
// follows the design; the g1-first order is this implementation's choice.
//
// Interface and timing: on an enabled edge with load high, y takes a and b is
// held; on the following enabled edge y takes the held b. y_valid marks the
// cycles in which y holds a new sample. Everything holds while en is low.
module out_mux #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic                load,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                y_valid,
  output logic signed [W-1:0] y
);

  logic                sel;     // toggle: 1 while the held b is due
  logic signed [W-1:0] b_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel     <= 1'b0;
      b_hold  <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else if (en) begin
      if (load) begin
        y       <= a;
        b_hold  <= b;
        sel     <= 1'b1;
        y_valid <= 1'b1;
      end else if (sel) begin
        y       <= b_hold;
        sel     <= 1'b0;
        y_valid <= 1'b1;
      end else begin
        y_valid <= 1'b0;
      end
    end
  end

  // The two ACC(2) units deliver at most one pair per two cycles.
  assert property (@(posedge clk) disable iff (rst) (en && load) |-> !sel)
    else $error("out_mux: new pair arrived before the held sample left");

endmodule

// acc2: the ACC(2) central-limit stage.
//
// Adds two successive products x(2k) + x(2k+1) and outputs the sum once per
// two inputs. By the central limit theorem the sum of two unit-variance
// samples divided by sqrt(2) is closer to Gaussian than either, which hides
// the small quantisation and approximation errors of the function evaluators;
// the division by sqrt(2) is not performed because the g evaluator already
// omits the matching factor sqrt(2). This follows the design; rounding the
// sum to the output width (round half up) is this implementation's choice.
//
// Interface and timing: inputs are taken on enabled clock edges with in_valid
// high; an internal phase bit pairs them. On the edge that takes the second
// input of a pair, sum is registered and sum_valid is high for that one
// enabled cycle. Everything holds while en is low.
module acc2 #(
  parameter int unsigned IN_W     = 25,  // product width
  parameter int unsigned OUT_W    = 16,  // sum width
  parameter int unsigned DROP     = 9    // fraction bits removed by rounding
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    sum_valid,
  output logic signed [OUT_W-1:0] sum
);

  localparam int unsigned SW = IN_W + 1;

  logic                   phase;   // 1: first input of the pair is held
  logic signed [IN_W-1:0] first;
  logic signed [SW-1:0]   total;
  logic signed [OUT_W-1:0] rounded;

  assign total   = SW'(first) + SW'(x);
  assign rounded = OUT_W'((total + SW'(1 << (DROP - 1))) >>> DROP);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 1'b0;
      first     <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else if (en) begin
      sum_valid <= 1'b0;
      if (in_valid) begin
        if (!phase) begin
          first <= x;
          phase <= 1'b1;
        end else begin
          sum       <= rounded;
          sum_valid <= 1'b1;
          phase     <= 1'b0;
        end
      end
    end
  end

endmodule

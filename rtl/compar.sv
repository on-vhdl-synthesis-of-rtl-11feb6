// compar: 4-bit magnitude comparator with cascade inputs (SN7485 function).
//
// Compares A and B. When they differ, exactly one of a_gt_b / a_lt_b is 1.
// When A == B the outputs follow the cascade inputs as in the standard part:
// i_eq = 1 gives a_eq_b alone; otherwise a_gt_b = ~i_lt and a_lt_b = ~i_gt,
// so (i_gt, i_lt) = (1,0) gives A>B, (0,1) gives A<B, (1,1) gives neither
// and (0,0) gives both. Taking the cascade inputs into the
// function is this design's reading of the referenced part. Combinational.
module compar (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       i_gt,    // cascade input A>B from a less significant stage
  input  logic       i_lt,    // cascade input A<B
  input  logic       i_eq,    // cascade input A=B
  output logic       a_gt_b,
  output logic       a_lt_b,
  output logic       a_eq_b
);
  always_comb begin
    if (a > b) begin
      a_gt_b = 1'b1; a_lt_b = 1'b0; a_eq_b = 1'b0;
    end else if (a < b) begin
      a_gt_b = 1'b0; a_lt_b = 1'b1; a_eq_b = 1'b0;
    end else if (i_eq) begin
      a_gt_b = 1'b0; a_lt_b = 1'b0; a_eq_b = 1'b1;
    end else begin
      a_gt_b = ~i_lt; a_lt_b = ~i_gt; a_eq_b = 1'b0;
    end
  end
endmodule

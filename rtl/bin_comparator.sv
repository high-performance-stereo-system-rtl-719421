// bin_comparator: magnitude comparator built from gates only. Scanning from
// the most significant bit, a bit position decides the result when all
// higher bits are equal; the 2-bit result {gt, lt} is {0,0} for equal
// operands. Combinational; no subtractor or multiplier is used, as in the
// comparator of the refinement units. The {gt, lt} encoding is this
// design's choice.
module bin_comparator #(
  parameter int unsigned WIDTH = 13
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             gt,
  output logic             lt
);

  logic [WIDTH:0] eq_above;   // all bits above position i are equal

  always_comb begin
    eq_above[WIDTH] = 1'b1;
    gt = 1'b0;
    lt = 1'b0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      gt = gt | (eq_above[i+1] & a[i] & ~b[i]);
      lt = lt | (eq_above[i+1] & ~a[i] & b[i]);
      eq_above[i] = eq_above[i+1] & ~(a[i] ^ b[i]);
    end
  end

endmodule

// half_adder - two-input counter used where a column needs one bit less.
//
// s is the weight-1 bit of a + b and stays in the column; co is the weight-2 bit
// and moves to the next column. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule

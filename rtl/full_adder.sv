// full_adder - three-input counter, the main adder module of the reduction tree.
//
// Counts the ones among a, b and ci and returns the two-bit count: s is the
// weight-1 bit, which stays in the column, and co is the weight-2 bit, which
// moves to the next more significant column. Purely combinational, one adder delay.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule

// One-bit full adder cell: s = a ^ b ^ ci, co = majority(a, b, ci).
// It is the cell of the parallel adders and the adding part of every
// add/subtract cell. Combinational.
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

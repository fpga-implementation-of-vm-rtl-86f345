// One-bit full adder used by the carry skip adder blocks.
//
// Besides sum and carry it brings out the propagate signal p = a ^ b that the
// skip logic of a carry skip block combines. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic p,
  output logic cout
);
  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule

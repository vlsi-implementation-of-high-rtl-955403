// zero_d: zero detector Zero_D.
//
// One wide NOR over the carry vector SC: zero = 1 when SC == 0, which ends
// the carry-save-to-binary conversion loops (the sum vector SS then holds
// the binary value). Combinational. A single NOR, as published.
module zero_d #(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] sc,
  output logic         zero
);
  assign zero = ~(|sc);
endmodule

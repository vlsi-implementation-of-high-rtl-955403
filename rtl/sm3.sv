// sm3: simplified operand multiplier SM3.
//
// Selects the addend x of the Montgomery iteration from the precomputed
// quotient bit q^ and multiplier bit A^:
//   (A^, q^) = (0,0) -> 0,  (0,1) -> N^,  (1,0) -> B^,  (1,1) -> D^ = B^ + N^.
// Built as in the published SM3: N^ gated by q^, a q^-steered 2-to-1
// multiplexer between B^ and D^, and a final A^-steered 2-to-1 multiplexer,
// which is smaller than a full 4-to-1 multiplexer with a constant-0 input.
// The output is taken true here (the published cell delivers it inverted).
// Combinational.
module sm3 #(
  parameter int unsigned W = 1030
) (
  input  logic [W-1:0] n_hat,
  input  logic [W-1:0] b_hat,
  input  logic [W-1:0] d_hat,
  input  logic         q_hat,
  input  logic         a_hat,
  output logic [W-1:0] x
);
  logic [W-1:0] n_gated;
  logic [W-1:0] bd;

  always_comb begin
    n_gated = n_hat & {W{q_hat}};
    bd      = q_hat ? d_hat : b_hat;
    x       = a_hat ? bd : n_gated;
  end
endmodule

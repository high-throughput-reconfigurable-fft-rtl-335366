// commutator: lane <-> bank rotation for conflict-free SRAM access.
//
// Forward (REVERSE = 0): lane v is sent to bank (P(v) + state) mod 8, so the 8
// samples of one access land in 8 different banks. Reverse (REVERSE = 1):
// lane v is taken from bank (P(v) + state) mod 8, undoing the forward rotation
// so the butterfly sees its inputs in order. P is the identity unless perm is
// set; then P(v) = {v[1:0], v[2]}, a fixed shuffle used only by the 2048-point
// load and radix-4 stage. Each output is one 8:1 multiplexer controlled by the
// 3-bit state. Combinational; W is the width of one lane.
// The rotation by a 3-bit state follows the document; the perm shuffle is this
// design's addition for the 2048-point bank mapping.
module commutator #(
  parameter int W       = 32,
  parameter bit REVERSE = 1'b0
) (
  input  logic [7:0][W-1:0] d_i,
  input  logic [2:0]        state,
  input  logic              perm,
  output logic [7:0][W-1:0] d_o
);
  function automatic logic [2:0] p_of(input logic [2:0] v, input logic pm);
    return pm ? {v[1:0], v[2]} : v;
  endfunction
  function automatic logic [2:0] p_inv(input logic [2:0] u, input logic pm);
    return pm ? {u[0], u[2:1]} : u;
  endfunction

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      if (REVERSE) d_o[k] = d_i[3'(p_of(3'(k), perm) + state)];
      else         d_o[k] = d_i[p_inv(3'(3'(k) - state), perm)];
    end
  end
endmodule

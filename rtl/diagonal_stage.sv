// diagonal_stage: one diagonal (product bit) of the Matrix-Diagonal multiplier.
//
// The stage adds NIN bits of equal weight 2^k: the AND outputs of matrix
// diagonal k and the carries stacked into it by diagonal k-1. It does so with
// a chain of NIN-1 half adders (summing nodes): node m adds input bit m to the
// running sum of the nodes before it. The sum left after the last node is
// product bit k; the carry of every node has weight 2^(k+1) and is passed,
// unadded, to the next stage, where it is summed along with that diagonal's
// AND outputs. Since a + b == s + 2c at each node, the invariant is
//     sum(bits_in) == sum + 2 * popcount(carry_out).
// Interface: bits_in[NIN-1:0] in; sum and carry_out[max(NIN-1,1)-1:0] out.
// With NIN == 1 there is no node: sum is the single bit and carry_out is 0.
// Timing: combinational, NIN-1 half-adder delays from bits_in[0] to sum.
// Half adders only and carries stacked into the next stage follow the method;
// the chain order of the nodes is this design's choice.
module diagonal_stage #(
  parameter int unsigned NIN = 2,
  localparam int unsigned NCOUT = (NIN > 1) ? NIN - 1 : 1
) (
  input  logic [NIN-1:0]   bits_in,
  output logic             sum,
  output logic [NCOUT-1:0] carry_out
);

  if (NIN == 1) begin : g_single
    assign sum       = bits_in[0];
    assign carry_out = '0;
  end else begin : g_chain
    // partial[m] is the running sum after node m-1; partial[0] is bits_in[0].
    logic [NIN-1:0] partial;
    assign partial[0] = bits_in[0];
    for (genvar m = 1; m < NIN; m++) begin : g_node
      half_adder u_ha (
        .a (partial[m-1]),
        .b (bits_in[m]),
        .s (partial[m]),
        .c (carry_out[m-1])
      );
    end
    assign sum = partial[NIN-1];
  end

endmodule

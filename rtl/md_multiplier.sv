// md_multiplier: N x N unsigned Matrix-Diagonal multiplier (top level).
//
// Multiplies x_in by y_in with no clock and no state. The operands form an
// N x N matrix of AND nodes (pp_matrix); node (i,j) carries weight 2^(i+j),
// so each diagonal i+j == k holds the bits of one product weight, as in the
// vertically-and-crosswise (Urdhva Tiryakbhyam) scheme. Every diagonal has
// its own diagonal_stage, a chain of half adders that adds the diagonal's AND
// outputs together with all carries stacked into it from diagonal k-1. The
// stage's final sum is product bit k and each of its half-adder carries is
// stacked into diagonal k+1. Stage 2N-1 holds only carries; the carries it
// would pass on have weight 2^(2N) and are always zero, because the product
// fits in 2N bits (an assertion checks this in simulation).
// For N = 4 the stages have 1, 2, 4, 7, 9, 10, 10 and 9 input bits and the
// array uses 44 half adders; md_pkg computes these counts for any N.
// Interface: x_in, y_in (N bits) in; y_out (2N bits) = x_in * y_in out.
// Timing: purely combinational; the answer is valid one settling time after
// the inputs change. No clock, reset or handshake.
// Following the method: AND matrix, diagonal summation, half adders only,
// carries stacked into the next stage, combinational operation, 4 x 4 default
// size. This design's choices: unsigned operands, port names, the order of
// bits in each half-adder chain (AND outputs first, then stacked carries).
module md_multiplier
  import md_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x_in,
  input  logic [N-1:0]   y_in,
  output logic [2*N-1:0] y_out
);

  logic [N-1:0][N-1:0] pp;

  pp_matrix #(.N(N)) u_matrix (
    .x_in (x_in),
    .y_in (y_in),
    .pp   (pp)
  );

  for (genvar k = 0; k < 2 * N; k++) begin : g_diag
    localparam int NPP   = pp_count(N, k);
    localparam int NCIN  = cin_count(N, k);
    localparam int NIN   = NPP + NCIN;
    localparam int NCOUT = (NIN > 1) ? NIN - 1 : 1;
    localparam int ROW0  = pp_first_row(N, k);

    logic [NCOUT-1:0] cout;

    if (NIN == 0) begin : g_empty
      // Only possible for N == 1: nothing reaches the top product bit.
      assign y_out[k] = 1'b0;
      assign cout     = '0;
    end else begin : g_stage
      logic [NIN-1:0] bits;

      // AND outputs of diagonal k, in order of increasing row.
      for (genvar t = 0; t < NPP; t++) begin : g_pp
        assign bits[t] = pp[ROW0+t][k-ROW0-t];
      end
      // Carries stacked in from diagonal k-1.
      if (NCIN > 0) begin : g_cin
        assign bits[NIN-1:NPP] = g_diag[k-1].cout[NCIN-1:0];
      end

      diagonal_stage #(.NIN(NIN)) u_stage (
        .bits_in   (bits),
        .sum       (y_out[k]),
        .carry_out (cout)
      );
    end
  end

  // Carries out of the last diagonal would have weight 2^(2N): always zero.
  always_comb begin
    assert (g_diag[2*N-1].cout == '0)
      else $error("md_multiplier: carry out of the top diagonal");
  end

endmodule

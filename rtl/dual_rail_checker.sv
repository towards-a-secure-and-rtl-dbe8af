// dual_rail_checker: self-checking two-rail code checker.
//
// Input pair i is (a[i], b[i]) and is valid when b[i] == ~a[i]. The pairs are
// folded by the classic two-rail checker cell
//   z0 = x0&y0 | x1&y1,  z1 = x0&y1 | x1&y0,
// whose output pair is complementary exactly when both input pairs are. The
// checker's own output is therefore a two-rail pair too: (z[1], z[0])
// complementary means "all inputs valid", 00 or 11 means an error in the
// checked signals or in the checker itself. err is the single-rail
// summary, for logging. Purely combinational.
//
// This is the checker used to compare actual and predicted parity, and
// stored and recomputed parity, in double rail.
module dual_rail_checker #(
  parameter int unsigned N = 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [1:0]   z,
  output logic         err
);
  always_comb begin
    logic z0, z1;
    z0 = a[0];
    z1 = b[0];
    for (int i = 1; i < N; i++) begin
      {z0, z1} = {(z0 & a[i]) | (z1 & b[i]), (z0 & b[i]) | (z1 & a[i])};
    end
    z   = {z1, z0};
    err = (z0 == z1);
  end
endmodule

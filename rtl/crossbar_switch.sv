// crossbar_switch: sorts the n configured m-bit vectors into ascending order
// and carries each vector's k-bit output word along with it.
//
// The detector FSM needs its vectors in ascending order (a larger value has
// higher precedence), so that vectors sharing leading bits sit next to each
// other. This switch computes, for every input vector i, its rank: the number
// of vectors smaller than v[i] plus the number of equal vectors with a lower
// index. Ranks are therefore unique, equal vectors keep their input order,
// and output position p of the crossbar selects the vector whose rank is p.
// The sorting function follows the method; the rank-and-select structure and
// the tie rule are this design's own choices.
//
// Interface: v[i] / r[i] are vector i and its output word; da[0] is the
// smallest vector (da[1] in one-based notation) and ra[p] belongs to da[p].
// Timing: purely combinational, n*n comparators of m bits and an n:1 mux per
// output position.
module crossbar_switch #(
  parameter int unsigned M = 8,  // vector length in bits
  parameter int unsigned N = 4,  // number of vectors
  parameter int unsigned K = 2   // output word width, ceil(log2 N)
) (
  input  logic [N-1:0][M-1:0] v,
  input  logic [N-1:0][K-1:0] r,
  output logic [N-1:0][M-1:0] da,
  output logic [N-1:0][K-1:0] ra
);

  localparam int unsigned RW = $clog2(N + 1);

  logic [N-1:0][RW-1:0] rank;

  // Rank of each vector.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int unsigned j = 0; j < N; j++) begin
        if ((v[j] < v[i]) || ((v[j] == v[i]) && (j < i))) begin
          rank[i] = rank[i] + RW'(1);
        end
      end
    end
  end

  // Crossbar: output position p takes the vector ranked p.
  always_comb begin
    for (int unsigned p = 0; p < N; p++) begin
      da[p] = '0;
      ra[p] = '0;
      for (int unsigned i = 0; i < N; i++) begin
        if (rank[i] == RW'(p)) begin
          da[p] = v[i];
          ra[p] = r[i];
        end
      end
    end
  end

endmodule

// scl_prune: path-metric update and list pruning of the CA-SCL decoder
// for one unfrozen bit (the "continue unfrozen paths" step).
//
// For every active path l the leaf LLR P(l) forks the path into a u=0 and
// a u=1 candidate. The candidate metrics probF0/probF1 follow the
// comparator-and-multiplexer structure of the design: when P(l) > 0 the
// belief is u = 0, so probF0 = PM and probF1 = PM + |P|; otherwise
// probF0 = PM + |P| and probF1 = PM. The metric is a penalty (smaller is
// more likely). Of the 2*Lc candidates the list_size smallest are kept:
// each candidate's rank is the number of valid candidates that beat it
// (smaller metric, or equal metric and lower index), and a candidate
// survives when its rank is below list_size. When 2*Lc <= list_size every
// candidate survives. Purely combinational.
//
// Origin: the probF update follows the described metric datapath (the
// disagreeing fork pays |LLR|); candidates with the smallest metric
// survive, and a rank count replaces the described sort.
module scl_prune
  import polar_pkg::*;
#(
  parameter int unsigned L = LMAX
) (
  input  logic [L-1:0]      active,
  input  logic [PM_W-1:0]   pm       [L],
  input  llr_t              leaf     [L],
  input  logic [3:0]        list_size,
  output logic [PM_W-1:0]   prob_f0  [L],
  output logic [PM_W-1:0]   prob_f1  [L],
  output logic [L-1:0]      keep0,
  output logic [L-1:0]      keep1
);
  logic [PM_W-1:0] cand  [2*L];
  logic [2*L-1:0]  cval;
  logic [PM_W-1:0] mag;

  always_comb begin
    for (int l = 0; l < L; l++) begin
      mag = PM_W'(unsigned'(leaf[l][LLR_W-1] ? -leaf[l] : leaf[l]));
      if (leaf[l] > 0) begin
        prob_f0[l] = pm[l];
        prob_f1[l] = pm[l] + mag;
      end else begin
        prob_f0[l] = pm[l] + mag;
        prob_f1[l] = pm[l];
      end
      cand[2*l]   = prob_f0[l];
      cand[2*l+1] = prob_f1[l];
      cval[2*l]   = active[l];
      cval[2*l+1] = active[l];
    end
    for (int c = 0; c < 2*L; c++) begin
      int rank;
      rank = 0;
      for (int d = 0; d < 2*L; d++)
        if (cval[d] && d != c && (cand[d] < cand[c] || (cand[d] == cand[c] && d < c)))
          rank++;
      if (c % 2 == 0) keep0[c/2] = cval[c] && (rank < int'(list_size));
      else            keep1[c/2] = cval[c] && (rank < int'(list_size));
    end
  end
endmodule

// bisr_tb_pkg: reference models shared by the BISR testbenches.
//
// A fault is a cell given as (row, column). `ref_repairable` decides, by brute
// force over every set of at most `nr` faulty rows, whether the remaining
// faults lie on at most `nc` distinct columns: the exact answer to "can nr
// spare rows and nc spare columns cover these faults". `ref_covered` checks
// that a solution covers every fault.
package bisr_tb_pkg;

  typedef struct {
    int row;
    int col;
  } cell_t;

  // Number of distinct columns among the faults not on a chosen row.
  function automatic int cols_left_over(cell_t f[$], int chosen[$]);
    int cols[$];
    foreach (f[i]) begin
      bit in_row = 0, seen = 0;
      foreach (chosen[k]) if (chosen[k] == f[i].row) in_row = 1;
      if (!in_row) begin
        foreach (cols[k]) if (cols[k] == f[i].col) seen = 1;
        if (!seen) cols.push_back(f[i].col);
      end
    end
    return cols.size();
  endfunction

  // Try every set of at most `left` rows taken from rows[first:$] on top of `chosen`.
  function automatic bit try_rows(cell_t f[$], int rows[$], int first, int left, int chosen[$], int nc);
    if (cols_left_over(f, chosen) <= nc) return 1;
    if (left == 0) return 0;
    for (int k = first; k < rows.size(); k++) begin
      int next[$];
      next = chosen;
      next.push_back(rows[k]);
      if (try_rows(f, rows, k + 1, left - 1, next, nc)) return 1;
    end
    return 0;
  endfunction

  function automatic bit ref_repairable(cell_t f[$], int nr, int nc);
    int rows[$];
    int none[$];
    foreach (f[i]) begin
      bit seen = 0;
      foreach (rows[k]) if (rows[k] == f[i].row) seen = 1;
      if (!seen) rows.push_back(f[i].row);
    end
    return try_rows(f, rows, 0, nr, none, nc);
  endfunction

  function automatic bit ref_covered(cell_t f[$], int srow[$], int scol[$]);
    foreach (f[i]) begin
      bit hit = 0;
      foreach (srow[k]) if (srow[k] == f[i].row) hit = 1;
      foreach (scol[k]) if (scol[k] == f[i].col) hit = 1;
      if (!hit) return 0;
    end
    return 1;
  endfunction

endpackage

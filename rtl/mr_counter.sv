// mr_counter: must-repair counter of the redundancy analyser.
//
// For a new cell fault it counts the stored faults on the same row and on the
// same column (the faults of lines already given a spare are never stored).
// A row with more faults than there are free spare columns can only be repaired
// by a spare row, and likewise for columns: this is the must-repair condition.
// `dup` flags a fault already stored (March X reads each cell more than once).
// Combinational. The must-repair check is part of the scheme; comparing with
// all stored entries at once (instead of per-line counters) is this design's.
module mr_counter #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned ROW_W = 6,
  parameter int unsigned CID_W = 5,
  parameter int unsigned CNT_W = $clog2(DEPTH + 2)
) (
  input  logic [DEPTH-1:0]            st_valid,
  input  logic [DEPTH-1:0][ROW_W-1:0] st_row,
  input  logic [DEPTH-1:0][CID_W-1:0] st_col,
  input  logic [ROW_W-1:0]            f_row,
  input  logic [CID_W-1:0]            f_col,
  input  logic [CNT_W-1:0]            rows_left,   // free spare rows
  input  logic [CNT_W-1:0]            cols_left,   // free spare columns
  output logic [CNT_W-1:0]            row_cnt,     // stored faults on f_row
  output logic [CNT_W-1:0]            col_cnt,     // stored faults on f_col
  output logic                        dup,
  output logic                        must_row,
  output logic                        must_col
);

  always_comb begin
    row_cnt = '0;
    col_cnt = '0;
    dup     = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (st_valid[i]) begin
        if (st_row[i] == f_row) row_cnt = row_cnt + 1'b1;
        if (st_col[i] == f_col) col_cnt = col_cnt + 1'b1;
        if (st_row[i] == f_row && st_col[i] == f_col) dup = 1'b1;
      end
    end
    must_row = !dup && (row_cnt + 1'b1 > cols_left);
    must_col = !dup && (col_cnt + 1'b1 > rows_left);
  end

endmodule

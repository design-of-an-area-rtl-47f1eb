// fault_store: fault storing of the redundancy analyser.
//
// DEPTH entries, each a valid bit, a row and a column. `ins` writes a fault into
// the lowest free entry; `kill_row` / `kill_col` invalidate every entry on a row
// or column that has just been given a spare; `clear` empties the store. All
// updates happen at the clock edge; `clear` wins over the others.
// The fault storing is part of the scheme; its size (set by the analyser) and
// the invalidate operations are this design's.
module fault_store #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned ROW_W = 6,
  parameter int unsigned CID_W = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        ins,
  input  logic                        kill_row,
  input  logic                        kill_col,
  input  logic [ROW_W-1:0]            in_row,   // row to insert or kill
  input  logic [CID_W-1:0]            in_col,   // column to insert or kill
  output logic [DEPTH-1:0]            st_valid,
  output logic [DEPTH-1:0][ROW_W-1:0] st_row,
  output logic [DEPTH-1:0][CID_W-1:0] st_col,
  output logic                        full
);

  logic [DEPTH-1:0] free_onehot;

  always_comb begin
    free_onehot = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!st_valid[i]) free_onehot = DEPTH'(1) << i;
    end
  end

  assign full = &st_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_valid <= '0;
      st_row   <= '0;
      st_col   <= '0;
    end else if (clear) begin
      st_valid <= '0;
    end else begin
      for (int i = 0; i < int'(DEPTH); i++) begin
        if (kill_row && st_row[i] == in_row) st_valid[i] <= 1'b0;
        if (kill_col && st_col[i] == in_col) st_valid[i] <= 1'b0;
        if (ins && free_onehot[i]) begin
          st_valid[i] <= 1'b1;
          st_row[i]   <= in_row;
          st_col[i]   <= in_col;
        end
      end
    end
  end

endmodule

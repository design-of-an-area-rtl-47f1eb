// repair_regs: repair registers of the redundancy analyser.
//
// Keep the repair solution of every memory of the group: the row address given
// to each spare row and the column given to each spare column, each with a
// valid bit, plus a `repaired` flag per memory. Written by the analyser when a
// memory's solution is found (`we`, `mem_id`); `clear` empties all of them at
// the start of a test. The outputs drive the memories' spare selection.
// Repair registers are part of the scheme; keeping one set per memory is this
// design's choice, so every solution survives until the next test.
module repair_regs #(
  parameter int unsigned N_MEM      = 4,
  parameter int unsigned ROW_W      = 6,
  parameter int unsigned CID_W      = 5,
  parameter int unsigned SPARE_ROWS = 2,
  parameter int unsigned SPARE_COLS = 2,
  localparam int unsigned IDW       = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        clear,
  input  logic                                        we,
  input  logic [IDW-1:0]                              mem_id,
  input  logic [SPARE_ROWS-1:0][ROW_W-1:0]            sol_row,
  input  logic [SPARE_ROWS-1:0]                       sol_row_v,
  input  logic [SPARE_COLS-1:0][CID_W-1:0]            sol_col,
  input  logic [SPARE_COLS-1:0]                       sol_col_v,
  output logic [N_MEM-1:0][SPARE_ROWS-1:0][ROW_W-1:0] rep_row,
  output logic [N_MEM-1:0][SPARE_ROWS-1:0]            rep_row_v,
  output logic [N_MEM-1:0][SPARE_COLS-1:0][CID_W-1:0] rep_col,
  output logic [N_MEM-1:0][SPARE_COLS-1:0]            rep_col_v,
  output logic [N_MEM-1:0]                            repaired
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_row   <= '0;
      rep_row_v <= '0;
      rep_col   <= '0;
      rep_col_v <= '0;
      repaired  <= '0;
    end else if (clear) begin
      rep_row_v <= '0;
      rep_col_v <= '0;
      repaired  <= '0;
    end else if (we && 32'(mem_id) < N_MEM) begin
      rep_row[mem_id]   <= sol_row;
      rep_row_v[mem_id] <= sol_row_v;
      rep_col[mem_id]   <= sol_col;
      rep_col_v[mem_id] <= sol_col_v;
      repaired[mem_id]  <= 1'b1;
    end
  end

endmodule

// bira: built-in redundancy analyser shared by all memories of a group.
//
// Fault information (word address + failing-bit syndrome) enters the multi
// fault detector, which splits it into single-cell faults. Each cell fault is
// checked by the must-repair counter against the fault storing and handled by
// the controller (bira_ctr): dropped, given a must-repair spare line, stored, or
// found unrepairable. After `test_finish` the controller searches all orders of
// the remaining spare rows and columns over the stored faults and writes the
// solution of memory `start_mem_id` into the repair registers (`repair_done`),
// or raises `unrepair`. `stall` throttles the BIST while faults queue up.
// Rows are ROW_W bits; a column is {column address, bit index}, CID_W bits.
// The five parts and their roles follow the scheme; their circuits, sizes and
// the bit-column spare granularity are this design's.
module bira #(
  parameter int unsigned N_MEM      = 4,
  parameter int unsigned AW         = 8,
  parameter int unsigned COL_W      = 2,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned SPARE_ROWS = 2,
  parameter int unsigned SPARE_COLS = 2,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned ROW_W     = AW - COL_W,
  localparam int unsigned CID_W     = COL_W + $clog2(DATA_W),
  localparam int unsigned IDW       = (N_MEM > 1) ? $clog2(N_MEM) : 1,
  localparam int unsigned DEPTH     = 2 * SPARE_ROWS * SPARE_COLS
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        clear_all,     // empty repair registers
  input  logic                                        start,         // begin collecting for a memory
  input  logic [IDW-1:0]                              start_mem_id,
  input  logic                                        test_finish,
  input  logic                                        fault_valid,
  input  logic [AW-1:0]                               fault_addr,
  input  logic [DATA_W-1:0]                           fault_syn,
  output logic                                        stall,
  output logic                                        busy,
  output logic                                        repair_done,
  output logic                                        unrepair,
  output logic [N_MEM-1:0][SPARE_ROWS-1:0][ROW_W-1:0] rep_row,
  output logic [N_MEM-1:0][SPARE_ROWS-1:0]            rep_row_v,
  output logic [N_MEM-1:0][SPARE_COLS-1:0][CID_W-1:0] rep_col,
  output logic [N_MEM-1:0][SPARE_COLS-1:0]            rep_col_v,
  output logic [N_MEM-1:0]                            repaired,
  // event strobes, for observing the analysis
  output logic                                        ev_multi,
  output logic                                        ev_must_row,
  output logic                                        ev_must_col
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 2);

  logic                             f_valid, mfd_idle;
  logic [ROW_W-1:0]                 f_row;
  logic [CID_W-1:0]                 f_col;
  logic [CNT_W-1:0]                 rows_left, cols_left, row_cnt, col_cnt;
  logic                             dup, must_row, must_col;
  logic                             st_clear, st_ins, st_kill_row, st_kill_col, st_full;
  logic [DEPTH-1:0]                 st_valid;
  logic [DEPTH-1:0][ROW_W-1:0]      st_row;
  logic [DEPTH-1:0][CID_W-1:0]      st_col;
  logic                             rr_we;
  logic [IDW-1:0]                   rr_mem_id;
  logic [SPARE_ROWS-1:0][ROW_W-1:0] sol_row;
  logic [SPARE_ROWS-1:0]            sol_row_v;
  logic [SPARE_COLS-1:0][CID_W-1:0] sol_col;
  logic [SPARE_COLS-1:0]            sol_col_v;

  multi_fault_det #(.AW(AW), .COL_W(COL_W), .DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_mfd (
    .clk, .rst_n, .clear(start), .fault_valid, .fault_addr, .fault_syn,
    .f_valid, .f_row, .f_col, .multi(ev_multi), .stall, .idle(mfd_idle)
  );

  mr_counter #(.DEPTH(DEPTH), .ROW_W(ROW_W), .CID_W(CID_W), .CNT_W(CNT_W)) u_cnt (
    .st_valid, .st_row, .st_col, .f_row, .f_col, .rows_left, .cols_left,
    .row_cnt, .col_cnt, .dup, .must_row, .must_col
  );

  fault_store #(.DEPTH(DEPTH), .ROW_W(ROW_W), .CID_W(CID_W)) u_store (
    .clk, .rst_n, .clear(st_clear), .ins(st_ins), .kill_row(st_kill_row),
    .kill_col(st_kill_col), .in_row(f_row), .in_col(f_col),
    .st_valid, .st_row, .st_col, .full(st_full)
  );

  bira_ctr #(.N_MEM(N_MEM), .ROW_W(ROW_W), .CID_W(CID_W), .SPARE_ROWS(SPARE_ROWS),
             .SPARE_COLS(SPARE_COLS), .DEPTH(DEPTH), .CNT_W(CNT_W)) u_ctr (
    .clk, .rst_n, .start, .start_mem_id, .test_finish,
    .f_valid, .f_row, .f_col, .mfd_idle,
    .rows_left, .cols_left, .dup, .must_row, .must_col,
    .st_clear, .st_ins, .st_kill_row, .st_kill_col, .st_valid, .st_row, .st_col, .st_full,
    .rr_we, .rr_mem_id, .sol_row, .sol_row_v, .sol_col, .sol_col_v,
    .busy, .repair_done, .unrepair, .ev_must_row, .ev_must_col
  );

  repair_regs #(.N_MEM(N_MEM), .ROW_W(ROW_W), .CID_W(CID_W), .SPARE_ROWS(SPARE_ROWS),
                .SPARE_COLS(SPARE_COLS)) u_rr (
    .clk, .rst_n, .clear(clear_all), .we(rr_we), .mem_id(rr_mem_id),
    .sol_row, .sol_row_v, .sol_col, .sol_col_v,
    .rep_row, .rep_row_v, .rep_col, .rep_col_v, .repaired
  );

endmodule

// bisr_top: built-in self-repair (BISR) for a group of embedded memories.
//
// One small March X BIST and one redundancy analyser (BIRA) serve N_MEM
// memories; each memory has its own wrapper (comparator + fault number
// register). All memories are first tested in parallel, which classifies them
// as faulty or fault-free and already collects the faults of the largest one
// (memory 0) in the BIRA. Then only the faulty memories are tested again, one
// at a time in descending size order, and repaired by the shared BIRA. The
// result is a repair solution per memory (the addresses of the rows and
// columns that its spare rows and spare columns replace), or `unrepair`.
//
// Memories are outside this module: each has a synchronous port with one cycle
// of read latency (mem_en, mem_we, mem_addr, mem_wdata -> mem_rdata next cycle).
// Memory i has 2^(MEM_ROW_W[i]) rows of 2^COL_W words of DATA_W bits; it uses
// the low MEM_ROW_W[i]+COL_W bits of mem_addr[i]. Memory indices must be in
// descending size order: memory 0 is the largest. A spare column replaces one
// bit column, named {column address, bit index}; the repair outputs give
// rows and columns in that form.
// Sizes, spare counts and widths are this design's choices; the scheme itself
// (parallel test, serial test and repair of faulty memories only, shared BIRA
// with must-repair and exhaustive spare search, March X) follows the method.
module bisr_top
  import bisr_pkg::*;
#(
  parameter int unsigned N_MEM            = 4,
  parameter int unsigned MEM_ROW_W [N_MEM] = '{6, 5, 5, 4},
  parameter int unsigned COL_W            = 2,
  parameter int unsigned DATA_W           = 8,
  parameter int unsigned SPARE_ROWS       = 2,
  parameter int unsigned SPARE_COLS       = 2,
  parameter int unsigned FNR_W            = 10,
  localparam int unsigned AW              = MEM_ROW_W[0] + COL_W,
  localparam int unsigned ROW_W           = MEM_ROW_W[0],
  localparam int unsigned CID_W           = COL_W + $clog2(DATA_W)
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        test_start,
  // memory ports
  output logic [N_MEM-1:0]                            mem_en,
  output logic [N_MEM-1:0]                            mem_we,
  output logic [N_MEM-1:0][AW-1:0]                    mem_addr,
  output logic [N_MEM-1:0][DATA_W-1:0]                mem_wdata,
  input  logic [N_MEM-1:0][DATA_W-1:0]                mem_rdata,
  // results
  output logic                                        bisr_done,
  output logic                                        unrepair,
  output logic                                        busy,
  output bisr_events_t                                events,
  output logic [N_MEM-1:0][FNR_W-1:0]                 fault_count,
  output logic [N_MEM-1:0]                            faulty,
  output logic [N_MEM-1:0]                            repaired,
  output logic [N_MEM-1:0][SPARE_ROWS-1:0][ROW_W-1:0] rep_row,
  output logic [N_MEM-1:0][SPARE_ROWS-1:0]            rep_row_v,
  output logic [N_MEM-1:0][SPARE_COLS-1:0][CID_W-1:0] rep_col,
  output logic [N_MEM-1:0][SPARE_COLS-1:0]            rep_col_v
);

  localparam int unsigned IDW = (N_MEM > 1) ? $clog2(N_MEM) : 1;

  // BIST
  logic              bist_start, bist_abort, bist_finish, bist_busy, stall;
  logic              op_en, op_we, cmp_en;
  logic [AW-1:0]     op_addr, cmp_addr, last_addr;
  logic [DATA_W-1:0] op_wdata, cmp_exp;
  // controller
  logic [IDW-1:0]    cur_id;
  logic [N_MEM-1:0]  sel, irreparable;
  logic              fnr_clear, fnr_count_en, bira_start, rr_clear;
  logic              repair_done, bira_unrepair, bira_busy;
  logic              ev_skip, ev_serial, ev_fnr_irrep, ev_multi, ev_must_row, ev_must_col;
  // wrappers
  logic [N_MEM-1:0]              w_fault_valid;
  logic [N_MEM-1:0][AW-1:0]      w_fault_addr;
  logic [N_MEM-1:0][DATA_W-1:0]  w_fault_syn;
  logic [N_MEM-1:0][AW-1:0]      last_of;
  logic                          op_en_blocked;

  // A stall only matters while the BIST would otherwise issue an operation.
  assign op_en_blocked = bist_busy && !bist_finish;

  for (genvar g = 0; g < int'(N_MEM); g++) begin : g_mem
    localparam int unsigned MAW = MEM_ROW_W[g] + COL_W;
    logic [MAW-1:0] maddr;

    assign last_of[g] = AW'((64'd1 << MAW) - 1);

    mem_wrapper #(
      .AW(AW), .MEM_ROW_W(MEM_ROW_W[g]), .COL_W(COL_W), .DATA_W(DATA_W),
      .SPARE_ROWS(SPARE_ROWS), .SPARE_COLS(SPARE_COLS), .CNT_W(FNR_W)
    ) u_wrap (
      .clk, .rst_n, .sel(sel[g]), .fnr_clear, .fnr_count_en,
      .op_en, .op_we, .op_addr, .op_wdata, .cmp_en, .cmp_addr, .cmp_exp,
      .mem_en(mem_en[g]), .mem_we(mem_we[g]), .mem_addr(maddr),
      .mem_wdata(mem_wdata[g]), .mem_rdata(mem_rdata[g]),
      .fault_valid(w_fault_valid[g]), .fault_addr(w_fault_addr[g]), .fault_syn(w_fault_syn[g]),
      .fault_count(fault_count[g]), .faulty(faulty[g]), .irreparable(irreparable[g])
    );

    assign mem_addr[g] = AW'(maddr);
  end

  assign last_addr = last_of[cur_id];

  bist #(.AW(AW), .DATA_W(DATA_W)) u_bist (
    .clk, .rst_n, .test_start(bist_start), .stall, .test_abort(bist_abort), .last_addr,
    .op_en, .op_we, .op_addr, .op_wdata, .cmp_en, .cmp_addr, .cmp_exp,
    .busy(bist_busy), .test_finish(bist_finish)
  );

  bisr_ctrl #(.N_MEM(N_MEM)) u_ctrl (
    .clk, .rst_n, .test_start,
    .bist_start, .bist_abort, .bist_finish, .cur_id, .parallel(), .sel,
    .fnr_clear, .fnr_count_en, .faulty, .irreparable,
    .bira_start, .rr_clear, .repair_done, .bira_unrepair,
    .done(bisr_done), .unrepair, .ev_skip, .ev_serial, .ev_fnr_irrep
  );

  // In both stages the BIRA listens to the memory cur_id (memory 0 in stage 1).
  bira #(
    .N_MEM(N_MEM), .AW(AW), .COL_W(COL_W), .DATA_W(DATA_W),
    .SPARE_ROWS(SPARE_ROWS), .SPARE_COLS(SPARE_COLS)
  ) u_bira (
    .clk, .rst_n, .clear_all(rr_clear), .start(bira_start), .start_mem_id(cur_id),
    .test_finish(bist_finish),
    .fault_valid(w_fault_valid[cur_id]), .fault_addr(w_fault_addr[cur_id]),
    .fault_syn(w_fault_syn[cur_id]),
    .stall, .busy(bira_busy), .repair_done, .unrepair(bira_unrepair),
    .rep_row, .rep_row_v, .rep_col, .rep_col_v, .repaired,
    .ev_multi, .ev_must_row, .ev_must_col
  );

  assign busy   = bist_busy || bira_busy;
  assign events = '{stall: stall && op_en_blocked, multi: ev_multi, must_row: ev_must_row,
                    must_col: ev_must_col, skip: ev_skip, serial: ev_serial,
                    fnr_irrep: ev_fnr_irrep, test_abort: bist_abort && bist_busy};

  // Memory 0 must be the largest: it is tested with the full BIST range.
  for (genvar g = 1; g < int'(N_MEM); g++) begin : g_chk
    if (MEM_ROW_W[g] > MEM_ROW_W[0]) begin : g_bad
      $error("bisr_top: memory 0 must be the largest");
    end
  end

endmodule

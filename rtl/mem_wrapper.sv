// mem_wrapper: wrapper dedicated to one embedded memory.
//
// Passes the shared BIST operation to its memory when the memory is selected
// for the current run and the address lies inside it (smaller memories simply
// skip the upper part of the largest memory's address range, which keeps each
// March element's address order). The read data returning one cycle later is
// checked by the comparator (cmp), and its failing bits are counted in the fault
// number register (fnr).
//
// Address mapping (this design's choice): a word address is {row, column}, with
// MEM_ROW_W row bits and COL_W column bits; the memory has DATA_W-bit words.
// IRREP_LIMIT = 3 * (SPARE_ROWS * cells per row + SPARE_COLS * cells per column):
// a spare row or column can cover at most that many cells, and March X reads
// each cell three times.
module mem_wrapper #(
  parameter int unsigned AW         = 8,   // BIST address width (largest memory)
  parameter int unsigned MEM_ROW_W  = 6,   // row address bits of this memory
  parameter int unsigned COL_W      = 2,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned SPARE_ROWS = 2,
  parameter int unsigned SPARE_COLS = 2,
  parameter int unsigned CNT_W      = 10,
  localparam int unsigned MAW       = MEM_ROW_W + COL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,          // memory takes part in this run
  input  logic              fnr_clear,
  input  logic              fnr_count_en,
  // BIST side
  input  logic              op_en,
  input  logic              op_we,
  input  logic [AW-1:0]     op_addr,
  input  logic [DATA_W-1:0] op_wdata,
  input  logic              cmp_en,
  input  logic [AW-1:0]     cmp_addr,
  input  logic [DATA_W-1:0] cmp_exp,
  // memory side
  output logic              mem_en,
  output logic              mem_we,
  output logic [MAW-1:0]    mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  // fault information
  output logic              fault_valid,
  output logic [AW-1:0]     fault_addr,
  output logic [DATA_W-1:0] fault_syn,
  output logic [CNT_W-1:0]  fault_count,
  output logic              faulty,
  output logic              irreparable
);

  localparam int unsigned IRREP_LIMIT =
      3 * (SPARE_ROWS * (DATA_W << COL_W) + SPARE_COLS * (1 << MEM_ROW_W));

  function automatic logic in_range(logic [AW-1:0] a);
    logic [AW-1:0] hi;
    hi = a >> MAW;
    return hi == '0;
  endfunction

  assign mem_en    = sel && op_en && in_range(op_addr);
  assign mem_we    = op_we;
  assign mem_addr  = op_addr[MAW-1:0];
  assign mem_wdata = op_wdata;

  cmp #(.AW(AW), .DATA_W(DATA_W)) u_cmp (
    .clk, .rst_n,
    .cmp_en(sel && cmp_en && in_range(cmp_addr)),
    .cmp_addr, .cmp_exp, .rdata(mem_rdata),
    .fault_valid, .fault_addr, .fault_syn
  );

  fnr #(.DATA_W(DATA_W), .CNT_W(CNT_W), .IRREP_LIMIT(IRREP_LIMIT)) u_fnr (
    .clk, .rst_n, .clear(fnr_clear), .count_en(fnr_count_en),
    .fault_valid, .fault_syn, .count(fault_count), .faulty, .irreparable
  );

endmodule

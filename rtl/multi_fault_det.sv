// multi_fault_det: multi fault detector at the input of the redundancy analyser.
//
// A word-oriented memory can have several faulty bits in one word. Faulty words
// (address + syndrome) from the comparator are queued in a small FIFO; the head
// word is then split into single-cell faults, one per cycle, lowest failing bit
// first. A cell fault is given as a row and a column, where the column is
// {column address, bit index}: every bit of a word lies on its own physical
// column, which a spare column replaces.
// `stall` asks the BIST to stop issuing operations once the FIFO holds
// DEPTH - SLACK words; SLACK covers the reads already in the memory/compare
// pipeline. `idle` is high when no fault is queued. `clear` empties it.
// Serialising the faults of one word follows the scheme; the FIFO, its depth
// (a power of two) and the stall handshake are this design's.
module multi_fault_det #(
  parameter int unsigned AW     = 8,
  parameter int unsigned COL_W  = 2,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned SLACK  = 4,
  localparam int unsigned ROW_W = AW - COL_W,
  localparam int unsigned CID_W = COL_W + $clog2(DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              fault_valid,
  input  logic [AW-1:0]     fault_addr,
  input  logic [DATA_W-1:0] fault_syn,
  output logic              f_valid,     // one cell fault this cycle
  output logic [ROW_W-1:0]  f_row,
  output logic [CID_W-1:0]  f_col,
  output logic              multi,       // head word holds more than one faulty bit
  output logic              stall,
  output logic              idle
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [AW-1:0]     q_addr [DEPTH];
  logic [DATA_W-1:0] q_syn  [DEPTH];
  logic [PW-1:0]     wr_q, rd_q;
  logic [PW:0]       cnt_q;

  logic [DATA_W-1:0]        head, low, rest;
  logic [$clog2(DATA_W)-1:0] bit_idx;
  logic                     push, pop;

  always_comb begin
    head    = q_syn[rd_q];
    low     = head & (~head + 1'b1);   // lowest failing bit
    rest    = head & ~low;
    bit_idx = '0;
    for (int i = DATA_W - 1; i >= 0; i--) if (head[i]) bit_idx = i[$clog2(DATA_W)-1:0];
  end

  assign f_valid = (cnt_q != '0);
  assign f_row   = q_addr[rd_q][AW-1:COL_W];
  assign f_col   = {q_addr[rd_q][COL_W-1:0], bit_idx};
  assign multi   = f_valid && (rest != '0);
  assign push    = fault_valid && (fault_syn != '0);
  assign pop     = f_valid && (rest == '0);
  assign stall   = (32'(cnt_q) >= DEPTH - SLACK);
  assign idle    = (cnt_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else if (clear) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= wr_q + 1'b1;
      if (pop)  rd_q <= rd_q + 1'b1;
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  // Queue storage: written on push; the head's syndrome loses one bit per cycle.
  always_ff @(posedge clk) begin
    if (f_valid && !pop) q_syn[rd_q] <= rest;
    if (push) begin
      q_addr[wr_q] <= fault_addr;
      q_syn[wr_q]  <= fault_syn;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(push && !clear && 32'(cnt_q) == DEPTH && !pop))
    else $error("multi_fault_det: fault FIFO overflow");

endmodule

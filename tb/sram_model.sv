// sram_model: behavioural single-port SRAM with stuck-at fault injection.
//
// Synchronous: on a clock edge with `en` high it writes `wdata` (we = 1) or
// puts the stored word on `rdata` (we = 0), one cycle of read latency. Cells can
// be made stuck at 0 or 1 with `inject`; `clear_faults` removes them;
// `repair_row` / `repair_col` model a spare line taking over a line. Stored
// words start at zero.
module sram_model #(
  parameter int unsigned AW     = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem     [2**AW];
  logic [DATA_W-1:0] sa_mask [2**AW];
  logic [DATA_W-1:0] sa_val  [2**AW];
  int unsigned       n_access;

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      mem[i] = '0; sa_mask[i] = '0; sa_val[i] = '0;
    end
    rdata    = '0;
    n_access = 0;
  end

  task automatic clear_faults();
    for (int i = 0; i < 2**AW; i++) begin
      sa_mask[i] = '0; sa_val[i] = '0;
    end
  endtask

  // Model a repair: a spare line (assumed fault-free) replaces row `r` or bit
  // column `c` = {column address, bit}; its cells no longer fail.
  task automatic repair_row(int unsigned r, int unsigned col_w);
    for (int w = 0; w < (1 << col_w); w++) sa_mask[(r << col_w) + w] = '0;
  endtask

  task automatic repair_col(int unsigned c, int unsigned col_w);
    int unsigned bw = $clog2(DATA_W);
    for (int r = 0; r < (2**AW >> col_w); r++) sa_mask[(r << col_w) + (c >> bw)][c % DATA_W] = 1'b0;
  endtask

  task automatic inject(int unsigned a, int unsigned b, bit v);
    sa_mask[a][b] = 1'b1;
    sa_val[a][b]  = v;
  endtask

  always @(posedge clk) begin
    if (en) begin
      n_access <= n_access + 1;
      if (we) mem[addr] <= wdata;
      else    rdata     <= (mem[addr] & ~sa_mask[addr]) | (sa_val[addr] & sa_mask[addr]);
    end
  end

endmodule

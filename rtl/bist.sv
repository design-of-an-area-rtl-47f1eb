// bist: March X built-in self-test shared by all memories of a group.
//
// Made of the controller (bist_ctr), the test address generator (tag) and the
// test pattern generator (tpg). Each cycle in which an operation is issued it
// drives one memory operation (address, write enable, write data) to every
// memory wrapper at once, so all selected memories are tested in parallel.
// Memories have a synchronous read with one cycle of latency, so the compare
// side (compare enable, expected word, address) is registered once here and is
// aligned with the read data returning in the next cycle.
// `last_addr` sets the address range of a run: the largest memory for the
// parallel test, the memory under test for a serial test.
// The CTR/TAG/TPG split and March X follow the scheme; the one-cycle read
// latency and the registered compare side are this design's.
module bist
  import bisr_pkg::*;
#(
  parameter int unsigned AW     = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_start,
  input  logic              stall,
  input  logic              test_abort,
  input  logic [AW-1:0]     last_addr,
  // operation issued this cycle
  output logic              op_en,
  output logic              op_we,
  output logic [AW-1:0]     op_addr,
  output logic [DATA_W-1:0] op_wdata,
  // compare side, one cycle later
  output logic              cmp_en,
  output logic [AW-1:0]     cmp_addr,
  output logic [DATA_W-1:0] cmp_exp,
  output logic              busy,
  output logic              test_finish
);

  march_elem_e       elem;
  logic              op_idx, last_op;
  march_op_t         op;
  logic [DATA_W-1:0] pattern;
  logic              tag_load, tag_load_down, tag_step, tag_at_end;

  tpg #(.DATA_W(DATA_W)) u_tpg (
    .elem, .op_idx, .op, .pattern, .last_op, .dir_down()
  );

  tag #(.AW(AW)) u_tag (
    .clk, .rst_n, .load(tag_load), .load_down(tag_load_down), .step(tag_step),
    .last_addr, .addr(op_addr), .at_end(tag_at_end)
  );

  bist_ctr u_ctr (
    .clk, .rst_n, .start(test_start), .stall, .test_abort,
    .elem, .op_idx, .last_op,
    .next_dir_down(march_x_down(march_elem_e'(elem + 2'd1))),
    .tag_load, .tag_load_down, .tag_step, .tag_at_end,
    .issue(op_en), .busy, .test_finish
  );

  assign op_we    = !op.is_read;
  assign op_wdata = pattern;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_en   <= 1'b0;
      cmp_addr <= '0;
      cmp_exp  <= '0;
    end else begin
      cmp_en   <= op_en && op.is_read;
      cmp_addr <= op_addr;
      cmp_exp  <= pattern;
    end
  end

endmodule

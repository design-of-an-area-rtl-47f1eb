// fnr: fault number register (FNR) of a memory wrapper.
//
// Counts failing bits reported by the comparator while `count_en` is high
// (the parallel test). The count saturates at its maximum. `faulty` is high
// once any fault was seen; `irreparable` once the count exceeds IRREP_LIMIT,
// the most failing-bit reads a repairable memory can produce. The controller
// uses `faulty` to pick the memories that need a serial test and repair, and
// `irreparable` to stop at once. `clear` (synchronous) empties the register.
// A fault count per memory, kept in its wrapper, is part of the scheme; counting
// failing bits and the irreparability bound are this design's choices.
module fnr #(
  parameter int unsigned DATA_W      = 8,
  parameter int unsigned CNT_W       = 10,
  parameter int unsigned IRREP_LIMIT = 576
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              count_en,
  input  logic              fault_valid,
  input  logic [DATA_W-1:0] fault_syn,
  output logic [CNT_W-1:0]  count,
  output logic              faulty,
  output logic              irreparable
);

  localparam logic [CNT_W:0] CNT_MAX = {1'b0, {CNT_W{1'b1}}};

  logic [CNT_W:0] sum;

  always_comb begin
    sum = {1'b0, count};
    for (int i = 0; i < int'(DATA_W); i++) sum = sum + (CNT_W+1)'(fault_syn[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (count_en && fault_valid) begin
      count <= (sum > CNT_MAX) ? CNT_MAX[CNT_W-1:0] : sum[CNT_W-1:0];
    end
  end

  assign faulty      = (count != '0);
  assign irreparable = (32'(count) > IRREP_LIMIT);

endmodule

// cmp: comparator (CMP) of a memory wrapper.
//
// When `cmp_en` is high, compares the word read from the memory with the
// expected March pattern. A mismatch is reported one cycle later as fault
// information: `fault_valid`, the word address and a syndrome with a 1 on every
// failing bit, so that several faulty bits of one word are all kept. The
// comparator is part of the scheme's per-memory wrapper; the report format is
// this design's.
module cmp #(
  parameter int unsigned AW     = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmp_en,
  input  logic [AW-1:0]     cmp_addr,
  input  logic [DATA_W-1:0] cmp_exp,
  input  logic [DATA_W-1:0] rdata,
  output logic              fault_valid,
  output logic [AW-1:0]     fault_addr,
  output logic [DATA_W-1:0] fault_syn
);

  logic [DATA_W-1:0] diff;
  assign diff = rdata ^ cmp_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault_valid <= 1'b0;
      fault_addr  <= '0;
      fault_syn   <= '0;
    end else begin
      fault_valid <= cmp_en && (diff != '0);
      fault_addr  <= cmp_addr;
      fault_syn   <= diff;
    end
  end

endmodule

// tag: test address generator of the BIST.
//
// An up/down address counter. `load` starts an element at address 0 (upwards)
// or at `last_addr` (downwards); `step` moves one address on in the loaded
// direction. `at_end` is high on the element's final address. The upper bound
// is an input so that one generator serves memories of different sizes.
// The scheme only names the TAG; the plain binary counter is this design's.
// Timing: `addr` is a register; load and step take effect at the next clock.
module tag #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,       // start an element
  input  logic          load_down,  // direction of the element being loaded
  input  logic          step,       // advance one address
  input  logic [AW-1:0] last_addr,  // highest address of the memory under test
  output logic [AW-1:0] addr,
  output logic          at_end
);

  logic down_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr   <= '0;
      down_q <= 1'b0;
    end else if (load) begin
      addr   <= load_down ? last_addr : '0;
      down_q <= load_down;
    end else if (step) begin
      addr   <= down_q ? addr - 1'b1 : addr + 1'b1;
    end
  end

  assign at_end = down_q ? (addr == '0) : (addr == last_addr);

endmodule

// tpg: test pattern generator of the BIST.
//
// Holds the March X table. For the current march element and operation index it
// gives the operation (read or write), the data background replicated over the
// word (all zeros or all ones), the element's number of operations and its address
// direction. Purely combinational.
//
// March X, as used here:  M0 up(w0)  M1 up(r0,w1)  M2 down(r1,w0)  M3 up(r0).
// The operations and directions are the algorithm's; running M0 and M3 upwards
// (the algorithm allows either order) and using solid all-0 / all-1 data
// backgrounds for word-wide memories are choices of this design.
module tpg
  import bisr_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  march_elem_e       elem,      // current march element
  input  logic              op_idx,    // operation within the element
  output march_op_t         op,        // read/write and data bit
  output logic [DATA_W-1:0] pattern,   // word written, or expected on a read
  output logic              last_op,   // op_idx is the element's last operation
  output logic              dir_down   // element walks addresses downwards
);

  always_comb begin
    op = '{is_read: 1'b0, data_bit: 1'b0};
    unique case (elem)
      ELEM_M0: op = '{is_read: 1'b0, data_bit: 1'b0};                 // w0
      ELEM_M1: op = op_idx ? '{is_read: 1'b0, data_bit: 1'b1}         // w1
                           : '{is_read: 1'b1, data_bit: 1'b0};        // r0
      ELEM_M2: op = op_idx ? '{is_read: 1'b0, data_bit: 1'b0}         // w0
                           : '{is_read: 1'b1, data_bit: 1'b1};        // r1
      ELEM_M3: op = '{is_read: 1'b1, data_bit: 1'b0};                 // r0
    endcase
    pattern  = {DATA_W{op.data_bit}};
    last_op  = (32'(op_idx) + 1 == march_x_ops(elem));
    dir_down = march_x_down(elem);
  end

endmodule

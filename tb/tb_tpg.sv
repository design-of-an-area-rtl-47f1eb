// tb_tpg: checks the March X table of the test pattern generator for every
// element and operation, against the algorithm written out independently:
// M0 up(w0), M1 up(r0,w1), M2 down(r1,w0), M3 up(r0), over two data widths.
module tb_tpg;
  import bisr_pkg::*;
  int checks = 0, failures = 0;

  march_elem_e elem;
  logic        op_idx;
  march_op_t   op;
  logic [7:0]  pattern;
  logic [15:0] pattern16;
  logic        last_op, dir_down, last16, down16;
  march_op_t   op16;

  tpg #(.DATA_W(8))  dut   (.elem, .op_idx, .op, .pattern, .last_op, .dir_down);
  tpg #(.DATA_W(16)) dut16 (.elem, .op_idx, .op(op16), .pattern(pattern16), .last_op(last16), .dir_down(down16));

  // expected: {is_read, data, last, down} per (element, op)
  function automatic logic [3:0] expect_of(int e, int o);
    case ({e[1:0], o[0]})
      3'b000: return 4'b0011 & 4'b0010;  // w0, last, up
      3'b010: return 4'b1000;            // r0, not last
      3'b011: return 4'b0110;            // w1, last
      3'b100: return 4'b1101;            // r1, down
      3'b101: return 4'b0011;            // w0, last, down
      3'b110: return 4'b1010;            // r0, last
      default: return 4'b0000;
    endcase
  endfunction

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 4; e++) begin
      for (int o = 0; o < ((e == 1 || e == 2) ? 2 : 1); o++) begin
        logic [3:0] x;
        elem = march_elem_e'(e); op_idx = o[0];
        #1;
        x = expect_of(e, o);
        checks++;
        if ({op.is_read, op.data_bit, last_op, dir_down} !== x) begin
          failures++;
          $display("FAIL M%0d op%0d: got %b%b%b%b exp %b", e, o, op.is_read, op.data_bit, last_op, dir_down, x);
        end
        checks++;
        if (pattern !== {8{x[2]}} || pattern16 !== {16{x[2]}} || op16 !== op || last16 !== last_op || down16 !== dir_down) begin
          failures++;
          $display("FAIL pattern M%0d op%0d", e, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

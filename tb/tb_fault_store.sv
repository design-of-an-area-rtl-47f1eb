// tb_fault_store: random insert / kill-row / kill-column / clear operations
// against a reference array; checks every entry and the full flag each cycle.
module tb_fault_store;
  int checks = 0, failures = 0;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic clear = 0, ins = 0, kill_row = 0, kill_col = 0;
  logic [5:0] in_row = 0;
  logic [4:0] in_col = 0;
  logic [D-1:0] st_valid;
  logic [D-1:0][5:0] st_row;
  logic [D-1:0][4:0] st_col;
  logic full;

  fault_store #(.DEPTH(D), .ROW_W(6), .CID_W(5)) dut (.*);
  always #5 clk = ~clk;

  bit mv[D]; int mr[D]; int mc[D];

  initial begin
    #500000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ins = 0, n_kill = 0;
    foreach (mv[k]) mv[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int op;
      @(negedge clk);
      op = $urandom_range(0, 9);
      clear = (op == 0); ins = (op >= 1 && op <= 6); kill_row = (op == 7); kill_col = (op == 8);
      in_row = 6'($urandom_range(0, 7)); in_col = 5'($urandom_range(0, 7));
      if (clear) foreach (mv[k]) mv[k] = 0;
      else if (ins) begin
        for (int k = 0; k < D; k++) if (!mv[k]) begin
          mv[k] = 1; mr[k] = in_row; mc[k] = in_col; n_ins++; break;
        end
      end else if (kill_row || kill_col) begin
        for (int k = 0; k < D; k++)
          if ((kill_row && mr[k] == in_row) || (kill_col && mc[k] == in_col)) begin
            if (mv[k]) n_kill++;
            mv[k] = 0;
          end
      end
      @(posedge clk); #1;
      clear = 0; ins = 0; kill_row = 0; kill_col = 0;
      for (int k = 0; k < D; k++) begin
        checks++;
        if (st_valid[k] !== mv[k] || (mv[k] && (int'(st_row[k]) != mr[k] || int'(st_col[k]) != mc[k]))) begin
          failures++;
          $display("FAIL i=%0d entry %0d", i, k);
        end
      end
      checks++;
      if (full !== (mv.sum() with (int'(item)) == D)) failures++;
    end
    if (n_ins == 0 || n_kill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mr_counter: random fault-store contents and new faults; checks the row
// and column counts, the duplicate flag and both must-repair conditions.
module tb_mr_counter;
  int checks = 0, failures = 0;
  localparam int D = 8;
  logic [D-1:0] st_valid;
  logic [D-1:0][5:0] st_row;
  logic [D-1:0][4:0] st_col;
  logic [5:0] f_row;
  logic [4:0] f_col;
  logic [3:0] rows_left, cols_left, row_cnt, col_cnt;
  logic dup, must_row, must_col;

  mr_counter #(.DEPTH(D), .ROW_W(6), .CID_W(5), .CNT_W(4)) dut (.*);

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int rc, cc; bit dp;
      st_valid = D'($urandom);
      for (int k = 0; k < D; k++) begin
        st_row[k] = 6'($urandom_range(0, 3));
        st_col[k] = 5'($urandom_range(0, 3));
      end
      f_row = 6'($urandom_range(0, 4));
      f_col = 5'($urandom_range(0, 4));
      rows_left = 4'($urandom_range(0, 2));
      cols_left = 4'($urandom_range(0, 2));
      #1;
      rc = 0; cc = 0; dp = 0;
      for (int k = 0; k < D; k++) if (st_valid[k]) begin
        if (st_row[k] == f_row) rc++;
        if (st_col[k] == f_col) cc++;
        if (st_row[k] == f_row && st_col[k] == f_col) dp = 1;
      end
      checks++;
      if (int'(row_cnt) != rc || int'(col_cnt) != cc || dup !== dp ||
          must_row !== (!dp && rc + 1 > int'(cols_left)) || must_col !== (!dp && cc + 1 > int'(rows_left))) begin
        failures++;
        $display("FAIL i=%0d rc=%0d/%0d cc=%0d/%0d dup=%0d/%0d mr=%0d mc=%0d", i, row_cnt, rc, col_cnt, cc, dup, dp, must_row, must_col);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

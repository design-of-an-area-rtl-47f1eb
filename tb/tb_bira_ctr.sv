// tb_bira_ctr: the analyser controller with its fault store and must-repair
// counter. Random sets of cell faults (with repeats, as March X reports a cell
// more than once) are fed one per cycle, then test_finish. For each set the
// result is checked against a brute-force reference: `unrepair` exactly when
// 2 spare rows and 2 spare columns cannot cover the faults, otherwise a
// solution that covers every fault and is written once for the right memory.
// Also checks the worst-case analysis time and that must-repair rows and
// columns, search-only solutions and both kinds of failure all occur.
module tb_bira_ctr;
  import bisr_tb_pkg::*;
  int checks = 0, failures = 0;
  localparam int R = 2, C = 2, D = 8;
  logic clk = 0, rst_n = 0;
  logic start = 0, test_finish = 0, f_valid = 0, mfd_idle = 1;
  logic [1:0] start_mem_id = 0;
  logic [5:0] f_row = 0;
  logic [4:0] f_col = 0;
  logic [2:0] rows_left, cols_left, row_cnt, col_cnt;
  logic dup, must_row, must_col;
  logic st_clear, st_ins, st_kill_row, st_kill_col, st_full;
  logic [D-1:0] st_valid;
  logic [D-1:0][5:0] st_row;
  logic [D-1:0][4:0] st_col;
  logic rr_we;
  logic [1:0] rr_mem_id;
  logic [R-1:0][5:0] sol_row;
  logic [R-1:0] sol_row_v;
  logic [C-1:0][4:0] sol_col;
  logic [C-1:0] sol_col_v;
  logic busy, repair_done, unrepair, ev_must_row, ev_must_col;

  mr_counter #(.DEPTH(D), .ROW_W(6), .CID_W(5), .CNT_W(3)) u_cnt (.st_valid, .st_row, .st_col,
    .f_row, .f_col, .rows_left, .cols_left, .row_cnt, .col_cnt, .dup, .must_row, .must_col);
  fault_store #(.DEPTH(D), .ROW_W(6), .CID_W(5)) u_st (.clk, .rst_n, .clear(st_clear), .ins(st_ins),
    .kill_row(st_kill_row), .kill_col(st_kill_col), .in_row(f_row), .in_col(f_col),
    .st_valid, .st_row, .st_col, .full(st_full));
  bira_ctr #(.N_MEM(4), .ROW_W(6), .CID_W(5), .SPARE_ROWS(R), .SPARE_COLS(C), .DEPTH(D), .CNT_W(3)) dut (.*);

  always #5 clk = ~clk;

  int n_mr = 0, n_mc = 0, n_search_only = 0, n_unrep = 0, n_rep = 0, n_overflow = 0;

  initial begin
    #20000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      cell_t f[$];
      int srow[$], scol[$];
      int nf, span, wr, cyc, mr_seen, mc_seen;
      bit exp_rep, got_rep;
      f.delete(); srow.delete(); scol.delete();
      nf = $urandom_range(0, 12);
      span = $urandom_range(2, 8);
      for (int i = 0; i < nf; i++) begin
        cell_t c;
        c.row = $urandom_range(0, span); c.col = $urandom_range(0, span);
        f.push_back(c);
      end
      exp_rep = ref_repairable(f, R, C);
      @(negedge clk); start = 1; start_mem_id = 2'(t);
      @(negedge clk); start = 0;
      mr_seen = 0; mc_seen = 0;
      foreach (f[i]) begin
        repeat ($urandom_range(0, 1)) begin
          f_valid = 1; f_row = 6'(f[i].row); f_col = 5'(f[i].col); mfd_idle = 0;
          #1; if (ev_must_row) mr_seen++; if (ev_must_col) mc_seen++;
          @(negedge clk);
        end
        f_valid = 1; f_row = 6'(f[i].row); f_col = 5'(f[i].col); mfd_idle = 0;
        #1; if (ev_must_row) mr_seen++; if (ev_must_col) mc_seen++;
        @(negedge clk);
      end
      f_valid = 0; mfd_idle = 1; test_finish = 1;
      @(negedge clk); test_finish = 0;
      wr = 0; cyc = 0;
      while (!repair_done && !unrepair && cyc < 1000) begin
        if (rr_we) begin
          wr++;
          if (rr_mem_id != 2'(t)) begin failures++; $display("FAIL mem id"); end
          for (int k = 0; k < R; k++) if (sol_row_v[k]) srow.push_back(int'(sol_row[k]));
          for (int k = 0; k < C; k++) if (sol_col_v[k]) scol.push_back(int'(sol_col[k]));
        end
        @(negedge clk); cyc++;
      end
      got_rep = repair_done;
      checks++;
      if (got_rep !== exp_rep || (got_rep && (wr != 1 || !ref_covered(f, srow, scol)))) begin
        failures++;
        $display("FAIL t=%0d nf=%0d exp_rep=%0d got=%0d wr=%0d", t, nf, exp_rep, got_rep, wr);
        foreach (f[i]) $display("   fault r=%0d c=%0d", f[i].row, f[i].col);
      end
      checks++;
      if (cyc > 16 * (D + 1) + 4) begin failures++; $display("FAIL analysis took %0d cycles", cyc); end
      n_mr += mr_seen; n_mc += mc_seen;
      if (got_rep) begin n_rep++; if (mr_seen == 0 && mc_seen == 0 && (srow.size() + scol.size()) > 0) n_search_only++; end
      else n_unrep++;
      if (got_rep == 0 && dut.state_q == 3'd4 && cyc == 0) n_overflow++;
      repeat (2) @(negedge clk);
    end
    checks++;
    if (n_mr == 0 || n_mc == 0 || n_search_only == 0 || n_unrep == 0 || n_rep == 0 || n_overflow == 0) begin
      failures++;
    end
    $display("must-row %0d must-col %0d repaired %0d (search only %0d) unrepairable %0d (during collection %0d)",
             n_mr, n_mc, n_rep, n_search_only, n_unrep, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

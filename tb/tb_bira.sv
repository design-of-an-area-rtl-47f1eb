// tb_bira: the whole redundancy analyser fed with faulty words as a memory
// comparator reports them (address + failing-bit mask, repeated reports of the
// same word, bursts that fill the fault queue). For random fault sets on a
// memory with 64 rows of 4 words x 8 bits and 2 spare rows + 2 spare columns,
// checks unrepair against a brute-force reference, and that the repair
// registers of the addressed memory hold a covering solution while the other
// memories keep theirs. Also checks that the BIST stall and the multi-bit split
// both happened.
module tb_bira;
  import bisr_tb_pkg::*;
  int checks = 0, failures = 0;
  localparam int N = 4, R = 2, C = 2;
  logic clk = 0, rst_n = 0;
  logic clear_all = 0, start = 0, test_finish = 0, fault_valid = 0;
  logic [1:0] start_mem_id = 0;
  logic [7:0] fault_addr = 0, fault_syn = 0;
  logic stall, busy, repair_done, unrepair, ev_multi, ev_must_row, ev_must_col;
  logic [N-1:0][R-1:0][5:0] rep_row;
  logic [N-1:0][R-1:0] rep_row_v;
  logic [N-1:0][C-1:0][4:0] rep_col;
  logic [N-1:0][C-1:0] rep_col_v;
  logic [N-1:0] repaired;

  bira #(.N_MEM(N), .AW(8), .COL_W(2), .DATA_W(8), .SPARE_ROWS(R), .SPARE_COLS(C)) dut (.*);
  always #5 clk = ~clk;

  int n_stall = 0, n_multi = 0, n_rep = 0, n_unrep = 0;
  always @(posedge clk) begin
    if (stall) n_stall++;
    if (ev_multi) n_multi++;
  end

  initial begin
    #50000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_t f[$];
    logic [7:0] words[int];
    int keys[$], srow[$], scol[$], nf, cyc, reps;
    bit exp_rep;
    logic [N-1:0] rep_before;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear_all = 1; @(negedge clk); clear_all = 0;
    for (int t = 0; t < 400; t++) begin
      f.delete(); words.delete(); keys.delete(); srow.delete(); scol.delete();
      nf = $urandom_range(0, 10);
      for (int i = 0; i < nf; i++) begin
        cell_t c;
        int a, b;
        a = $urandom_range(0, 7) * 4 + $urandom_range(0, 3);   // rows 0..7
        if ($urandom_range(0, 1)) a = 8'(a) ^ 8'h80;          // some in the upper rows
        b = $urandom_range(0, 7);
        if (!words.exists(a)) words[a] = '0;
        if (!words[a][b]) begin
          words[a][b] = 1'b1;
          c.row = a / 4; c.col = (a % 4) * 8 + b;
          f.push_back(c);
        end
      end
      exp_rep = ref_repairable(f, R, C);
      rep_before = repaired;
      @(negedge clk); start = 1; start_mem_id = 2'(t);
      @(negedge clk); start = 0;
      foreach (words[a]) keys.push_back(a);
      // each faulty word is reported 1..3 times, back to back when possible
      for (int k = 0; k < keys.size(); k++) begin
        reps = $urandom_range(1, 3);
        while (reps > 0) begin
          fault_valid = !stall; fault_addr = 8'(keys[k]); fault_syn = words[keys[k]];
          if (!stall) reps--;
          @(negedge clk);
        end
        fault_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      fault_valid = 0;
      repeat (3) @(negedge clk);
      test_finish = 1; @(negedge clk); test_finish = 0;
      cyc = 0;
      while (!repair_done && !unrepair && cyc < 2000) begin @(negedge clk); cyc++; end
      checks++;
      if (repair_done !== exp_rep) begin
        failures++;
        $display("FAIL t=%0d exp_rep=%0d got=%0d", t, exp_rep, repair_done);
      end
      if (repair_done) begin
        @(negedge clk);
        for (int k = 0; k < R; k++) if (rep_row_v[t % 4][k]) srow.push_back(int'(rep_row[t % 4][k]));
        for (int k = 0; k < C; k++) if (rep_col_v[t % 4][k]) scol.push_back(int'(rep_col[t % 4][k]));
        checks++;
        if (!repaired[t % 4] || !ref_covered(f, srow, scol)) begin
          failures++; $display("FAIL t=%0d solution does not cover", t);
        end
        checks++;
        if ((repaired & ~(4'b1 << (t % 4))) !== (rep_before & ~(4'b1 << (t % 4)))) begin
          failures++; $display("FAIL t=%0d other memories changed", t);
        end
        n_rep++;
      end else n_unrep++;
    end
    checks++;
    if (n_stall == 0 || n_multi == 0 || n_rep == 0 || n_unrep == 0) begin
      failures++; $display("FAIL coverage stall=%0d multi=%0d rep=%0d unrep=%0d", n_stall, n_multi, n_rep, n_unrep);
    end
    $display("stall cycles %0d, multi-bit splits %0d, repaired %0d, unrepairable %0d", n_stall, n_multi, n_rep, n_unrep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_multi_fault_det: pushes random faulty words (one to several failing bits)
// and checks that they come out as single-cell faults in order, lowest bit
// first, with row = address / 4 and column = {address mod 4, bit}; checks the
// multi-bit flag and that stall follows the FIFO fill level (DEPTH - SLACK).
module tb_multi_fault_det;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0;
  logic fault_valid = 0;
  logic [7:0] fault_addr = 0, fault_syn = 0;
  logic f_valid, multi, stall, idle;
  logic [5:0] f_row;
  logic [4:0] f_col;

  multi_fault_det #(.AW(8), .COL_W(2), .DATA_W(8), .DEPTH(8), .SLACK(4)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int row; int col; bit more; } cf_t;
  cf_t exp_q[$];
  int words = 0, n_stall = 0, n_multi = 0;
  int ref_words[$];   // failing-bit count of each queued word

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check the current output against the reference
      checks++;
      if (f_valid !== (exp_q.size() != 0) || idle !== (ref_words.size() == 0) ||
          stall !== (ref_words.size() >= 4)) begin
        failures++;
        $display("FAIL i=%0d valid=%0d exp=%0d stall=%0d words=%0d", i, f_valid, exp_q.size(), stall, ref_words.size());
      end
      if (stall) n_stall++;
      if (f_valid) begin
        checks++;
        if (int'(f_row) != exp_q[0].row || int'(f_col) != exp_q[0].col || multi !== exp_q[0].more) begin
          failures++;
          $display("FAIL i=%0d row=%0d/%0d col=%0d/%0d", i, f_row, exp_q[0].row, f_col, exp_q[0].col);
        end
        if (multi) n_multi++;
      end
      // drive a new word, only while not stalled
      fault_valid = !stall && ($urandom_range(0, 99) < (i < 1500 ? 60 : 20));
      fault_addr  = 8'($urandom);
      fault_syn   = 8'($urandom) & 8'($urandom);
      if (fault_syn == 0) fault_syn = 8'h01 << $urandom_range(0, 7);
      // consume the head in the reference (it is shown during this cycle)
      if (exp_q.size() != 0) begin
        bit last;
        last = !exp_q[0].more;
        void'(exp_q.pop_front());
        if (last) void'(ref_words.pop_front());
      end
      if (fault_valid) begin
        int nb, k;
        nb = $countones(fault_syn); k = 0;
        ref_words.push_back(nb);
        for (int b = 0; b < 8; b++) if (fault_syn[b]) begin
          k++;
          exp_q.push_back('{int'(fault_addr[7:2]), int'({fault_addr[1:0], 3'(b)}), k < nb});
        end
      end
    end
    checks++;
    if (n_stall == 0 || n_multi == 0) begin failures++; $display("FAIL stall=%0d multi=%0d", n_stall, n_multi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

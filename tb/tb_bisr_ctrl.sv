// tb_bisr_ctrl: plays the BIST, the wrappers and the BIRA around the sequencer
// and checks the two-stage procedure: parallel test with every memory
// selected and fault counting on, repair of memory 0, then a serial test of
// each faulty memory only, in index order, with only that memory selected;
// fault-free memories skipped; stop on an irreparable fault count; abort of a
// running test on unrepair; and the final done / unrepair outputs.
module tb_bisr_ctrl;
  int checks = 0, failures = 0;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic test_start = 0, bist_finish = 0, repair_done = 0, bira_unrepair = 0;
  logic [N-1:0] faulty = 0, irreparable = 0, sel;
  logic bist_start, bist_abort, parallel, fnr_clear, fnr_count_en, bira_start, rr_clear;
  logic done, unrepair, ev_skip, ev_serial, ev_fnr_irrep;
  logic [1:0] cur_id;

  bisr_ctrl #(.N_MEM(N)) dut (.*);
  always #5 clk = ~clk;

  int serial_ids[$];
  int n_skip = 0, n_abort = 0;

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // BIST + BIRA stand-in: each test lasts a few cycles, then the BIRA answers.
  // `bad` names the memory the BIRA finds unrepairable (-1: none); `abort_in_test`
  // makes that happen during the test rather than after it.
  task automatic scenario(logic [N-1:0] f, logic [N-1:0] irr, int bad, bit abort_in_test,
                          logic [N-1:0] exp_serial, bit exp_unrep);
    logic [N-1:0] got_mask;
    bit ascending;
    serial_ids.delete(); n_skip = 0;
    faulty = 0; irreparable = 0;
    @(negedge clk); test_start = 1;
    #1 chk(bist_start && bira_start && fnr_clear && rr_clear && cur_id == 0, "start strobes");
    @(negedge clk); test_start = 0;
    chk(parallel && sel == '1 && fnr_count_en, "parallel stage selects all");
    forever begin
      int id;
      id = int'(cur_id);
      repeat (5) begin
        if (abort_in_test && id == bad) bira_unrepair = 1;
        #1 if (bira_unrepair) begin chk(bist_abort, "abort during test"); n_abort++; end
        @(negedge clk);
      end
      if (parallel) begin faulty = f; irreparable = irr; end
      bist_finish = 1; @(negedge clk); bist_finish = 0;
      chk(!fnr_count_en && sel == '0, "nothing selected after test");
      repeat (3) @(negedge clk);
      if (id == bad) bira_unrepair = 1; else repair_done = 1;
      @(negedge clk); repair_done = 0;
      // wait for the next serial start or the end
      while (!bist_start && !done) begin
        #1 if (ev_skip) n_skip++;
        @(negedge clk);
      end
      if (done) break;
      serial_ids.push_back(int'(cur_id));
      @(negedge clk);
      chk(!parallel && sel == (N'(1) << cur_id) && !fnr_count_en, "serial stage selects one memory");
    end
    bira_unrepair = 0;
    chk(unrepair == exp_unrep, "unrepair result");
    got_mask = '0; ascending = 1;
    foreach (serial_ids[i]) begin
      got_mask[serial_ids[i]] = 1'b1;
      if (i > 0 && serial_ids[i] <= serial_ids[i-1]) ascending = 0;
    end
    chk(got_mask == exp_serial && ascending, "serial order");
    if (got_mask != exp_serial) $display("   serial set %b", got_mask);
    repeat (3) @(negedge clk);
    chk(done, "done held");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    scenario(4'b0000, 4'b0000, -1, 0, 4'b0000, 0);
    chk(n_skip == 3, "three fault-free memories skipped");
    scenario(4'b1011, 4'b0000, -1, 0, 4'b1010, 0);
    chk(n_skip == 1, "memory 2 skipped");
    scenario(4'b1110, 4'b0100, -1, 0, 4'b0010, 1);          // FNR of memory 2 says irreparable
    scenario(4'b0110, 4'b0000, 2, 0, 4'b0110, 1);        // analysis of memory 2 fails
    scenario(4'b1111, 4'b0000, 0, 1, 4'b0000, 1);            // memory 0 fails during the parallel test
    scenario(4'b1111, 4'b0000, 3, 1, 4'b1110, 1);     // memory 3 fails during its serial test
    chk(n_abort > 0, "aborts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

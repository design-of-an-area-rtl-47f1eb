// tb_bist_ctr: drives the BIST controller together with a TPG and a TAG and
// checks the issued operation stream against March X written out in the
// testbench (M0 up w0, M1 up r0 w1, M2 down r1 w0, M3 up r0), with random
// stalls. Checks the cycle count from start to test_finish (6*W + 4 cycles
// plus one per stalled cycle), that nothing is issued during a stall, and
// that an abort ends the test with test_finish after the flush.
module tb_bist_ctr;
  import bisr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, stall = 0, test_abort = 0;
  march_elem_e elem;
  logic op_idx, last_op, dir_down, next_down;
  march_op_t op;
  logic [7:0] pattern;
  logic tag_load, tag_load_down, tag_step, tag_at_end;
  logic issue, busy, test_finish;
  logic [5:0] last_addr, addr;

  tpg #(.DATA_W(8)) u_tpg (.elem, .op_idx, .op, .pattern, .last_op, .dir_down);
  tpg #(.DATA_W(8)) u_tpg_n (.elem(march_elem_e'(elem + 2'd1)), .op_idx(1'b0), .op(), .pattern(),
                             .last_op(), .dir_down(next_down));
  tag #(.AW(6)) u_tag (.clk, .rst_n, .load(tag_load), .load_down(tag_load_down), .step(tag_step),
                       .last_addr, .addr, .at_end(tag_at_end));
  bist_ctr dut (.clk, .rst_n, .start, .stall, .test_abort, .elem, .op_idx, .last_op,
                .next_dir_down(next_down), .tag_load, .tag_load_down, .tag_step, .tag_at_end,
                .issue, .busy, .test_finish);

  always #5 clk = ~clk;

  typedef struct { bit rd; bit d; int a; } xop_t;
  xop_t exp_q[$];

  task automatic build(int w);
    exp_q.delete();
    for (int a = 0; a < w; a++) exp_q.push_back('{0, 0, a});
    for (int a = 0; a < w; a++) begin exp_q.push_back('{1, 0, a}); exp_q.push_back('{0, 1, a}); end
    for (int a = w - 1; a >= 0; a--) begin exp_q.push_back('{1, 1, a}); exp_q.push_back('{0, 0, a}); end
    for (int a = 0; a < w; a++) exp_q.push_back('{1, 0, a});
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int stall_pct, int abort_after);
    int t0, stalls = 0, n = 0, idx = 0;
    build(w);
    last_addr = 6'(w - 1);
    @(negedge clk); start = 1;
    t0 = cyc;
    @(negedge clk); start = 0;
    while (!test_finish) begin
      stall = ($urandom_range(0, 99) < stall_pct);
      test_abort = (abort_after >= 0 && n >= abort_after);
      #1;
      if (stall && !test_abort && busy && dut.state_q == 1) stalls++;
      if (issue) begin
        checks++;
        if (idx >= exp_q.size() || op.is_read !== exp_q[idx].rd || op.data_bit !== exp_q[idx].d ||
            int'(addr) != exp_q[idx].a) begin
          failures++;
          $display("FAIL w=%0d op %0d: rd=%0d d=%0d a=%0d", w, idx, op.is_read, op.data_bit, addr);
        end
        idx++; n++;
      end
      if ((stall || test_abort) && issue) begin failures++; $display("FAIL issue during stall/abort"); end
      @(negedge clk);
    end
    stall = 0; test_abort = 0;
    checks++;
    if (abort_after < 0) begin
      if (idx != 6 * w || cyc - t0 != 6 * w + 4 + stalls) begin
        failures++;
        $display("FAIL w=%0d ops=%0d cycles=%0d exp %0d", w, idx, cyc - t0, 6 * w + 4 + stalls);
      end
    end else if (idx != abort_after) begin
      failures++;
      $display("FAIL abort: ops=%0d", idx);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(64, 0, -1);
    run(64, 30, -1);
    run(16, 10, -1);
    run(2, 50, -1);
    run(32, 0, 70);
    run(8, 0, -1);      // a normal run after an abort
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

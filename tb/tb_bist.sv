// tb_bist: checks the complete BIST: the memory operation stream (enable,
// write enable, address, data word) against March X written out here, the
// compare side one cycle later (enable only for reads, expected word and
// address of that read), the range input, and the 6*W + 4 cycle test time.
module tb_bist;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic test_start = 0, stall = 0, test_abort = 0;
  logic [7:0] last_addr = 0, op_addr, cmp_addr;
  logic op_en, op_we, cmp_en, busy, test_finish;
  logic [15:0] op_wdata, cmp_exp;

  bist #(.AW(8), .DATA_W(16)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit rd; bit d; int a; } xop_t;
  xop_t exp_q[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #3000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w);
    int t0, idx = 0, pend_v = 0, pend_a = 0, pend_d = 0;
    exp_q.delete();
    for (int a = 0; a < w; a++) exp_q.push_back('{0, 0, a});
    for (int a = 0; a < w; a++) begin exp_q.push_back('{1, 0, a}); exp_q.push_back('{0, 1, a}); end
    for (int a = w - 1; a >= 0; a--) begin exp_q.push_back('{1, 1, a}); exp_q.push_back('{0, 0, a}); end
    for (int a = 0; a < w; a++) exp_q.push_back('{1, 0, a});
    last_addr = 8'(w - 1);
    @(negedge clk); test_start = 1; t0 = cyc;
    @(negedge clk); test_start = 0;
    while (!test_finish) begin
      // compare side belongs to the operation of the previous cycle
      checks++;
      if (cmp_en !== 1'(pend_v) || (pend_v != 0 && (int'(cmp_addr) != pend_a || cmp_exp !== {16{1'(pend_d)}}))) begin
        failures++;
        $display("FAIL cmp side at op %0d", idx);
      end
      pend_v = 0;
      if (op_en) begin
        checks++;
        if (idx >= exp_q.size() || op_we !== !exp_q[idx].rd || int'(op_addr) != exp_q[idx].a ||
            op_wdata !== {16{exp_q[idx].d}}) begin
          failures++;
          $display("FAIL w=%0d op %0d we=%0d a=%0d d=%h", w, idx, op_we, op_addr, op_wdata);
        end
        pend_v = exp_q[idx].rd; pend_a = exp_q[idx].a; pend_d = exp_q[idx].d;
        idx++;
      end
      @(negedge clk);
    end
    checks++;
    if (idx != 6 * w || cyc - t0 != 6 * w + 4) begin
      failures++;
      $display("FAIL w=%0d ops=%0d cycles=%0d", w, idx, cyc - t0);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(256); run(64); run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

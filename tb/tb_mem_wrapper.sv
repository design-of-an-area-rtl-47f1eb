// tb_mem_wrapper: a 64-word memory behind its wrapper, driven by a BIST whose
// range is 256 words. Checks that the memory only sees in-range operations of
// a selected run (6 * 64 accesses), that every fault report names an injected
// stuck-at cell, and that the fault number register ends at the count March X
// must produce (two failing reads per stuck-at-1 cell, one per stuck-at-0),
// then that a heavily faulty memory is flagged irreparable.
module tb_mem_wrapper;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic sel = 0, fnr_clear = 0, fnr_count_en = 0;
  logic test_start = 0, stall = 0, test_abort = 0;
  logic [7:0] last_addr = 8'd255, op_addr, cmp_addr, fault_addr;
  logic op_en, op_we, cmp_en, busy, test_finish;
  logic [7:0] op_wdata, cmp_exp, mem_wdata, mem_rdata, fault_syn;
  logic mem_en, mem_we, fault_valid, faulty, irreparable;
  logic [5:0] mem_addr;
  logic [9:0] fault_count;

  bist #(.AW(8), .DATA_W(8)) u_bist (.clk, .rst_n, .test_start, .stall, .test_abort, .last_addr,
    .op_en, .op_we, .op_addr, .op_wdata, .cmp_en, .cmp_addr, .cmp_exp, .busy, .test_finish);
  mem_wrapper #(.AW(8), .MEM_ROW_W(4), .COL_W(2), .DATA_W(8), .SPARE_ROWS(2), .SPARE_COLS(2), .CNT_W(10)) dut (
    .clk, .rst_n, .sel, .fnr_clear, .fnr_count_en, .op_en, .op_we, .op_addr, .op_wdata,
    .cmp_en, .cmp_addr, .cmp_exp, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .fault_valid, .fault_addr, .fault_syn, .fault_count, .faulty, .irreparable);
  sram_model #(.AW(6), .DATA_W(8)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

  logic [7:0] inj_mask [64];
  int reports = 0, bad_reports = 0, oob = 0;
  always @(posedge clk) begin
    if (mem_en && op_addr >= 8'd64) oob++;
    if (fault_valid) begin
      reports++;
      if (fault_addr >= 8'd64 || (fault_syn & ~inj_mask[fault_addr[5:0]]) != 0) bad_reports++;
    end
  end

  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit s);
    sel = s;
    @(negedge clk); test_start = 1; fnr_clear = 1; fnr_count_en = 1;
    @(negedge clk); test_start = 0; fnr_clear = 0;
    while (!test_finish) @(negedge clk);
    @(negedge clk); fnr_count_en = 0;
  endtask

  initial begin
    int exp_cnt = 0, acc0;
    foreach (inj_mask[a]) inj_mask[a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1: a few stuck-at faults, several in one word
    for (int i = 0; i < 12; i++) begin
      int a, b, v;
      a = $urandom_range(0, 63); b = $urandom_range(0, 7); v = $urandom_range(0, 1);
      if (!inj_mask[a][b]) begin
        u_mem.inject(a, b, v[0]);
        inj_mask[a][b] = 1;
        exp_cnt += v ? 2 : 1;
      end
    end
    acc0 = u_mem.n_access;
    run(1);
    checks++; if (u_mem.n_access - acc0 != 6 * 64) begin failures++; $display("FAIL accesses %0d", u_mem.n_access - acc0); end
    checks++; if (oob != 0) begin failures++; $display("FAIL out-of-range accesses %0d", oob); end
    checks++; if (int'(fault_count) != exp_cnt || !faulty || irreparable) begin
      failures++; $display("FAIL count %0d exp %0d", fault_count, exp_cnt); end
    checks++; if (reports == 0 || bad_reports != 0) begin failures++; $display("FAIL reports %0d bad %0d", reports, bad_reports); end
    // 2: not selected: no access, no count
    acc0 = u_mem.n_access;
    run(0);
    checks++; if (u_mem.n_access != acc0 || fault_count != 0 || faulty) begin failures++; $display("FAIL unselected"); end
    // 3: 150 stuck-at-1 cells: 300 failing reads exceed the limit of 288
    u_mem.clear_faults();
    for (int i = 0; i < 150; i++) u_mem.inject(i / 8 + 8, i % 8, 1'b1);
    run(1);
    checks++; if (fault_count != 10'd300 || !irreparable) begin failures++; $display("FAIL irreparable count %0d", fault_count); end
    // 4: fault-free memory
    u_mem.clear_faults();
    run(1);
    checks++; if (fault_count != 0 || faulty || irreparable) begin failures++; $display("FAIL clean memory"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

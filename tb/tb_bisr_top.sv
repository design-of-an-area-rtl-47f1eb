// tb_bisr_top: end-to-end test of the BISR at its default configuration
// (four memories of 256, 128, 128 and 64 words of 8 bits, 2 spare rows and
// 2 spare columns each). Behavioural SRAMs with injected stuck-at cells hang
// on the memory ports. Each run starts a test and waits for `bisr_done`; the
// result is checked against a brute-force reference: `unrepair` exactly when
// some memory cannot be covered by its spares, every memory before the first
// unrepairable one repaired with a solution covering all its faults, faulty
// memories tested serially and fault-free ones not, fault counts matching
// March X (two failing reads per stuck-at-1 cell, one per stuck-at-0), and the
// run time: a fault-free group takes one parallel test of 6*256 operations
// plus a few cycles. After a repairable run the solutions are applied to the
// memory models and a second run must find every memory fault-free. Every mechanism (stall, multi-bit word, must-repair row
// and column, skip, serial test, irreparable fault count, abort) must occur.
module tb_bisr_top;
  import bisr_pkg::*;
  import bisr_tb_pkg::*;
  int checks = 0, failures = 0;
  localparam int N = 4, R = 2, C = 2, CW = 2, DW = 8;
  localparam int ROWW [N] = '{6, 5, 5, 4};

  logic clk = 0, rst_n = 0, test_start = 0;
  logic [N-1:0] mem_en, mem_we, faulty, repaired;
  logic [N-1:0][7:0] mem_addr;
  logic [N-1:0][7:0] mem_wdata, mem_rdata;
  logic bisr_done, unrepair, busy;
  bisr_events_t events;
  logic [N-1:0][9:0] fault_count;
  logic [N-1:0][R-1:0][5:0] rep_row;
  logic [N-1:0][R-1:0] rep_row_v;
  logic [N-1:0][C-1:0][4:0] rep_col;
  logic [N-1:0][C-1:0] rep_col_v;

  bisr_top dut (.*);

  sram_model #(.AW(8), .DATA_W(8)) u_m0 (.clk, .en(mem_en[0]), .we(mem_we[0]), .addr(mem_addr[0][7:0]),
    .wdata(mem_wdata[0]), .rdata(mem_rdata[0]));
  sram_model #(.AW(7), .DATA_W(8)) u_m1 (.clk, .en(mem_en[1]), .we(mem_we[1]), .addr(mem_addr[1][6:0]),
    .wdata(mem_wdata[1]), .rdata(mem_rdata[1]));
  sram_model #(.AW(7), .DATA_W(8)) u_m2 (.clk, .en(mem_en[2]), .we(mem_we[2]), .addr(mem_addr[2][6:0]),
    .wdata(mem_wdata[2]), .rdata(mem_rdata[2]));
  sram_model #(.AW(6), .DATA_W(8)) u_m3 (.clk, .en(mem_en[3]), .we(mem_we[3]), .addr(mem_addr[3][5:0]),
    .wdata(mem_wdata[3]), .rdata(mem_rdata[3]));

  always #5 clk = ~clk;

  // event counters
  int ev_cnt [8];
  always @(posedge clk) if (rst_n) begin
    if (events.stall)      ev_cnt[0]++;
    if (events.multi)      ev_cnt[1]++;
    if (events.must_row)   ev_cnt[2]++;
    if (events.must_col)   ev_cnt[3]++;
    if (events.skip)       ev_cnt[4]++;
    if (events.serial)     ev_cnt[5]++;
    if (events.fnr_irrep)  ev_cnt[6]++;
    if (events.test_abort) ev_cnt[7]++;
  end
  // serial tests seen per memory
  int serial_of [N];
  always @(posedge clk) if (events.serial) serial_of[dut.u_ctrl.cur_id]++;

  cell_t faults [N][$];
  int    exp_cnt [N];

  task automatic clear_all_faults();
    u_m0.clear_faults(); u_m1.clear_faults(); u_m2.clear_faults(); u_m3.clear_faults();
    for (int m = 0; m < N; m++) begin faults[m].delete(); exp_cnt[m] = 0; end
  endtask

  // Stuck-at cell at (row, column = {column address, bit}) of memory m.
  task automatic add_fault(int m, int row, int col, bit v);
    int a, b;
    cell_t c;
    a = row * (1 << CW) + col / DW;
    b = col % DW;
    foreach (faults[m][i]) if (faults[m][i].row == row && faults[m][i].col == col) return;
    case (m)
      0: u_m0.inject(a, b, v);
      1: u_m1.inject(a, b, v);
      2: u_m2.inject(a, b, v);
      default: u_m3.inject(a, b, v);
    endcase
    c.row = row; c.col = col;
    faults[m].push_back(c);
    exp_cnt[m] += v ? 2 : 1;
  endtask

  // Hand the repair registers to the memory models.
  task automatic apply_repairs();
    for (int m = 0; m < N; m++) begin
      for (int k = 0; k < R; k++) if (rep_row_v[m][k])
        case (m)
          0: u_m0.repair_row(rep_row[m][k], CW);
          1: u_m1.repair_row(rep_row[m][k], CW);
          2: u_m2.repair_row(rep_row[m][k], CW);
          default: u_m3.repair_row(rep_row[m][k], CW);
        endcase
      for (int k = 0; k < C; k++) if (rep_col_v[m][k])
        case (m)
          0: u_m0.repair_col(rep_col[m][k], CW);
          1: u_m1.repair_col(rep_col[m][k], CW);
          2: u_m2.repair_col(rep_col[m][k], CW);
          default: u_m3.repair_col(rep_col[m][k], CW);
        endcase
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Run one test-and-repair and check it; returns the cycles it took.
  task automatic run(string name, output int took);
    int t0, first_bad, serial_before [N], stalls0, srow[$], scol[$];
    bit rep_ok [N];
    first_bad = N;
    for (int m = 0; m < N; m++) begin
      rep_ok[m] = ref_repairable(faults[m], R, C);
      if (!rep_ok[m] && first_bad == N) first_bad = m;
      serial_before[m] = serial_of[m];
    end
    stalls0 = ev_cnt[0];
    @(negedge clk); test_start = 1; t0 = cyc;
    @(negedge clk); test_start = 0;
    while (!bisr_done && cyc - t0 < 20000) @(negedge clk);
    took = cyc - t0;
    chk(bisr_done, {name, ": finished"});
    chk(unrepair == (first_bad != N), {name, ": unrepair result"});
    for (int m = 0; m < N; m++) begin
      bit tested_serially;
      tested_serially = serial_of[m] != serial_before[m];
      if (m < first_bad) begin
        srow.delete(); scol.delete();
        for (int k = 0; k < R; k++) if (rep_row_v[m][k]) srow.push_back(int'(rep_row[m][k]));
        for (int k = 0; k < C; k++) if (rep_col_v[m][k]) scol.push_back(int'(rep_col[m][k]));
        if (m == 0 || faults[m].size() != 0) begin
          chk(repaired[m] && ref_covered(faults[m], srow, scol), $sformatf("%s: memory %0d repaired", name, m));
        end
        if (m > 0) chk(tested_serially == (faults[m].size() != 0), $sformatf("%s: memory %0d serial test", name, m));
        if (first_bad == N || m == 0)
          chk(int'(fault_count[m]) == exp_cnt[m], $sformatf("%s: memory %0d fault count %0d exp %0d", name, m, fault_count[m], exp_cnt[m]));
      end
    end
    if (failures != 0 && name != "") $display("  %s took %0d cycles, unrepair=%0d", name, took, unrepair);
  endtask

  initial begin
    int took, serial_ops, n_rerun = 0;
    for (int i = 0; i < 8; i++) ev_cnt[i] = 0;
    for (int m = 0; m < N; m++) serial_of[m] = 0;
    clear_all_faults();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. fault-free group: one parallel test, everything else skipped
    run("clean", took);
    chk(took >= 6 * 256 + 4 && took <= 6 * 256 + 4 + 30, $sformatf("clean run time %0d", took));
    chk(!unrepair && faulty == '0, "clean: no faults");

    // 2. repairable faults: memory 0 (must-repair row, multi-bit words), memory 2
    //    (must-repair column), memory 3 (found by the search); memory 1 clean
    clear_all_faults();
    for (int c = 0; c < 32; c++) add_fault(0, 17, c, 1);              // a whole row stuck at 1
    add_fault(0, 40, 9, 1); add_fault(0, 41, 9, 0);
    for (int r = 2; r < 30; r += 5) add_fault(2, r, 21, 1);           // one bad column
    add_fault(3, 5, 3, 1); add_fault(3, 9, 3, 0); add_fault(3, 9, 12, 1);
    run("repairable", took);
    serial_ops = 6 * 256 + 4 + (6 * 128 + 4) + (6 * 64 + 4);
    chk(took >= serial_ops && took <= serial_ops + (ev_cnt[0]) + 4 * 200, $sformatf("repairable run time %0d", took));
    chk(!unrepair, "repairable: repaired");
    // apply the solutions to the memories and test again: all memories now pass
    apply_repairs();
    for (int m = 0; m < N; m++) begin faults[m].delete(); exp_cnt[m] = 0; end
    run("after repair", took);
    chk(!unrepair && faulty == '0 && took <= 6 * 256 + 4 + 30, "repaired group tests clean");

    // 3. memory 2 needs three rows and three columns: unrepairable after search
    clear_all_faults();
    add_fault(1, 3, 4, 1);
    for (int i = 0; i < 3; i++) add_fault(2, 4 * i + 1, 5 * i + 2, 1);
    for (int i = 0; i < 3; i++) add_fault(2, 4 * i + 2, 5 * i + 3, 0);
    run("search fails", took);

    // 4. memory 0 has three rows with three faults each: must-repair runs out,
    //    the parallel test is aborted
    clear_all_faults();
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) add_fault(0, 10 + r, 7 * c + r, 1);
    add_fault(3, 1, 1, 1);
    run("abort", took);
    chk(took < 6 * 256, $sformatf("aborted run shorter than a full test (%0d)", took));

    // 5. memory 3 has so many faults that its count alone proves it unrepairable
    clear_all_faults();
    for (int r = 0; r < 16; r++) for (int c = 0; c < 32; c += 3) add_fault(3, r, c, 1);
    run("fault count", took);

    // 6. random fault sets
    for (int t = 0; t < 25; t++) begin
      clear_all_faults();
      for (int m = 0; m < N; m++) begin
        if ($urandom_range(0, 2) != 0) begin
          int nf, rr, cc;
          nf = $urandom_range(1, 7);
          for (int i = 0; i < nf; i++) begin
            rr = $urandom_range(0, 7) * ((1 << ROWW[m]) / 8);
            cc = $urandom_range(0, 7) * 4 + $urandom_range(0, 1);
            add_fault(m, rr, cc, 1'($urandom));
          end
        end
      end
      run($sformatf("random %0d", t), took);
      if (!unrepair) begin
        apply_repairs();
        for (int m = 0; m < N; m++) begin faults[m].delete(); exp_cnt[m] = 0; end
        run($sformatf("random %0d repaired", t), took);
        chk(!unrepair && faulty == '0, $sformatf("random %0d: repaired group tests clean", t));
        n_rerun++;
      end
    end

    $display("events: stall %0d multi %0d must_row %0d must_col %0d skip %0d serial %0d fnr_irrep %0d abort %0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], ev_cnt[6], ev_cnt[7]);
    chk(n_rerun > 0, "some random groups were repaired and retested");
    for (int i = 0; i < 8; i++) chk(ev_cnt[i] > 0, $sformatf("event %0d happened", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

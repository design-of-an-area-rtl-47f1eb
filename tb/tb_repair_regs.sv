// tb_repair_regs: writes random solutions to random memories and checks that
// each memory keeps its own solution until cleared.
module tb_repair_regs;
  int checks = 0, failures = 0;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  logic [1:0] mem_id = 0;
  logic [1:0][5:0] sol_row = 0;
  logic [1:0] sol_row_v = 0;
  logic [1:0][4:0] sol_col = 0;
  logic [1:0] sol_col_v = 0;
  logic [N-1:0][1:0][5:0] rep_row;
  logic [N-1:0][1:0] rep_row_v;
  logic [N-1:0][1:0][4:0] rep_col;
  logic [N-1:0][1:0] rep_col_v;
  logic [N-1:0] repaired;

  repair_regs #(.N_MEM(N), .ROW_W(6), .CID_W(5), .SPARE_ROWS(2), .SPARE_COLS(2)) dut (.*);
  always #5 clk = ~clk;

  typedef struct packed {
    logic [1:0][5:0] row;
    logic [1:0]      row_v;
    logic [1:0][4:0] col;
    logic [1:0]      col_v;
    logic            rep;
  } sol_t;
  sol_t model [N];
  initial begin
    #500000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[k]) model[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 99) == 0);
      we = $urandom_range(0, 1);
      mem_id = 2'($urandom);
      sol_row = 12'($urandom); sol_row_v = 2'($urandom);
      sol_col = 10'($urandom); sol_col_v = 2'($urandom);
      if (clear) foreach (model[k]) begin
        model[k].row_v = '0; model[k].col_v = '0; model[k].rep = 1'b0;
      end else if (we) model[mem_id] = '{row: sol_row, row_v: sol_row_v, col: sol_col, col_v: sol_col_v, rep: 1'b1};
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (rep_row_v[k] !== model[k].row_v || rep_col_v[k] !== model[k].col_v || repaired[k] !== model[k].rep ||
            (model[k].row_v != 0 && rep_row[k] !== model[k].row) ||
            (model[k].col_v != 0 && rep_col[k] !== model[k].col)) begin
          failures++;
          $display("FAIL i=%0d mem %0d", i, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

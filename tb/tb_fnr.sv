// tb_fnr: feeds random syndromes and checks the failing-bit count, the
// count enable, saturation, clear, and the faulty / irreparable flags.
module tb_fnr;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clear = 0, count_en = 0, fault_valid = 0;
  logic [7:0] fault_syn = 0;
  logic [5:0] count;
  logic faulty, irreparable;
  localparam int LIMIT = 40;

  fnr #(.DATA_W(8), .CNT_W(6), .IRREP_LIMIT(LIMIT)) dut (
    .clk, .rst_n, .clear, .count_en, .fault_valid, .fault_syn, .count, .faulty, .irreparable);
  always #5 clk = ~clk;

  initial begin
    #500000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear       = ($urandom_range(0, 199) == 0);
      count_en    = $urandom_range(0, 5) != 0;
      fault_valid = $urandom_range(0, 2) == 0;
      fault_syn   = 8'($urandom) & 8'($urandom);
      if (clear) model = 0;
      else if (count_en && fault_valid) begin
        model += $countones(fault_syn);
        if (model > 63) model = 63;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(count) != model || faulty !== (model != 0) || irreparable !== (model > LIMIT)) begin
        failures++;
        $display("FAIL i=%0d count=%0d exp=%0d", i, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

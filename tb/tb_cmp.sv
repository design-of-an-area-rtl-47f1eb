// tb_cmp: random read data against expected words; checks the registered
// fault report (valid only on enabled mismatches, address, failing-bit mask).
module tb_cmp;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmp_en = 0;
  logic [7:0] cmp_addr = 0, cmp_exp = 0, rdata = 0, fault_addr, fault_syn;
  logic fault_valid;

  cmp #(.AW(8), .DATA_W(8)) dut (.clk, .rst_n, .cmp_en, .cmp_addr, .cmp_exp, .rdata,
                                 .fault_valid, .fault_addr, .fault_syn);
  always #5 clk = ~clk;

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_v; logic [7:0] e_a, e_s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cmp_en   = $urandom_range(0, 3) != 0;
      cmp_addr = 8'($urandom);
      cmp_exp  = $urandom_range(0, 1) ? 8'hff : 8'h00;
      rdata    = ($urandom_range(0, 2) == 0) ? cmp_exp ^ (8'(1) << $urandom_range(0, 7)) ^ 8'($urandom_range(0,1) ? $urandom : 0) : cmp_exp;
      e_v = cmp_en && (rdata != cmp_exp);
      e_a = cmp_addr;
      e_s = rdata ^ cmp_exp;
      @(posedge clk); #1;
      checks++;
      if (fault_valid !== e_v || (e_v && (fault_addr !== e_a || fault_syn !== e_s))) begin
        failures++;
        $display("FAIL i=%0d v=%0d/%0d a=%h/%h s=%h/%h", i, fault_valid, e_v, fault_addr, e_a, fault_syn, e_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

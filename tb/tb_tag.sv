// tb_tag: runs the address generator up and down over several ranges and
// checks every address and the end flag against a counted reference.
module tb_tag;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load = 0, load_down = 0, step = 0;
  logic [7:0] last_addr = 0, addr;
  logic at_end;

  tag #(.AW(8)) dut (.clk, .rst_n, .load, .load_down, .step, .last_addr, .addr, .at_end);

  always #5 clk = ~clk;

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int last, bit down);
    int exp_a;
    last_addr = 8'(last); load = 1; load_down = down;
    @(posedge clk); #1 load = 0;
    exp_a = down ? last : 0;
    for (int n = 0; n <= last; n++) begin
      checks++;
      if (addr !== 8'(exp_a) || at_end !== (n == last)) begin
        failures++;
        $display("FAIL last=%0d down=%0d n=%0d addr=%0d exp=%0d end=%0d", last, down, n, addr, exp_a, at_end);
      end
      // a cycle without step must hold the address
      if (n == 1) begin @(posedge clk); #1; checks++; if (addr !== 8'(exp_a)) failures++; end
      step = 1; @(posedge clk); #1 step = 0;
      exp_a = down ? exp_a - 1 : exp_a + 1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(255, 0); run(255, 1); run(63, 0); run(63, 1); run(15, 1); run(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tpg: checks that the pattern generator cycles 01, 10, 11, 00 while run is
// high, holds while run is low, restarts on start and flags the fourth pattern.
module tb_tpg;
  logic clk = 0, rst = 1, start = 0, run = 0;
  logic [1:0] test_in;
  logic last;
  int checks = 0, failures = 0;
  logic [1:0] seq [4] = '{2'b01, 2'b10, 2'b11, 2'b00};
  int idx = 0;

  tpg dut (.clk, .rst, .start, .run, .test_in, .last);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      start = ($urandom_range(0, 15) == 0);
      run   = !start && ($urandom_range(0, 3) != 0);
      checks++;
      if (test_in !== seq[idx] || last !== (idx == 3)) begin
        failures++; $display("mismatch i=%0d idx=%0d got=%b", i, idx, test_in);
      end
      @(posedge clk);
      if (start) idx = 0; else if (run) idx = (idx + 1) % 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ssd: self-checking test of the syndrome storing-based detector.
// A reference model counts the run of identical nonzero syndromes on valid words
// and expects perm_err exactly on the 9th word of such a run.  The stimulus mixes
// long runs of one syndrome, interruptions, zero syndromes, idle cycles and busy
// pulses.
module tb_ssd;
  logic       clk = 0, rst = 1;
  logic       valid, busy;
  logic [2:0] synd;
  logic       perm_err;
  int checks = 0, failures = 0;
  int run_len;          // length of current run of identical nonzero syndromes
  logic [2:0] last_s;
  int n_err = 0;

  ssd dut (.clk, .rst, .valid, .busy, .synd, .perm_err);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic v, input logic b, input logic [2:0] s);
    logic exp;
    valid = v; busy = b; synd = s;
    #1;
    // reference: run_len counts identical nonzero syndromes so far (incl. this one)
    if (b) exp = 0;
    else if (v && s != 0 && s == last_s) exp = (run_len + 1 >= 9);
    else exp = 0;
    checks++;
    if (perm_err !== exp) begin
      failures++;
      $display("mismatch t=%0t v=%b b=%b s=%0d run=%0d exp=%b got=%b", $time, v, b, s, run_len, exp, perm_err);
    end
    if (exp) n_err++;
    @(posedge clk);
    if (b) begin run_len = 0; last_s = 0; end
    else if (v) begin
      if (s != 0 && s == last_s) run_len++;
      else run_len = (s != 0) ? 1 : 0;
      last_s = s;
    end
    #1;
  endtask

  initial begin
    valid = 0; busy = 0; synd = 0; run_len = 0; last_s = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    #1;
    // exactly 8 identical: no error; 9th gives it
    for (int i = 0; i < 8; i++) step(1, 0, 3'd5);
    step(1, 0, 3'd5);
    step(1, 0, 3'd5);
    // idle cycles do not break the run
    step(0, 0, 3'd0);
    step(1, 0, 3'd5);
    // busy clears
    step(0, 1, 3'd0);
    for (int i = 0; i < 9; i++) step(1, 0, 3'd2);
    // zero syndromes never count
    for (int i = 0; i < 12; i++) step(1, 0, 3'd0);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      logic [2:0] s;
      s = ($urandom_range(0, 9) < 8) ? 3'd6 : 3'($urandom);
      step($urandom_range(0, 7) != 0, $urandom_range(0, 60) == 0, s);
    end
    checks++;
    if (n_err < 5) begin failures++; $display("too few detections %0d", n_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

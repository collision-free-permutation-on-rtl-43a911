// tb_switch_arbiter: random request, status and answer patterns.  Reference:
// a free output requested by several ICs goes to the lowest-numbered one; a busy
// output is never granted; every IC sees the answer of the output it owns.
module tb_switch_arbiter;
  import noc_pkg::*;
  logic       ic_req [4];
  logic [1:0] ic_port [4];
  logic       oc_busy [4];
  logic [1:0] oc_owner [4];
  ans_t       ans_out [4];
  logic       ic_grant [4];
  logic       oc_seize [4];
  logic [1:0] oc_seize_owner [4];
  ans_t       ic_ans [4];
  int checks = 0, failures = 0;

  switch_arbiter dut (.ic_req, .ic_port, .oc_busy, .oc_owner, .ans_out,
                      .ic_grant, .oc_seize, .oc_seize_owner, .ic_ans);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic exp_grant [4];
      for (int i = 0; i < 4; i++) begin
        ic_req[i] = $urandom_range(0, 1);
        ic_port[i] = 2'($urandom);
        oc_busy[i] = $urandom_range(0, 2) == 0;
        oc_owner[i] = 2'($urandom);
        ans_out[i] = ans_t'($urandom);
        exp_grant[i] = 0;
      end
      for (int o = 0; o < 4; o++) begin
        int win;
        win = -1;
        for (int i = 0; i < 4; i++)
          if (win < 0 && ic_req[i] && ic_port[i] == o && !oc_busy[o]) win = i;
        if (win >= 0) exp_grant[win] = 1;
        #0;
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        ans_t ea;
        ea = ANS_NONE;
        for (int o = 0; o < 4; o++) if (oc_busy[o] && oc_owner[o] == i) ea = ans_out[o];
        checks += 2;
        if (ic_grant[i] !== exp_grant[i]) begin failures++; $display("grant mismatch n=%0d i=%0d", n, i); end
        if (ic_ans[i] !== ea) begin failures++; $display("ans mismatch n=%0d i=%0d", n, i); end
      end
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (oc_seize[o] && (!ic_req[oc_seize_owner[o]] || ic_port[oc_seize_owner[o]] != o
                            || !exp_grant[oc_seize_owner[o]] || oc_busy[o])) begin
          failures++; $display("seize mismatch n=%0d o=%0d", n, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

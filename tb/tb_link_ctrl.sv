// tb_link_ctrl: the central control unit is driven with a model of the link
// wires: each wire may be stuck at 0 or 1, and test_out returns what the wires
// under test deliver for the TPG pattern.  Scenarios: a clean ILT round (must
// last 30 windows x 5 clocks and disable nothing), stuck wires found by ILT,
// low_spare with one spare left, no_spare when both are used, recovery of a wire whose fault went away
// (retest of disabled wires), an SSD report mapped through the shifted wire
// assignment to the right physical wire, an SSD report dropped when no spare is
// left, and a round started by the period timer.
module tb_link_ctrl;
  import noc_pkg::*;
  localparam int NW = 30, NC = 28;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          ilt_trigger = 0;
  logic          ssd_err [4];
  logic [NC-1:0] err_vec = '0;
  logic [1:0]    test_pat, test_out;
  logic          tpg_last, tpg_start, tpg_run;
  logic [NW-1:0] dis, tst;
  logic          busy, low_spare, no_spare, ilt_active, ev_ilt_disable, ev_ilt_recover, ev_ssd_disable;
  logic [NW-1:0] stuck = '0, stuck_val = '0;
  int n_busy = 0, n_dis_ev = 0, n_rec_ev = 0, n_ssd_ev = 0;

  tpg u_tpg (.clk, .rst, .start(tpg_start), .run(tpg_run), .test_in(test_pat), .last(tpg_last));
  link_ctrl #(.ILT_PERIOD(1000)) dut (.clk, .rst, .ilt_trigger, .ssd_err, .err_vec,
    .test_pat, .test_out, .tpg_last, .tpg_start, .tpg_run, .dis, .tst, .busy, .low_spare, .no_spare,
    .ilt_active, .ev_ilt_disable, .ev_ilt_recover, .ev_ssd_disable);

  always_comb begin
    int t;
    t = 0;
    test_out = '0;
    for (int w = 0; w < NW; w++) if (tst[w]) begin
      test_out[t] = stuck[w] ? stuck_val[w] : test_pat[t];
      t++;
    end
  end

  always @(posedge clk) if (!rst) begin
    if (busy) n_busy++;
    if (ev_ilt_disable) n_dis_ev++;
    if (ev_ilt_recover) n_rec_ev++;
    if (ev_ssd_disable) n_ssd_ev++;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0t %s dis=%h", $time, m, dis); end
  endtask

  task automatic round(output int len);
    @(negedge clk); ilt_trigger = 1; @(negedge clk); ilt_trigger = 0;
    len = 0;
    while (ilt_active) begin @(negedge clk); len++; end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int len;
    for (int c = 0; c < 4; c++) ssd_err[c] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // 1: clean round
    round(len);
    chk(len == 30 * 5 - 1 || len == 30 * 5, $sformatf("round length %0d", len));
    chk(dis == '0, "clean round disabled something");
    // 2: stuck-at-0 on wire 7 and stuck-at-1 on wire 20
    stuck[7] = 1; stuck_val[7] = 0;
    round(len);
    chk(dis == NW'(1) << 7, "wire 7 not found");
    chk(!no_spare, "no_spare too early");
    chk(low_spare, "low_spare not raised with one spare left");
    stuck[20] = 1; stuck_val[20] = 1;
    round(len);
    chk(dis == ((NW'(1) << 7) | (NW'(1) << 20)), "wire 20 not found");
    chk(no_spare, "no_spare not raised");
    chk(!low_spare, "low_spare with no spare left");
    // 3: wire 7 recovers (intermittent): retest of disabled wires
    stuck[7] = 0;
    round(len);
    chk(dis == NW'(1) << 20, "wire 7 not recovered");
    // 4: SSD report on codeword 3, line 1 (code line 22) -> physical wire 23
    @(negedge clk);
    ssd_err[3] = 1; err_vec = NC'(1) << 22;
    @(negedge clk);
    ssd_err[3] = 0; err_vec = '0;
    repeat (4) @(negedge clk);
    chk(dis == ((NW'(1) << 20) | (NW'(1) << 23)), "SSD wire mapping");
    chk(n_ssd_ev == 1, $sformatf("SSD event %0d", n_ssd_ev));
    // 5: SSD report with no spare left is dropped
    @(negedge clk);
    ssd_err[0] = 1; err_vec = NC'(1) << 2;
    @(negedge clk);
    ssd_err[0] = 0; err_vec = '0;
    repeat (4) @(negedge clk);
    chk(dis == ((NW'(1) << 20) | (NW'(1) << 23)), "SSD applied without spare");
    // 6: a round while the wire under SSD suspicion is fine again recovers it
    round(len);
    chk(dis == NW'(1) << 20, "wire 23 not recovered by ILT");
    // 7: periodic start
    len = 0;
    while (!ilt_active && len < 1100) begin @(negedge clk); len++; end
    chk(ilt_active, "period timer did not start a round");
    chk(n_dis_ev >= 2 && n_rec_ev >= 2 && n_busy >= 5, $sformatf("events dis=%0d rec=%0d busy=%0d", n_dis_ev, n_rec_ev, n_busy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

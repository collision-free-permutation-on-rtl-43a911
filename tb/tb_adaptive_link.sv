// tb_adaptive_link: a self-adaptive link carries random words every cycle while
// a wire model between phy_tx and phy_rx injects stuck-at faults.
// Checks that dout equals din in every cycle (single errors are corrected,
// reconfiguration and in-line tests never interrupt the data), that the SSD
// path disables a stuck data wire without any ILT round, that an ILT round finds
// a stuck wire (here a spare wire, which carries no data and so can only be found
// by testing), that a wire whose fault disappears is recovered, and that
// low_spare is raised with one spare left and no_spare when both are used.
module tb_adaptive_link;
  import noc_pkg::*;
  localparam int NW = 30;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0]   din, dout;
  logic          valid = 0, ilt_trigger = 0;
  logic [NW-1:0] phy_tx, phy_rx, dis;
  logic          corrected, low_spare, no_spare, ilt_active, ev_ilt_disable, ev_ilt_recover, ev_ssd_disable;
  logic [NW-1:0] stuck = '0, stuck_val = '0;
  int n_corr = 0, n_ilt_dis = 0, n_ilt_rec = 0, n_ssd = 0, n_ilt_cycles = 0;
  logic check_data = 1;

  adaptive_link #(.ILT_PERIOD(100000)) dut (.clk, .rst, .din, .valid, .ilt_trigger,
    .phy_tx, .phy_rx, .dout, .corrected, .dis, .low_spare, .no_spare, .ilt_active,
    .ev_ilt_disable, .ev_ilt_recover, .ev_ssd_disable);

  assign phy_rx = (phy_tx & ~stuck) | (stuck_val & stuck);

  always @(negedge clk) if (!rst) begin
    if (check_data) begin
      checks++;
      if (dout !== din) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t din=%h dout=%h dis=%h", $time, din, dout, dis);
      end
    end
    din <= 16'($urandom);
    valid <= 1;
  end

  always @(posedge clk) if (!rst) begin
    if (corrected) n_corr++;
    if (ev_ilt_disable) n_ilt_dis++;
    if (ev_ilt_recover) n_ilt_rec++;
    if (ev_ssd_disable) n_ssd++;
    if (ilt_active) n_ilt_cycles++;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0t %s dis=%h", $time, m, dis); end
  endtask

  task automatic round();
    @(negedge clk); ilt_trigger = 1; @(negedge clk); ilt_trigger = 0;
    while (ilt_active) @(negedge clk);
  endtask

  initial begin
    #5000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (50) @(negedge clk);
    round();                                   // clean round under traffic
    chk(dis == '0, "clean round");
    // stuck-at-1 on data wire 9: corrected, then found by SSD
    stuck[9] = 1; stuck_val[9] = 1;
    repeat (300) @(negedge clk);
    chk(dis == NW'(1) << 9, "SSD did not disable wire 9");
    chk(low_spare && !no_spare, "low_spare not raised");
    chk(n_ssd == 1, "SSD event count");
    chk(n_corr > 0, "no corrected words");
    // stuck-at-0 on wire 29, now a spare carrying nothing: only ILT can find it
    stuck[29] = 1; stuck_val[29] = 0;
    repeat (300) @(negedge clk);
    chk(dis == NW'(1) << 9, "spare wire fault seen without test");
    round();
    chk(dis == ((NW'(1) << 9) | (NW'(1) << 29)), "ILT did not find wire 29");
    chk(no_spare, "no_spare not raised");
    // wire 9 heals: the next round retests disabled wires and recovers it
    stuck[9] = 0;
    round();
    chk(dis == NW'(1) << 29, "wire 9 not recovered");
    chk(!no_spare, "no_spare still raised");
    repeat (100) @(negedge clk);
    chk(n_ilt_dis >= 1 && n_ilt_rec >= 1, "ILT events");
    $display("corrected=%0d ssd=%0d ilt_dis=%0d ilt_rec=%0d ilt_cycles=%0d", n_corr, n_ssd, n_ilt_dis, n_ilt_rec, n_ilt_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

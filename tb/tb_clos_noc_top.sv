// tb_clos_noc_top: end-to-end test of the 16x16 network at its default sizes.
// Sixteen source models and sixteen destination models run rounds of traffic
// permutations (full ones, where every port sends, and partial ones).  A source
// sends a probe for its destination, retries after a Back, and on Ack sends
// 2..8 payload words {C, src, seq, dst} and releases the path.  A destination
// checks the probe address, sometimes holds the source off with nAck before its
// Ack, and checks that every payload word comes from the source the permutation
// assigns to it.  The middle->output link wires are modelled here: stuck-at
// faults are injected on some of them while traffic runs.
// Mechanisms counted (each must occur): path setups, Back to a source (blocked
// setup), input-stage backtracking, nAck stalls, corrected single errors, SSD
// wire disables, ILT wire disables, ILT wire recoveries, low_spare, no_spare.
// Also checked: words received = words sent, every round completes.
module tb_clos_noc_top;
  import noc_pkg::*;
  localparam int NW = 30, NL = 16, P = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              ilt_trigger = 0;
  logic              src_req  [P];
  logic [DATA_W-1:0] src_data [P];
  ans_t              src_ans  [P];
  logic              dst_req  [P];
  logic [DATA_W-1:0] dst_data [P];
  ans_t              dst_ans  [P];
  logic [NW-1:0]     lnk_tx [NL], lnk_rx [NL], lnk_dis [NL];
  logic              lnk_low_spare [NL], lnk_no_spare [NL], lnk_corrected [NL], lnk_ilt_active [NL];
  logic              ev_backtrack [P];
  logic              ev_ilt_disable [NL], ev_ilt_recover [NL], ev_ssd_disable [NL];

  clos_noc_top dut (.clk, .rst, .ilt_trigger, .src_req, .src_data, .src_ans,
    .dst_req, .dst_data, .dst_ans, .lnk_tx, .lnk_rx, .lnk_dis, .lnk_low_spare, .lnk_no_spare,
    .lnk_corrected, .lnk_ilt_active, .ev_backtrack, .ev_ilt_disable, .ev_ilt_recover,
    .ev_ssd_disable);

  // link wire model with stuck-at faults
  logic [NW-1:0] stuck [NL], stuck_val [NL];
  for (genvar l = 0; l < NL; l++) begin : g_w
    assign lnk_rx[l] = (lnk_tx[l] & ~stuck[l]) | (stuck_val[l] & stuck[l]);
  end

  int perm [P];          // perm[src] = dst, -1 = idle this round
  int inv  [P];          // inv[dst] = src
  logic go [P];
  logic done [P];
  int sent = 0, recv = 0, n_setup = 0, n_back = 0, n_bt = 0, n_nack = 0;
  int n_corr = 0, n_ssd = 0, n_ilt_dis = 0, n_ilt_rec = 0, n_nospare = 0, n_lowspare = 0;

  task automatic fail(input string m);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, m);
  endtask

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < P; i++) if (ev_backtrack[i]) n_bt++;
    for (int l = 0; l < NL; l++) begin
      if (lnk_corrected[l] && dut.s2_req[l / 4][l % 4]) n_corr++;
      if (ev_ssd_disable[l]) n_ssd++;
      if (ev_ilt_disable[l]) n_ilt_dis++;
      if (ev_ilt_recover[l]) n_ilt_rec++;
      if (lnk_no_spare[l]) n_nospare++;
      if (lnk_low_spare[l]) n_lowspare++;
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_src
    initial begin
      src_req[i] = 0; src_data[i] = 0; done[i] = 0;
      wait (!rst);
      forever begin
        int d;
        @(posedge clk);
        if (go[i] && !done[i]) begin
          d = perm[i];
          if (d < 0) done[i] <= 1;
          else begin
            logic ok;
            ok = 0;
            while (!ok) begin
              src_req[i] <= 1; src_data[i] <= {12'h000, 4'(d)};
              @(posedge clk);
              while (src_ans[i] == ANS_NONE || src_ans[i] == ANS_NACK) @(posedge clk);
              if (src_ans[i] == ANS_ACK) begin
                ok = 1; n_setup++;
                for (int w = 0; w < $urandom_range(2, 8); w++) begin
                  src_data[i] <= {4'hC, 4'(i), 4'(w), 4'(d)};
                  sent++;
                  @(posedge clk);
                end
              end else n_back++;
              src_req[i] <= 0; src_data[i] <= 0;
              repeat ($urandom_range(1, 4)) @(posedge clk);
            end
            done[i] <= 1;
          end
        end
      end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_dst
    initial begin
      dst_ans[o] = ANS_NONE;
      wait (!rst);
      forever begin
        @(posedge clk);
        if (dst_req[o]) begin
          checks++;
          if (dst_data[o] != 16'(o)) fail($sformatf("dst %0d got probe %h", o, dst_data[o]));
          if ($urandom_range(0, 3) == 0) begin
            dst_ans[o] <= ANS_NACK; n_nack++;
            repeat ($urandom_range(1, 4)) @(posedge clk);
          end
          dst_ans[o] <= ANS_ACK;
          @(posedge clk);
          while (dst_req[o]) begin
            if (dst_data[o][15:12] == 4'hC) begin
              recv++;
              checks++;
              if (dst_data[o][3:0] != 4'(o) || int'(dst_data[o][11:8]) != inv[o])
                fail($sformatf("dst %0d got word %h (expected src %0d)", o, dst_data[o], inv[o]));
            end
            @(posedge clk);
          end
          dst_ans[o] <= ANS_NONE;
        end
      end
    end
  end

  task automatic run_round(input bit partial);
    int a [P];
    for (int i = 0; i < P; i++) a[i] = i;
    a.shuffle();
    for (int i = 0; i < P; i++) begin
      perm[i] = (partial && $urandom_range(0, 2) == 0) ? -1 : a[i];
      inv[a[i]] = (perm[i] < 0) ? -1 : i;
    end
    for (int i = 0; i < P; i++) begin done[i] = 0; go[i] = 1; end
    for (int i = 0; i < P; i++) wait (done[i]);
    for (int i = 0; i < P; i++) go[i] = 0;
    repeat (6) @(posedge clk);       // let the last releases propagate
  endtask

  task automatic ilt_round();
    @(negedge clk); ilt_trigger = 1; @(negedge clk); ilt_trigger = 0;
    @(negedge clk);
    while (lnk_ilt_active[0]) @(negedge clk);
  endtask

  initial begin
    #20000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int l = 0; l < NL; l++) begin stuck[l] = '0; stuck_val[l] = '0; end
    for (int i = 0; i < P; i++) begin go[i] = 0; perm[i] = -1; inv[i] = -1; end
    repeat (3) @(posedge clk);
    rst = 0;
    // phase 1: clean network
    for (int r = 0; r < 6; r++) run_round(r % 2);
    // phase 2: stuck data wires on several links (found by SSD or ILT),
    // a stuck spare wire on link 10 (found only by ILT)
    for (int l = 0; l < NL; l += 3) begin stuck[l][3 + l] = 1; stuck_val[l][3 + l] = l[0]; end
    stuck[10][29] = 1; stuck_val[10][29] = 1;
    for (int r = 0; r < 10; r++) run_round(r % 2);
    ilt_round();
    checks++;
    if (!lnk_dis[10][29]) fail("ILT missed spare wire 29 of link 10");
    for (int l = 0; l < NL; l += 3) begin
      checks++;
      if (!lnk_dis[l][3 + l]) fail($sformatf("stuck wire %0d of link %0d not disabled", 3 + l, l));
    end
    // phase 3: link 0 loses its second spare too, then wire 29 of link 10 heals
    stuck[0][20] = 1; stuck_val[0][20] = 0;
    ilt_round();
    stuck[10][29] = 0;
    for (int r = 0; r < 4; r++) run_round(0);
    ilt_round();
    checks++;
    if (lnk_dis[10][29]) fail("wire 29 of link 10 not recovered");
    for (int r = 0; r < 4; r++) run_round(r % 2);
    checks++;
    if (recv != sent) fail($sformatf("sent %0d words, received %0d", sent, recv));
    checks++;
    if (n_setup == 0 || n_back == 0 || n_bt == 0 || n_nack == 0 || n_corr == 0 ||
        n_ssd == 0 || n_ilt_dis == 0 || n_ilt_rec == 0 || n_nospare == 0 || n_lowspare == 0)
      fail("a mechanism never occurred");
    $display("setups=%0d backs=%0d backtracks=%0d nack_stalls=%0d corrected=%0d ssd_disables=%0d ilt_disables=%0d ilt_recoveries=%0d low_spare_cycles=%0d no_spare_cycles=%0d words=%0d/%0d",
             n_setup, n_back, n_bt, n_nack, n_corr, n_ssd, n_ilt_dis, n_ilt_rec, n_lowspare, n_nospare, recv, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

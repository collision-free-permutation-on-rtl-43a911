// tb_clos_noc_perm: the full-permutation workload, sixteen path setups issued
// in the same clock, on the network at its default sizes with fault-free links.
// 1. Permutations that need no rearrangement (identity, and dest = src + 4,
//    src XOR 5 within the same position pattern) must set up every circuit at
//    the first try: no Back, and every source samples Ack on the 8th clock edge
//    after the edge that raised Req (2 clocks per switch stage, 1 for the
//    destination's registered Ack, 1 to sample).  After 4 payload words per
//    circuit, the release must reach every destination 3 clocks after the
//    sources drop Req.
// 2. Random full permutations: sources retry after Back until all sixteen
//    circuits have carried their words; the testbench reports how many tries
//    and clocks each permutation took and checks every word's source.
module tb_clos_noc_perm;
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

  assign lnk_rx = lnk_tx;

  int inv [P];
  int recv = 0;

  task automatic fail(input string m);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, m);
  endtask

  // destinations: Ack one clock after Req is seen, check every payload word
  for (genvar o = 0; o < P; o++) begin : g_dst
    always_ff @(posedge clk) begin
      if (rst) dst_ans[o] <= ANS_NONE;
      else begin
        dst_ans[o] <= dst_req[o] ? ANS_ACK : ANS_NONE;
        if (dst_req[o] && dst_data[o][15:12] == 4'hC) begin
          recv++;
          checks++;
          if (dst_data[o][3:0] != 4'(o) || int'(dst_data[o][11:8]) != inv[o])
            fail($sformatf("dst %0d got %h", o, dst_data[o]));
        end
      end
    end
  end

  // contention-free permutation, all sources in lock step
  task automatic lockstep(input int perm [P]);
    int lat [P];
    logic got [P];
    int n;
    for (int i = 0; i < P; i++) begin inv[perm[i]] = i; got[i] = 0; end
    @(posedge clk);
    for (int i = 0; i < P; i++) begin src_req[i] <= 1; src_data[i] <= {12'h0, 4'(perm[i])}; end
    for (n = 1; n <= 20; n++) begin
      @(posedge clk);
      for (int i = 0; i < P; i++) if (!got[i] && src_ans[i] != ANS_NONE) begin
        got[i] = 1; lat[i] = n;
        checks++;
        if (src_ans[i] != ANS_ACK) fail($sformatf("src %0d answered %0d", i, src_ans[i]));
      end
    end
    for (int i = 0; i < P; i++) begin
      checks++;
      if (!got[i] || lat[i] != 8) fail($sformatf("src %0d setup latency %0d", i, lat[i]));
    end
    for (int w = 0; w < 4; w++) begin
      for (int i = 0; i < P; i++) src_data[i] <= {4'hC, 4'(i), 4'(w), 4'(perm[i])};
      @(posedge clk);
    end
    for (int i = 0; i < P; i++) begin src_req[i] <= 0; src_data[i] <= 0; end
    repeat (3) @(posedge clk);
    for (int o = 0; o < P; o++) begin checks++; if (!dst_req[o]) fail("released too early"); end
    @(posedge clk);
    for (int o = 0; o < P; o++) begin checks++; if (dst_req[o]) fail("release took more than 3 clocks"); end
    repeat (3) @(posedge clk);
  endtask

  // random full permutation with retries
  logic done [P];
  int tries [P];
  task automatic random_perm(output int clocks, output int total_tries);
    int a [P];
    for (int i = 0; i < P; i++) a[i] = i;
    a.shuffle();
    for (int i = 0; i < P; i++) begin inv[a[i]] = i; done[i] = 0; tries[i] = 0; end
    clocks = 0;
    fork
      for (int k = 0; k < P; k++) begin
        fork
          automatic int i = k;
          begin
            while (!done[i]) begin
              tries[i]++;
              src_req[i] <= 1; src_data[i] <= {12'h0, 4'(a[i])};
              @(posedge clk);
              while (src_ans[i] == ANS_NONE) @(posedge clk);
              if (src_ans[i] == ANS_ACK) begin
                for (int w = 0; w < 4; w++) begin
                  src_data[i] <= {4'hC, 4'(i), 4'(w), 4'(a[i])};
                  @(posedge clk);
                end
                done[i] = 1;
              end
              src_req[i] <= 0; src_data[i] <= 0;
              repeat (1 + i % 3) @(posedge clk);
            end
          end
        join_none
      end
      begin
        logic all;
        all = 0;
        while (!all) begin
          @(posedge clk); clocks++;
          all = 1;
          for (int i = 0; i < P; i++) if (!done[i]) all = 0;
        end
      end
    join
    total_tries = 0;
    for (int i = 0; i < P; i++) total_tries += tries[i];
    repeat (8) @(posedge clk);
  endtask

  initial begin
    #5000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int perm [P];
    int clocks, t, expect_words;
    for (int i = 0; i < P; i++) begin src_req[i] = 0; src_data[i] = 0; inv[i] = -1; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < P; i++) perm[i] = i;
    lockstep(perm);
    for (int i = 0; i < P; i++) perm[i] = (i + 4) % P;
    lockstep(perm);
    for (int i = 0; i < P; i++) perm[i] = i ^ 5;
    lockstep(perm);
    expect_words = 3 * P * 4;
    checks++;
    if (recv != expect_words) fail($sformatf("received %0d of %0d words", recv, expect_words));
    for (int r = 0; r < 10; r++) begin
      random_perm(clocks, t);
      $display("random full permutation %0d: %0d setup attempts for 16 circuits, %0d clocks", r, t, clocks);
      expect_words += P * 4;
    end
    checks++;
    if (recv != expect_words) fail($sformatf("received %0d of %0d words", recv, expect_words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

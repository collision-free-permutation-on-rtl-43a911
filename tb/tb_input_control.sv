// tb_input_control: one input control of each switch kind (input, middle, output
// stage) is driven with random Req, probes, status, grants and answers.  A
// cycle-level reference model of the setup/backtrack/release rules predicts the
// answer upstream, the request bus and the release of the owned output every
// cycle.  Counters confirm that connections, backtracks and blocked setups all
// occurred; a directed run checks that an input-stage IC answers Back only
// after trying all four outputs.
module tb_input_control;
  import noc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_conn = 0, n_bt = 0, n_block = 0;

  logic       req_in [3];
  logic [3:0] dest_in [3];
  ans_t       ans_in [3];
  logic       oc_busy [3][4];
  logic       arb_req [3];
  logic [1:0] arb_port [3];
  logic       grant [3];
  ans_t       ans_from_oc [3];
  logic       rel [3];
  logic [1:0] rel_port [3];
  logic       backtrack [3];

  input_control #(.STAGE(STAGE_IN),  .IDX(1)) u0 (.clk, .rst, .req_in(req_in[0]), .dest_in(dest_in[0]),
    .ans_in(ans_in[0]), .oc_busy(oc_busy[0]), .arb_req(arb_req[0]), .arb_port(arb_port[0]), .grant(grant[0]),
    .ans_from_oc(ans_from_oc[0]), .rel(rel[0]), .rel_port(rel_port[0]), .backtrack(backtrack[0]));
  input_control #(.STAGE(STAGE_MID), .IDX(2)) u1 (.clk, .rst, .req_in(req_in[1]), .dest_in(dest_in[1]),
    .ans_in(ans_in[1]), .oc_busy(oc_busy[1]), .arb_req(arb_req[1]), .arb_port(arb_port[1]), .grant(grant[1]),
    .ans_from_oc(ans_from_oc[1]), .rel(rel[1]), .rel_port(rel_port[1]), .backtrack(backtrack[1]));
  input_control #(.STAGE(STAGE_OUT), .IDX(3)) u2 (.clk, .rst, .req_in(req_in[2]), .dest_in(dest_in[2]),
    .ans_in(ans_in[2]), .oc_busy(oc_busy[2]), .arb_req(arb_req[2]), .arb_port(arb_port[2]), .grant(grant[2]),
    .ans_from_oc(ans_from_oc[2]), .rel(rel[2]), .rel_port(rel_port[2]), .backtrack(backtrack[2]));

  // reference model state: 0 idle, 1 route, 2 connected, 3 blocked
  int m_st [3], m_cand [3], m_tries [3];
  int idxs [3] = '{1, 2, 3};

  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_cycle(input int u);
    logic e_req, e_rel, can;
    ans_t e_ans;
    can = (u == 0) && m_tries[u] < 3;
    e_req = (m_st[u] == 1) && req_in[u] && !oc_busy[u][m_cand[u]];
    e_rel = (m_st[u] == 2) && (!req_in[u] || ans_from_oc[u] == ANS_BACK);
    case (m_st[u])
      2: e_ans = (ans_from_oc[u] == ANS_BACK && can) ? ANS_NONE : ans_from_oc[u];
      3: e_ans = ANS_BACK;
      default: e_ans = ANS_NONE;
    endcase
    checks++;
    if (arb_req[u] !== e_req || (e_req && arb_port[u] !== 2'(m_cand[u])) ||
        rel[u] !== e_rel || (e_rel && rel_port[u] !== 2'(m_cand[u])) || ans_in[u] !== e_ans) begin
      failures++;
      if (failures < 10) $display("u%0d t=%0t st=%0d cand=%0d: req %b/%b port %0d rel %b/%b ans %0d/%0d",
        u, $time, m_st[u], m_cand[u], arb_req[u], e_req, arb_port[u], rel[u], e_rel, ans_in[u], e_ans);
    end
  endtask

  task automatic model_step(input int u);
    logic can;
    can = (u == 0) && m_tries[u] < 3;
    case (m_st[u])
      0: if (req_in[u]) begin
           m_st[u] = 1; m_tries[u] = 0;
           m_cand[u] = (u == 0) ? idxs[u] : (u == 1) ? int'(dest_in[u][3:2]) : int'(dest_in[u][1:0]);
         end
      1: if (!req_in[u]) m_st[u] = 0;
         else if (grant[u]) begin m_st[u] = 2; n_conn++; end
         else if (can) begin m_cand[u] = (m_cand[u] + 1) % 4; m_tries[u]++; n_bt++; end
         else begin m_st[u] = 3; n_block++; end
      2: if (!req_in[u]) m_st[u] = 0;
         else if (ans_from_oc[u] == ANS_BACK) begin
           if (can) begin m_cand[u] = (m_cand[u] + 1) % 4; m_tries[u]++; m_st[u] = 1; n_bt++; end
           else begin m_st[u] = 3; n_block++; end
         end
      3: if (!req_in[u]) m_st[u] = 0;
      default: ;
    endcase
  endtask

  initial begin
    for (int u = 0; u < 3; u++) begin
      req_in[u] = 0; dest_in[u] = 0; grant[u] = 0; ans_from_oc[u] = ANS_NONE;
      m_st[u] = 0; m_cand[u] = 0; m_tries[u] = 0;
      for (int o = 0; o < 4; o++) oc_busy[u][o] = 0;
    end
    repeat (2) @(posedge clk);
    rst = 0;
    // directed: input-stage IC, all outputs busy -> Back after four attempts
    @(negedge clk);
    for (int o = 0; o < 4; o++) oc_busy[0][o] = 1;
    req_in[0] = 1; dest_in[0] = 4'hA;
    for (int c = 0; c < 6; c++) begin
      @(negedge clk);
      checks++;
      if ((c < 4 && ans_in[0] != ANS_NONE) || (c >= 4 && ans_in[0] != ANS_BACK)) begin
        failures++; $display("directed: Back at wrong time c=%0d ans=%0d", c, ans_in[0]);
      end
    end
    req_in[0] = 0;
    for (int o = 0; o < 4; o++) oc_busy[0][o] = 0;
    repeat (2) @(negedge clk);
    // random
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      for (int u = 0; u < 3; u++) begin
        if ($urandom_range(0, 9) == 0) req_in[u] = !req_in[u];
        dest_in[u] = 4'($urandom);
        for (int o = 0; o < 4; o++) oc_busy[u][o] = $urandom_range(0, 2) == 0;
        case ($urandom_range(0, 9))
          0, 1:    ans_from_oc[u] = ANS_BACK;
          2, 3, 4: ans_from_oc[u] = ANS_ACK;
          5:       ans_from_oc[u] = ANS_NACK;
          default: ans_from_oc[u] = ANS_NONE;
        endcase
      end
      #1;
      for (int u = 0; u < 3; u++) grant[u] = arb_req[u] && ($urandom_range(0, 3) != 0);
      #1;
      for (int u = 0; u < 3; u++) check_cycle(u);
      @(posedge clk);
      for (int u = 0; u < 3; u++) model_step(u);
    end
    checks++;
    if (n_conn == 0 || n_bt == 0 || n_block == 0) begin
      failures++; $display("coverage conn=%0d bt=%0d block=%0d", n_conn, n_bt, n_block);
    end
    $display("coverage conn=%0d backtrack=%0d block=%0d", n_conn, n_bt, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

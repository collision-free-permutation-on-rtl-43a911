// tb_clos_switch: two switches are tested, an output-stage switch (routes on
// dest[1:0]) and an input-stage switch (any output, backtracking on Back).
// Each input has a source model that sends a probe, waits for an answer, and on
// Ack sends 1..6 payload words {C, src, seq, dest} before releasing; on Back it
// releases and retries later.  Each output has a sink model that answers the
// probe one clock later with Ack, or sometimes Back or a few cycles of nAck,
// and checks that every payload word belongs to the probe it accepted.
// Checks: routing of probes, payload integrity, words sent = words received,
// setup latency (uncontended, Ack is sampled by the source on the 4th clock
// edge after the edge that raised Req: 1 clock in the IC, 1 in the OC, 1 in the
// sink, 1 to sample), and that
// connections, contention Backs, backtracks and nAck stalls all occurred.
module tb_clos_switch;
  import noc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int sent [2], recv [2], n_ack [2], n_back [2], n_nack_stall [2], n_bt [2];
  int min_lat [2];

  logic        req_in   [2][4];
  logic [15:0] data_in  [2][4];
  ans_t        ans_in   [2][4];
  logic        req_out  [2][4];
  logic [15:0] data_out [2][4];
  ans_t        ans_out  [2][4];
  logic        backtrack[2][4];

  clos_switch #(.STAGE(STAGE_OUT)) u_out (.clk, .rst, .req_in(req_in[0]), .data_in(data_in[0]),
    .ans_in(ans_in[0]), .req_out(req_out[0]), .data_out(data_out[0]), .ans_out(ans_out[0]), .backtrack(backtrack[0]));
  clos_switch #(.STAGE(STAGE_IN)) u_in (.clk, .rst, .req_in(req_in[1]), .data_in(data_in[1]),
    .ans_in(ans_in[1]), .req_out(req_out[1]), .data_out(data_out[1]), .ans_out(ans_out[1]), .backtrack(backtrack[1]));

  task automatic fail(input string m);
    failures++;
    if (failures < 12) $display("FAIL t=%0t %s", $time, m);
  endtask

  initial begin
    #3000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) for (int s = 0; s < 2; s++) for (int i = 0; i < 4; i++) if (backtrack[s][i]) n_bt[s]++;

  for (genvar s = 0; s < 2; s++) begin : g_s
    for (genvar i = 0; i < 4; i++) begin : g_src
      initial begin
        req_in[s][i] = 0; data_in[s][i] = 0;
        wait (!rst);
        forever begin
          logic [3:0] d;
          int lat;
          repeat ($urandom_range(1, 8)) @(posedge clk);
          d = 4'($urandom);
          req_in[s][i] <= 1; data_in[s][i] <= {12'h000, d};
          @(posedge clk);
          lat = 1;
          while (ans_in[s][i] == ANS_NONE || ans_in[s][i] == ANS_NACK) begin
            @(posedge clk); lat++;
          end
          if (ans_in[s][i] == ANS_ACK) begin
            if (lat < min_lat[s]) min_lat[s] = lat;
            checks++;
            if (lat < 4) fail($sformatf("setup too fast %0d", lat));
            for (int w = 0; w < $urandom_range(1, 6); w++) begin
              data_in[s][i] <= {4'hC, 4'(i), 4'(w), d};
              @(posedge clk);
              while (ans_in[s][i] == ANS_NACK) @(posedge clk);   // word not taken yet
              sent[s]++;
            end
          end
          req_in[s][i] <= 0; data_in[s][i] <= 0;
          @(posedge clk);
        end
      end
    end
    for (genvar o = 0; o < 4; o++) begin : g_snk
      initial begin
        ans_out[s][o] = ANS_NONE;
        wait (!rst);
        forever begin
          logic [3:0] pd;
          @(posedge clk);
          if (req_out[s][o]) begin
            pd = data_out[s][o][3:0];
            checks++;
            if (data_out[s][o][15:4] != 0) fail("probe expected");
            if (s == 0 && pd[1:0] != 2'(o)) fail("probe routed to wrong output");
            if ($urandom_range(0, 7) == 0) begin
              ans_out[s][o] <= ANS_BACK; n_back[s]++;
              @(posedge clk);
              while (req_out[s][o]) @(posedge clk);
            end else begin
              if ($urandom_range(0, 4) == 0) begin
                ans_out[s][o] <= ANS_NACK;
                repeat ($urandom_range(1, 3)) @(posedge clk);
                n_nack_stall[s]++;
              end
              ans_out[s][o] <= ANS_ACK; n_ack[s]++;
              @(posedge clk);
              while (req_out[s][o]) begin
                if (data_out[s][o][15:12] == 4'hC) begin
                  recv[s]++;
                  checks++;
                  if (data_out[s][o][3:0] != pd) fail("payload of another connection");
                end
                @(posedge clk);
              end
            end
            ans_out[s][o] <= ANS_NONE;
          end
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      sent[s] = 0; recv[s] = 0; n_ack[s] = 0; n_back[s] = 0; n_nack_stall[s] = 0; n_bt[s] = 0;
      min_lat[s] = 1000;
    end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20000) @(posedge clk);
    for (int s = 0; s < 2; s++) begin
      checks += 3;
      // a source still mid-transfer may have one word in flight
      if (recv[s] > sent[s] || sent[s] - recv[s] > 4 * 6) fail($sformatf("s%0d sent %0d recv %0d", s, sent[s], recv[s]));
      if (min_lat[s] != 4) fail($sformatf("s%0d min setup latency %0d", s, min_lat[s]));
      if (n_ack[s] == 0 || n_back[s] == 0 || n_nack_stall[s] == 0) fail("coverage");
      $display("switch %0d: acks=%0d backs=%0d nack_stalls=%0d backtracks=%0d words=%0d/%0d",
               s, n_ack[s], n_back[s], n_nack_stall[s], n_bt[s], recv[s], sent[s]);
    end
    checks++;
    if (n_bt[1] == 0) fail("no backtrack at input stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

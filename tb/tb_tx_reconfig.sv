// tb_tx_reconfig: random code words, random disabled/test masks (at most two
// wires excluded in total); checks each wire against an independent model of
// the k-th-usable-wire mapping, and test patterns on the test wires.
module tb_tx_reconfig;
  localparam int NC = 28, NS = 2, NW = 30;
  logic [NC-1:0] code;
  logic [1:0] test_in;
  logic [NW-1:0] dis, tst, phy;
  int checks = 0, failures = 0;

  tx_reconfig dut (.code, .test_in, .dis, .tst, .phy);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int a, b, nused;
      logic [NW-1:0] exp;
      int usable [$];
      int tw [$];
      code = NC'({$urandom, $urandom});
      test_in = 2'($urandom);
      dis = '0; tst = '0;
      a = $urandom_range(0, NW-1); b = $urandom_range(0, NW-1);
      case ($urandom_range(0, 4))
        0: ;
        1: dis[a] = 1;
        2: begin dis[a] = 1; dis[b] = 1; end
        3: begin tst[a] = 1; if (a + 1 < NW) tst[a+1] = 1; end
        4: begin dis[a] = 1; if (b != a) tst[b] = 1; end
      endcase
      usable.delete(); tw.delete();
      for (int w = 0; w < NW; w++) begin
        if (tst[w]) tw.push_back(w);
        else if (!dis[w]) usable.push_back(w);
      end
      exp = '0;
      for (int k = 0; k < NC && k < usable.size(); k++) exp[usable[k]] = code[k];
      foreach (tw[t]) exp[tw[t]] = test_in[t];
      #1;
      checks++;
      if (phy !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch dis=%h tst=%h exp=%h got=%h", dis, tst, exp, phy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

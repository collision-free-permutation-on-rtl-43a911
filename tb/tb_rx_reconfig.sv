// tb_rx_reconfig: drives random wire values with random disabled/test masks and
// checks the recovered code lines and test outputs against an independent model
// of the k-th-usable-wire mapping.
module tb_rx_reconfig;
  localparam int NC = 28, NS = 2, NW = 30;
  logic [NW-1:0] phy, dis, tst;
  logic [NC-1:0] code;
  logic [1:0] test_out;
  int checks = 0, failures = 0;

  rx_reconfig dut (.phy, .dis, .tst, .code, .test_out);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int a, b;
      logic [NC-1:0] exp;
      logic [1:0] expt;
      int usable [$];
      int tw [$];
      phy = NW'({$urandom, $urandom});
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
      exp = '0; expt = '0;
      for (int k = 0; k < NC && k < usable.size(); k++) exp[k] = phy[usable[k]];
      foreach (tw[t]) expt[t] = phy[tw[t]];
      #1;
      checks += 2;
      if (code !== exp) begin
        failures++;
        if (failures < 10) $display("code mismatch dis=%h tst=%h", dis, tst);
      end
      if (test_out !== expt) begin failures++; $display("test_out mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

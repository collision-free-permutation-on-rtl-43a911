// rx_reconfig: receiver reconfiguration unit of a self-adaptive link.
//
// Inverse of tx_reconfig under the same configuration: code line k is taken from
// the k-th wire that is neither disabled nor under test, and test_out[0]/[1] are
// taken from the lower/upper wire under test (0 when there is none).
// Combinational.  The mapping must match tx_reconfig exactly.
module rx_reconfig #(
  parameter int unsigned NC = 28,
  parameter int unsigned NS = 2,
  parameter int unsigned NW = NC + NS
) (
  input  logic [NW-1:0] phy,
  input  logic [NW-1:0] dis,
  input  logic [NW-1:0] tst,
  output logic [NC-1:0] code,
  output logic [1:0]    test_out
);

  always_comb begin
    int unsigned k;
    int unsigned t;
    k = 0;
    t = 0;
    code     = '0;
    test_out = '0;
    for (int unsigned w = 0; w < NW; w++) begin
      if (tst[w]) begin
        if (t == 0) test_out[0] = phy[w];
        else        test_out[1] = phy[w];
        t++;
      end else if (!dis[w]) begin
        if (k < NC) code[k] = phy[w];
        k++;
      end
    end
  end

endmodule

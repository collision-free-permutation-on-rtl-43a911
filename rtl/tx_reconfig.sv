// tx_reconfig: transmitter reconfiguration unit of a self-adaptive link.
//
// The link has NW = NC + NS physical wires for NC code lines and NS spare wires.
// A wire is usable for data when it is neither disabled (dis) nor under in-line
// test (tst).  Code line k is driven onto the k-th usable wire, counting from
// wire 0, so data shift towards the spare end of the link as wires drop out.
// Wires under test carry the test pattern instead (test_in[0] on the lower one,
// test_in[1] on the upper one); every other wire is driven low.
// Combinational: a new configuration takes effect in the cycle it is presented,
// and the receiver uses the same configuration, so data are never interrupted.
// Rerouting onto spare wires follows the document; the shift-to-next-usable-wire
// mapping is this design's choice.
module tx_reconfig #(
  parameter int unsigned NC = 28,
  parameter int unsigned NS = 2,
  parameter int unsigned NW = NC + NS
) (
  input  logic [NC-1:0] code,
  input  logic [1:0]    test_in,
  input  logic [NW-1:0] dis,
  input  logic [NW-1:0] tst,
  output logic [NW-1:0] phy
);

  always_comb begin
    int unsigned k;
    int unsigned t;
    k = 0;
    t = 0;
    phy = '0;
    for (int unsigned w = 0; w < NW; w++) begin
      if (tst[w]) begin
        phy[w] = (t == 0) ? test_in[0] : test_in[1];
        t++;
      end else if (!dis[w]) begin
        if (k < NC) phy[w] = code[k];
        k++;
      end
    end
  end

endmodule

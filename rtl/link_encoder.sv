// link_encoder: transmitter-side error-control encoder of a self-adaptive link.
//
// The DATA_W-bit word is cut into DATA_W/4 nibbles and each nibble is encoded with
// the Hamming(7,4) code of noc_pkg, so a 16-bit word becomes 28 code lines.
// Code line c*7+j is bit j of codeword c; data bit 4*c+k is bit k of nibble c.
// The code is systematic, so 16 of the 28 code lines are the data bits wired
// straight through; only the 12 parity lines contain logic.
// Combinational.  The generator matrix is the document's; splitting the 16-bit
// word into four codewords is this design's choice.
module link_encoder
  import noc_pkg::*;
#(
  parameter int unsigned DW  = DATA_W,
  parameter int unsigned NCW = DW / DW_CW,
  parameter int unsigned CW  = NCW * CW_W
) (
  input  logic [DW-1:0] data,
  output logic [CW-1:0] code
);

  always_comb begin
    for (int c = 0; c < NCW; c++) begin
      nib_t n;
      cw_t  w;
      for (int k = 0; k < DW_CW; k++) n[k] = data[c*DW_CW + k];
      w = ham_encode(n);
      for (int j = 0; j < CW_W; j++) code[c*CW_W + j] = w[j];
    end
  end

endmodule

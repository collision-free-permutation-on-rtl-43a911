// link_decoder: receiver-side syndrome decoder of a self-adaptive link.
//
// For each Hamming(7,4) codeword u it computes the syndrome S = u*H^T, looks up
// the error vector e (the codeword position whose H column equals S) and outputs
// the corrected word c = u + e.  A single wrong line per codeword is thus
// corrected ("inverted") in the same cycle.  The syndromes go to the syndrome
// storing-based detectors, which decide whether an error is permanent.
// Combinational.  Syndrome decoding follows the document; the code line layout
// matches link_encoder.
module link_decoder
  import noc_pkg::*;
#(
  parameter int unsigned DW  = DATA_W,
  parameter int unsigned NCW = DW / DW_CW,
  parameter int unsigned CW  = NCW * CW_W
) (
  input  logic [CW-1:0] code,
  output logic [DW-1:0] data,
  output syn_t          syn [NCW],
  output logic [CW-1:0] err_vec,
  output logic          corrected   // some codeword had a nonzero syndrome
);

  always_comb begin
    corrected = 1'b0;
    for (int c = 0; c < NCW; c++) begin
      cw_t u, e, f;
      for (int j = 0; j < CW_W; j++) u[j] = code[c*CW_W + j];
      syn[c] = ham_syndrome(u);
      e = ham_error_vec(syn[c]);
      f = u ^ e;
      for (int j = 0; j < CW_W; j++) err_vec[c*CW_W + j] = e[j];
      for (int k = 0; k < DW_CW; k++) data[c*DW_CW + k] = f[k];
      if (syn[c] != '0) corrected = 1'b1;
    end
  end

endmodule

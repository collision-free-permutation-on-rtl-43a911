// adaptive_link: self-adaptive on-chip link with spare wires.
//
// Transmitter: link_encoder turns the DATA_W-bit word into NC Hamming(7,4) code
// lines; tx_reconfig places them on the NW = NC + NS physical wires (phy_tx),
// leaving out disabled wires and putting TPG patterns on wires under test.
// Receiver: rx_reconfig gathers the code lines from phy_rx, link_decoder corrects
// single errors per codeword and produces syndromes, and one ssd per codeword
// watches for permanent errors.  link_ctrl (central control with ILT) holds the
// configuration used by both ends and reconfigures the link without stopping
// traffic.  The physical wires themselves are outside this module: phy_tx must be
// connected to phy_rx through them.
// Timing: the data path din -> phy_tx, phy_rx -> dout is combinational; valid
// marks the cycles in which din is a real word (the connection's Req), and only
// those are observed by the detectors.
// The structure follows the document's adaptive system; the widths NC = 28 for
// 16-bit data and NS = 2 spares are this design's choices.
module adaptive_link
  import noc_pkg::*;
#(
  parameter int unsigned DW         = DATA_W,
  parameter int unsigned NS         = 2,
  parameter int unsigned ILT_PERIOD = 4096,
  parameter int unsigned NCW        = DW / DW_CW,
  parameter int unsigned NC         = NCW * CW_W,
  parameter int unsigned NW         = NC + NS
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] din,
  input  logic          valid,
  input  logic          ilt_trigger,
  output logic [NW-1:0] phy_tx,
  input  logic [NW-1:0] phy_rx,
  output logic [DW-1:0] dout,
  output logic          corrected,
  output logic [NW-1:0] dis,
  output logic          low_spare,
  output logic          no_spare,
  output logic          ilt_active,
  output logic          ev_ilt_disable,
  output logic          ev_ilt_recover,
  output logic          ev_ssd_disable
);

  logic [NC-1:0] code_tx, code_rx, err_vec;
  logic [NW-1:0] tst;
  logic [1:0]    test_in, test_out;
  logic          tpg_start, tpg_run, tpg_last, busy;
  syn_t          syn     [NCW];
  logic          ssd_err [NCW];

  link_encoder #(.DW(DW)) u_enc (.data(din), .code(code_tx));

  tpg u_tpg (
    .clk, .rst,
    .start   (tpg_start),
    .run     (tpg_run),
    .test_in (test_in),
    .last    (tpg_last)
  );

  tx_reconfig #(.NC(NC), .NS(NS)) u_txr (
    .code (code_tx), .test_in (test_in), .dis (dis), .tst (tst), .phy (phy_tx)
  );

  rx_reconfig #(.NC(NC), .NS(NS)) u_rxr (
    .phy (phy_rx), .dis (dis), .tst (tst), .code (code_rx), .test_out (test_out)
  );

  link_decoder #(.DW(DW)) u_dec (
    .code (code_rx), .data (dout), .syn (syn), .err_vec (err_vec), .corrected (corrected)
  );

  for (genvar c = 0; c < NCW; c++) begin : g_ssd
    ssd u_ssd (
      .clk, .rst,
      .valid    (valid),
      .busy     (busy),
      .synd     (syn[c]),
      .perm_err (ssd_err[c])
    );
  end

  link_ctrl #(.NCW(NCW), .NS(NS), .ILT_PERIOD(ILT_PERIOD)) u_ctrl (
    .clk, .rst,
    .ilt_trigger    (ilt_trigger),
    .ssd_err        (ssd_err),
    .err_vec        (err_vec),
    .test_pat       (test_in),
    .test_out       (test_out),
    .tpg_last       (tpg_last),
    .tpg_start      (tpg_start),
    .tpg_run        (tpg_run),
    .dis            (dis),
    .tst            (tst),
    .busy           (busy),
    .low_spare      (low_spare),
    .no_spare       (no_spare),
    .ilt_active     (ilt_active),
    .ev_ilt_disable (ev_ilt_disable),
    .ev_ilt_recover (ev_ilt_recover),
    .ev_ssd_disable (ev_ssd_disable)
  );

endmodule

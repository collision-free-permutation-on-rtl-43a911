// noc_pkg: types and constants shared by the Clos circuit-switched network
// and its self-adaptive links.
//
// Handshake between switches (one link, upstream -> downstream):
//   req  (1 bit, downstream) : 1 = request / hold a connection, 0 = release.
//   ans  (2 bits, upstream)  : 01 Ack, 10 Back (blocked), 11 nAck (destination
//                              not ready).  00 is used here as "no answer yet".
//   data (DATA_W bits, downstream): carries the probe (destination address in
//                              the low ADDR_W bits) during setup, payload after Ack.
// The three answer codes follow the document; the meaning of 00 is this design's choice.
//
// The link code is Hamming(7,4) with the generator rows 1000110, 0100101,
// 0010011, 0001111 and parity-check rows 1101100, 1011010, 0111001.  A codeword
// is written leftmost bit first: cw[0..3] = data bits d0..d3, cw[4..6] = parity.
package noc_pkg;

  localparam int unsigned PORTS  = 16;  // network inputs = outputs
  localparam int unsigned RADIX  = 4;   // switch size (4x4)
  localparam int unsigned ADDR_W = 4;   // port address width
  localparam int unsigned DATA_W = 16;  // data word width
  localparam int unsigned SEL_W  = 2;   // log2(RADIX)

  typedef enum logic [1:0] {
    ANS_NONE = 2'b00,
    ANS_ACK  = 2'b01,
    ANS_BACK = 2'b10,
    ANS_NACK = 2'b11
  } ans_t;

  // Three kinds of switch: input (first) stage, middle stage, output (third) stage.
  typedef enum logic [1:0] {
    STAGE_IN  = 2'd0,
    STAGE_MID = 2'd1,
    STAGE_OUT = 2'd2
  } stage_t;

  // Hamming(7,4) code, index 0 = leftmost bit of the printed matrix rows.
  localparam int unsigned CW_W  = 7;
  localparam int unsigned DW_CW = 4;
  localparam int unsigned SYN_W = 3;

  typedef logic [0:CW_W-1]  cw_t;
  typedef logic [0:DW_CW-1] nib_t;
  typedef logic [0:SYN_W-1] syn_t;

  // Parity-check matrix H (3 x 7), rows as printed.
  localparam cw_t H_ROW [SYN_W] = '{7'b1101100, 7'b1011010, 7'b0111001};

  function automatic cw_t ham_encode(input nib_t d);
    cw_t c;
    c[0:3] = d;
    c[4] = d[0] ^ d[1] ^ d[3];
    c[5] = d[0] ^ d[2] ^ d[3];
    c[6] = d[1] ^ d[2] ^ d[3];
    return c;
  endfunction

  function automatic syn_t ham_syndrome(input cw_t u);
    syn_t s;
    for (int k = 0; k < SYN_W; k++) s[k] = ^(u & H_ROW[k]);
    return s;
  endfunction

  // Error vector for a syndrome: the codeword position whose H column equals it.
  function automatic cw_t ham_error_vec(input syn_t s);
    cw_t e;
    for (int j = 0; j < CW_W; j++)
      e[j] = (s != '0) && (s == {H_ROW[0][j], H_ROW[1][j], H_ROW[2][j]});
    return e;
  endfunction

endpackage

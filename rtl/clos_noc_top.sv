// clos_noc_top: 16x16 three-stage Clos on-chip network with circuit switching,
// dynamic path setup and self-adaptive spare-wire links.
//
// Topology: four 4x4 input-stage switches, four middle-stage switches and four
// output-stage switches.  Output j of input switch i goes to input i of middle
// switch j; output k of middle switch j goes, through adaptive link 4*j+k, to
// input j of output switch k; output l of output switch k is network port 4*k+l.
// Port addresses are 4 bits; a source reaches destination d through any of the
// four middle switches, so the input stage searches them (backtracking on Back)
// and the middle and output stages route on d[3:2] and d[1:0].
// Protocol at a source port: raise src_req with the destination address in the
// low bits of src_data (the probe) and hold it until src_ans = Ack (path set up)
// or Back (no path: drop src_req for at least one cycle and try again later).
// After Ack, src_data carries payload straight through to dst_data; nAck from
// the destination means "not ready".  Dropping src_req releases the path switch
// by switch, one clock per stage.  A destination sees dst_req rise with the probe
// on dst_data and answers on dst_ans.
// Links: each middle->output connection carries its data word over an adaptive
// link whose NW physical wires leave the top as lnk_tx and return as lnk_rx; they
// must be connected outside (directly, or through a model of faulty wires).  Req
// and Ans of these connections are not encoded.
// Placing the adaptive links on the middle->output connections and leaving Req
// and Ans unprotected are this design's choices; the topology, address scheme,
// handshake and link system follow the document.
module clos_noc_top
  import noc_pkg::*;
#(
  parameter int unsigned NS         = 2,
  parameter int unsigned ILT_PERIOD = 4096,
  parameter int unsigned NW         = (DATA_W / DW_CW) * CW_W + NS,
  parameter int unsigned NLINK      = RADIX * RADIX
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ilt_trigger,
  // source side (network inputs)
  input  logic              src_req  [PORTS],
  input  logic [DATA_W-1:0] src_data [PORTS],
  output ans_t              src_ans  [PORTS],
  // destination side (network outputs)
  output logic              dst_req  [PORTS],
  output logic [DATA_W-1:0] dst_data [PORTS],
  input  ans_t              dst_ans  [PORTS],
  // physical wires of the middle->output links
  output logic [NW-1:0]     lnk_tx   [NLINK],
  input  logic [NW-1:0]     lnk_rx   [NLINK],
  // status
  output logic [NW-1:0]     lnk_dis       [NLINK],
  output logic              lnk_low_spare [NLINK],
  output logic              lnk_no_spare  [NLINK],
  output logic              lnk_corrected [NLINK],
  output logic              lnk_ilt_active[NLINK],
  output logic              ev_backtrack  [PORTS],
  output logic              ev_ilt_disable[NLINK],
  output logic              ev_ilt_recover[NLINK],
  output logic              ev_ssd_disable[NLINK]
);

  // stage-to-stage signals, indexed [switch][port]
  logic              s1_req [RADIX][RADIX];
  logic [DATA_W-1:0] s1_dat [RADIX][RADIX];
  ans_t              s1_ans [RADIX][RADIX];
  logic              s2_req [RADIX][RADIX];
  logic [DATA_W-1:0] s2_dat [RADIX][RADIX];
  ans_t              s2_ans [RADIX][RADIX];
  // middle-stage view of its inputs and output-stage view of its inputs
  logic              m_req  [RADIX][RADIX];
  logic [DATA_W-1:0] m_dat  [RADIX][RADIX];
  ans_t              m_ans  [RADIX][RADIX];
  logic              o_req  [RADIX][RADIX];
  logic [DATA_W-1:0] o_dat  [RADIX][RADIX];
  ans_t              o_ans  [RADIX][RADIX];

  logic              unused_bt [2][RADIX][RADIX];

  for (genvar i = 0; i < RADIX; i++) begin : g_in
    logic              rq [RADIX];
    logic [DATA_W-1:0] dt [RADIX];
    ans_t              an [RADIX];
    logic              bt [RADIX];
    for (genvar p = 0; p < RADIX; p++) begin : g_p
      assign rq[p] = src_req[i*RADIX + p];
      assign dt[p] = src_data[i*RADIX + p];
      assign src_ans[i*RADIX + p] = an[p];
      assign ev_backtrack[i*RADIX + p] = bt[p];
    end
    clos_switch #(.STAGE(STAGE_IN)) u_sw (
      .clk, .rst,
      .req_in (rq), .data_in (dt), .ans_in (an),
      .req_out (s1_req[i]), .data_out (s1_dat[i]), .ans_out (s1_ans[i]),
      .backtrack (bt)
    );
  end

  // input stage switch i, output j  <->  middle switch j, input i
  for (genvar i = 0; i < RADIX; i++) begin : g_w1
    for (genvar j = 0; j < RADIX; j++) begin : g_j
      assign m_req[j][i]  = s1_req[i][j];
      assign m_dat[j][i]  = s1_dat[i][j];
      assign s1_ans[i][j] = m_ans[j][i];
    end
  end

  for (genvar j = 0; j < RADIX; j++) begin : g_mid
    clos_switch #(.STAGE(STAGE_MID)) u_sw (
      .clk, .rst,
      .req_in (m_req[j]), .data_in (m_dat[j]), .ans_in (m_ans[j]),
      .req_out (s2_req[j]), .data_out (s2_dat[j]), .ans_out (s2_ans[j]),
      .backtrack (unused_bt[0][j])
    );
  end

  // middle switch j, output k  --adaptive link 4j+k-->  output switch k, input j
  for (genvar j = 0; j < RADIX; j++) begin : g_lnk
    for (genvar k = 0; k < RADIX; k++) begin : g_k
      localparam int unsigned L = j * RADIX + k;
      adaptive_link #(.NS(NS), .ILT_PERIOD(ILT_PERIOD)) u_link (
        .clk, .rst,
        .din            (s2_dat[j][k]),
        .valid          (s2_req[j][k]),
        .ilt_trigger    (ilt_trigger),
        .phy_tx         (lnk_tx[L]),
        .phy_rx         (lnk_rx[L]),
        .dout           (o_dat[k][j]),
        .corrected      (lnk_corrected[L]),
        .dis            (lnk_dis[L]),
        .low_spare      (lnk_low_spare[L]),
        .no_spare       (lnk_no_spare[L]),
        .ilt_active     (lnk_ilt_active[L]),
        .ev_ilt_disable (ev_ilt_disable[L]),
        .ev_ilt_recover (ev_ilt_recover[L]),
        .ev_ssd_disable (ev_ssd_disable[L])
      );
      assign o_req[k][j]  = s2_req[j][k];
      assign s2_ans[j][k] = o_ans[k][j];
    end
  end

  for (genvar k = 0; k < RADIX; k++) begin : g_out
    logic              rq [RADIX];
    logic [DATA_W-1:0] dt [RADIX];
    ans_t              an [RADIX];
    for (genvar p = 0; p < RADIX; p++) begin : g_p
      assign dst_req[k*RADIX + p]  = rq[p];
      assign dst_data[k*RADIX + p] = dt[p];
      assign an[p] = dst_ans[k*RADIX + p];
    end
    clos_switch #(.STAGE(STAGE_OUT)) u_sw (
      .clk, .rst,
      .req_in (o_req[k]), .data_in (o_dat[k]), .ans_in (o_ans[k]),
      .req_out (rq), .data_out (dt), .ans_out (an),
      .backtrack (unused_bt[1][k])
    );
  end

endmodule

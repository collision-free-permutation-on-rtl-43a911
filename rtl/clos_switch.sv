// clos_switch: one 4x4 circuit switch of the Clos network (common architecture).
//
// Data part: a crossbar of four multiplexers.  Control part: four input controls
// (ICs), four output controls (OCs) and an arbiter, joined by the request bus
// (IC -> arbiter), the grant bus (answers from Ans_out back to the owning IC), the
// control bus (OC owner -> crossbar select) and the status bus (OC busy -> ICs).
// STAGE selects the routing rule of the ICs, giving the three kinds of switch
// (input, middle and output stage).  Each port is a Req/Ans/data link: Req and
// data flow downstream, Ans upstream.  A granted output raises Req_out one clock
// after the grant; data and answers then pass through combinationally.
// The partition into ICs, OCs, arbiter and crossbar follows the document.
module clos_switch
  import noc_pkg::*;
#(
  parameter stage_t      STAGE = STAGE_IN,
  parameter int unsigned W     = DATA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         req_in    [RADIX],
  input  logic [W-1:0] data_in   [RADIX],
  output ans_t         ans_in    [RADIX],
  output logic         req_out   [RADIX],
  output logic [W-1:0] data_out  [RADIX],
  input  ans_t         ans_out   [RADIX],
  output logic         backtrack [RADIX]
);

  logic             arb_req  [RADIX];
  logic [SEL_W-1:0] arb_port [RADIX];
  logic             grant    [RADIX];
  ans_t             ic_ans   [RADIX];
  logic             rel      [RADIX];
  logic [SEL_W-1:0] rel_port [RADIX];
  logic             oc_busy  [RADIX];
  logic [SEL_W-1:0] oc_owner [RADIX];
  logic             oc_seize [RADIX];
  logic [SEL_W-1:0] oc_seize_owner [RADIX];
  logic             oc_release [RADIX];

  for (genvar i = 0; i < RADIX; i++) begin : g_ic
    input_control #(.STAGE(STAGE), .IDX(i)) u_ic (
      .clk, .rst,
      .req_in      (req_in[i]),
      .dest_in     (data_in[i][ADDR_W-1:0]),
      .ans_in      (ans_in[i]),
      .oc_busy     (oc_busy),
      .arb_req     (arb_req[i]),
      .arb_port    (arb_port[i]),
      .grant       (grant[i]),
      .ans_from_oc (ic_ans[i]),
      .rel         (rel[i]),
      .rel_port    (rel_port[i]),
      .backtrack   (backtrack[i])
    );
  end

  switch_arbiter u_arb (
    .ic_req         (arb_req),
    .ic_port        (arb_port),
    .oc_busy        (oc_busy),
    .oc_owner       (oc_owner),
    .ans_out        (ans_out),
    .ic_grant       (grant),
    .oc_seize       (oc_seize),
    .oc_seize_owner (oc_seize_owner),
    .ic_ans         (ic_ans)
  );

  // An output is released by the IC that owns it.
  always_comb begin
    for (int o = 0; o < RADIX; o++) begin
      oc_release[o] = 1'b0;
      for (int i = 0; i < RADIX; i++)
        if (rel[i] && rel_port[i] == SEL_W'(o) && oc_owner[o] == SEL_W'(i))
          oc_release[o] = 1'b1;
    end
  end

  for (genvar o = 0; o < RADIX; o++) begin : g_oc
    output_control u_oc (
      .clk, .rst,
      .seize       (oc_seize[o]),
      .seize_owner (oc_seize_owner[o]),
      .release_req (oc_release[o]),
      .busy        (oc_busy[o]),
      .owner       (oc_owner[o]),
      .req_out     (req_out[o])
    );
  end

  crossbar #(.W(W)) u_xbar (
    .din   (data_in),
    .busy  (oc_busy),
    .owner (oc_owner),
    .dout  (data_out)
  );

endmodule

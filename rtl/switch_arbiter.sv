// switch_arbiter: the arbiter of one 4x4 circuit switch.
//
// Function 1 (grant bus): every IC receives the answer code coming back on the
// Ans_out of the output it owns; an IC owning no output sees ANS_NONE.
// Function 2 (referee): each IC may request one output per cycle.  A request is
// granted only if that output is free; if several ICs request the same free
// output, the one with the lowest index wins (fixed precedence).  The losers are
// not granted in that cycle and treat it as a blocked link.
// Purely combinational.  Both functions follow the document; the choice of
// lowest-index-first as the precedence rule is this design's.
module switch_arbiter
  import noc_pkg::*;
#(
  parameter int unsigned N = RADIX
) (
  input  logic             ic_req   [N],  // request bus: IC wants an output
  input  logic [SEL_W-1:0] ic_port  [N],  // which output
  input  logic             oc_busy  [N],  // status bus
  input  logic [SEL_W-1:0] oc_owner [N],
  input  ans_t             ans_out  [N],  // answers from downstream
  output logic             ic_grant [N],
  output logic             oc_seize [N],
  output logic [SEL_W-1:0] oc_seize_owner [N],
  output ans_t             ic_ans   [N]   // grant bus: answer routed to each IC
);

  always_comb begin
    for (int o = 0; o < N; o++) begin
      oc_seize[o]       = 1'b0;
      oc_seize_owner[o] = '0;
    end
    for (int i = 0; i < N; i++) ic_grant[i] = 1'b0;
    for (int o = 0; o < N; o++) begin
      if (!oc_busy[o]) begin
        for (int i = N - 1; i >= 0; i--) begin
          if (ic_req[i] && ic_port[i] == SEL_W'(o)) begin
            oc_seize[o]       = 1'b1;
            oc_seize_owner[o] = SEL_W'(i);
          end
        end
        if (oc_seize[o]) ic_grant[oc_seize_owner[o]] = 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ic_ans[i] = ANS_NONE;
      for (int o = 0; o < N; o++)
        if (oc_busy[o] && oc_owner[o] == SEL_W'(i)) ic_ans[i] = ans_out[o];
    end
  end

endmodule

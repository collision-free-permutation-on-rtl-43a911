// input_control (IC): path-setup and release logic for one switch input.
//
// Setup: when Req_in rises, the data lines carry the probe; the IC reads the
// destination address from its low ADDR_W bits and chooses an output:
//   * output stage : output = dest[1:0] (the destination port on this switch)
//   * middle stage : output = dest[3:2] (the output-stage switch that serves dest)
//   * input stage  : any output leads to the destination (one per middle switch);
//                    outputs are tried in turn starting at IDX, which is the
//                    exhaustive profitable backtracking (EPB) search.
// The IC reads the status bus and, if its candidate output is free, requests it
// on the request bus.  Once granted it is connected: the grant bus brings the
// downstream answer back and the IC passes it upstream.  On a Back, either from
// the local arbiter (output busy or lost) or from downstream, an input-stage IC
// releases what it holds and tries the next output; when all four are exhausted,
// or at the middle and output stages, it answers Back upstream and waits for
// Req_in to fall.  Req_in = 0 in any state releases the connection.
// Timing: one clock per decision; the answer path while connected is
// combinational.  Handshake codes and EPB follow the document; the state
// encoding, the search order and the one-output-per-cycle pacing are this
// design's choices.
module input_control
  import noc_pkg::*;
#(
  parameter stage_t      STAGE = STAGE_IN,
  parameter int unsigned IDX   = 0         // this IC's index in the switch
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req_in,
  input  logic [ADDR_W-1:0] dest_in,     // low bits of the data lines
  output ans_t              ans_in,      // answer to the upstream switch
  input  logic              oc_busy [RADIX],  // status bus
  output logic              arb_req,     // request bus
  output logic [SEL_W-1:0]  arb_port,
  input  logic              grant,
  input  ans_t              ans_from_oc, // grant bus
  output logic              rel,         // release the owned output
  output logic [SEL_W-1:0]  rel_port,
  output logic              backtrack    // pulse: EPB moved on to another output
);

  typedef enum logic [1:0] {S_IDLE, S_ROUTE, S_CONN, S_BLOCK} ic_state_t;

  ic_state_t         state;
  logic [SEL_W-1:0]  cand;
  logic [SEL_W-1:0]  tries;     // outputs already tried minus one
  logic              can_retry;

  assign can_retry = (STAGE == STAGE_IN) && (tries != SEL_W'(RADIX - 1));

  function automatic logic [SEL_W-1:0] first_port(input logic [ADDR_W-1:0] d);
    case (STAGE)
      STAGE_OUT: return d[SEL_W-1:0];
      STAGE_MID: return d[ADDR_W-1 -: SEL_W];
      default:   return SEL_W'(IDX);
    endcase
  endfunction

  // Request bus: only while routing, with Req_in still high and the output free.
  assign arb_req  = (state == S_ROUTE) && req_in && !oc_busy[cand];
  assign arb_port = cand;

  // Release: while connected, on a Back from downstream or when Req_in falls.
  assign rel      = (state == S_CONN) && (!req_in || ans_from_oc == ANS_BACK);
  assign rel_port = cand;

  always_comb begin
    case (state)
      S_CONN:  ans_in = (ans_from_oc == ANS_BACK && can_retry) ? ANS_NONE : ans_from_oc;
      S_BLOCK: ans_in = ANS_BACK;
      default: ans_in = ANS_NONE;
    endcase
  end

  always_comb begin
    backtrack = 1'b0;
    if (req_in && can_retry) begin
      if (state == S_ROUTE && !grant)                    backtrack = 1'b1;
      if (state == S_CONN && ans_from_oc == ANS_BACK)    backtrack = 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
      cand  <= '0;
      tries <= '0;
    end else begin
      case (state)
        S_IDLE:
          if (req_in) begin
            cand  <= first_port(dest_in);
            tries <= '0;
            state <= S_ROUTE;
          end
        S_ROUTE:
          if (!req_in)          state <= S_IDLE;
          else if (grant)       state <= S_CONN;
          else if (can_retry) begin
            cand  <= cand + 1'b1;
            tries <= tries + 1'b1;
          end else              state <= S_BLOCK;
        S_CONN:
          if (!req_in)          state <= S_IDLE;
          else if (ans_from_oc == ANS_BACK) begin
            if (can_retry) begin
              cand  <= cand + 1'b1;
              tries <= tries + 1'b1;
              state <= S_ROUTE;
            end else            state <= S_BLOCK;
          end
        S_BLOCK:
          if (!req_in)          state <= S_IDLE;
        default:                state <= S_IDLE;
      endcase
    end
  end

  // A connected IC always owns the output it requested.
  a_conn_holds: assert property (@(posedge clk) disable iff (rst)
      (state == S_ROUTE && req_in && grant) |=> (state == S_CONN));

endmodule

// link_ctrl: error detection and reconfiguration central control unit of a
// self-adaptive link, including the in-line test (ILT) control.
//
// It owns the link configuration shared by the transmitter and receiver
// reconfiguration units: dis (wires flagged faulty) and tst (wires under test).
// ILT round: started every ILT_PERIOD cycles or by ilt_trigger.  For each wire
// position p = 0 .. NW-1 the test window is {p, p+1}.  Wires already disabled
// carry no data and may always be tested; a working wire may join the window only
// while a spare wire is free to take over its data (free = NS - disabled count).
// With two free spares this is the two-wire test, with one free spare a
// one-wire test (the upper wire is dropped), and with none only disabled wires
// are retested, so wires hit by an intermittent error are recovered.  The TPG
// then drives four patterns on the window, one per clock; the received test_out
// is compared with the pattern, and at the end every window wire that showed a
// mismatch is disabled and every one that did not is enabled again.
// SSD: when a syndrome detector reports a permanent error, the decoder's error
// vector for that codeword gives the code line, which is mapped to the physical
// wire carrying it under the present configuration; that wire is disabled at
// the next window boundary (or at once when no test is running) if a spare is
// free.
// busy is high for one cycle after every change of dis, clearing the detectors.
// low_spare alerts the layer above that only one spare remains, no_spare that
// none does.
// Timing: a window takes 1 setup cycle plus 4 pattern cycles.
// The ILT procedure, spare counting and SSD use follow the document; the window
// stepping, the pattern count and the merging of both methods in one unit
// are this design's choices.
module link_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned NCW        = DATA_W / DW_CW,
  parameter int unsigned NC         = NCW * CW_W,
  parameter int unsigned NS         = 2,
  parameter int unsigned NW         = NC + NS,
  parameter int unsigned ILT_PERIOD = 4096
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ilt_trigger,
  input  logic          ssd_err [NCW],
  input  logic [NC-1:0] err_vec,     // decoder error vector, per code line
  input  logic [1:0]    test_pat,    // pattern the TPG drives now
  input  logic [1:0]    test_out,    // what the receiver sees on the test wires
  input  logic          tpg_last,
  output logic          tpg_start,
  output logic          tpg_run,
  output logic [NW-1:0] dis,
  output logic [NW-1:0] tst,
  output logic          busy,
  output logic          low_spare,
  output logic          no_spare,
  output logic          ilt_active,
  output logic          ev_ilt_disable,  // pulse: ILT disabled a wire
  output logic          ev_ilt_recover,  // pulse: ILT re-enabled a wire
  output logic          ev_ssd_disable   // pulse: SSD detection disabled a wire
);

  localparam int unsigned PW = $clog2(NW + 1);
  localparam int unsigned TW = $clog2(ILT_PERIOD + 1);

  typedef enum logic [1:0] {C_IDLE, C_SETUP, C_TEST} ctrl_state_t;

  ctrl_state_t     state;
  logic [PW-1:0]   pos;
  logic [TW-1:0]   timer;
  logic [1:0]      fail;        // mismatch seen on lower / upper test wire
  logic            pend;        // SSD disable request waiting
  logic [PW-1:0]   pend_wire;
  logic [PW-1:0]   n_dis;
  logic [PW-1:0]   free;

  always_comb begin
    n_dis = '0;
    for (int w = 0; w < NW; w++) n_dis += PW'(dis[w]);
  end
  assign free     = PW'(NS) - n_dis;
  assign no_spare  = (free == '0);
  assign low_spare = (free == PW'(1));

  // Test window for position pos under the present dis.
  logic [NW-1:0] win;
  always_comb begin
    int unsigned need;
    win = '0;
    need = 0;
    if (32'(pos) < NW)     win[pos] = 1'b1;
    if (32'(pos) + 1 < NW) win[pos + 1'b1] = 1'b1;
    for (int w = 0; w < NW; w++) if (win[w] && !dis[w]) need++;
    if (32'(pos) + 1 < NW && need > 32'(free) && !dis[pos + 1'b1]) begin
      win[pos + 1'b1] = 1'b0;
      need--;
    end
    if (32'(pos) < NW && need > 32'(free) && !dis[pos]) win[pos] = 1'b0;
  end

  // Physical wire that carries code line `line` under the present configuration.
  function automatic logic [PW-1:0] wire_of(input int unsigned line,
                                            input logic [NW-1:0] d,
                                            input logic [NW-1:0] t);
    int unsigned k;
    logic [PW-1:0] r;
    k = 0;
    r = '0;
    for (int w = 0; w < NW; w++) begin
      if (!d[w] && !t[w]) begin
        if (k == line) r = PW'(w);
        k++;
      end
    end
    return r;
  endfunction

  // First SSD report, the code line its error vector points at, and the wire
  // that carries that line.
  logic          ssd_hit;
  logic [PW-1:0] ssd_line;
  logic [PW-1:0] ssd_wire;
  always_comb begin
    ssd_hit  = 1'b0;
    ssd_line = '0;
    for (int c = NCW - 1; c >= 0; c--) begin
      if (ssd_err[c]) begin
        ssd_hit = 1'b1;
        for (int j = 0; j < CW_W; j++)
          if (err_vec[c*CW_W + j]) ssd_line = PW'(c * CW_W + j);
      end
    end
  end
  assign ssd_wire = wire_of(32'(ssd_line), dis, tst);

  // SSD disables are applied only while no wire is under test.
  logic apply_ssd;
  assign apply_ssd = pend && (state != C_TEST) && (free != '0) && !dis[pend_wire];

  logic [1:0] mism;
  assign mism       = test_out ^ test_pat;
  assign tpg_run    = (state == C_TEST);
  assign tpg_start  = (state == C_SETUP);
  assign ilt_active = (state != C_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state          <= C_IDLE;
      pos            <= '0;
      timer          <= '0;
      fail           <= '0;
      pend           <= 1'b0;
      pend_wire      <= '0;
      dis            <= '0;
      tst            <= '0;
      busy           <= 1'b0;
      ev_ilt_disable <= 1'b0;
      ev_ilt_recover <= 1'b0;
      ev_ssd_disable <= 1'b0;
    end else begin
      busy           <= 1'b0;
      ev_ilt_disable <= 1'b0;
      ev_ilt_recover <= 1'b0;
      ev_ssd_disable <= 1'b0;

      if (apply_ssd) begin
        dis[pend_wire] <= 1'b1;
        pend           <= 1'b0;
        busy           <= 1'b1;
        ev_ssd_disable <= 1'b1;
      end else if (pend && (dis[pend_wire] || free == '0) && state != C_TEST) begin
        pend <= 1'b0;                       // already handled, or no spare left
      end else if (ssd_hit && !pend && !busy) begin
        pend      <= 1'b1;
        pend_wire <= ssd_wire;
      end

      case (state)
        C_IDLE: begin
          if (ilt_trigger || timer == TW'(ILT_PERIOD - 1)) begin
            timer <= '0;
            pos   <= '0;
            state <= C_SETUP;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        C_SETUP: begin
          fail <= '0;
          if (win != '0 && !apply_ssd) begin
            tst   <= win;
            state <= C_TEST;
          end else if (!apply_ssd) begin
            if (32'(pos) == NW - 1) state <= C_IDLE;
            pos <= pos + 1'b1;
          end
        end
        C_TEST: begin
          // lower window wire sees bit 0, upper wire bit 1
          fail <= fail | mism;
          if (tpg_last) begin
            logic [1:0] f;
            logic       first;
            logic       changed;
            f = fail | mism;
            first = 1'b1;
            changed = 1'b0;
            for (int w = 0; w < NW; w++) begin
              if (tst[w]) begin
                logic bad;
                bad = first ? f[0] : f[1];
                first = 1'b0;
                dis[w] <= bad;
                if (bad != dis[w]) changed = 1'b1;
                if (bad && !dis[w]) ev_ilt_disable <= 1'b1;
                if (!bad && dis[w]) ev_ilt_recover <= 1'b1;
              end
            end
            if (changed) busy <= 1'b1;
            tst <= '0;
            if (32'(pos) == NW - 1) state <= C_IDLE;
            else                    state <= C_SETUP;
            pos <= pos + 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_spares: assert property (@(posedge clk) disable iff (rst)
      $countones(dis | tst) <= NS);

endmodule

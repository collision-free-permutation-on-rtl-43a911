// ssd: syndrome storing-based detection of permanent errors for one codeword.
//
// A register keeps the last syndrome seen on a valid word.  A comparator flags
// "same as the stored one and nonzero".  A counter, cleared by the control
// unit whenever a valid word breaks the run or while busy (link being
// reconfigured), counts consecutive equal nonzero comparisons and saturates at 7.
// perm_err is raised when the counter already holds 7 and the current comparison
// is equal too: eight equal comparisons, i.e. nine identical nonzero syndromes
// in a row (the observation period).  The error location is then the current
// syndrome.  perm_err is combinational in the cycle of the ninth word.
// The structure and the counts follow the document; clearing the stored syndrome
// together with the counter during busy is this design's choice.
module ssd
  import noc_pkg::*;
#(
  parameter int unsigned SW      = SYN_W,
  parameter int unsigned CNT_MAX = 7
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid,
  input  logic          busy,
  input  logic [SW-1:0] synd,
  output logic          perm_err
);

  localparam int unsigned CNT_W = $clog2(CNT_MAX + 1);

  logic [SW-1:0]    synd_q;
  logic [CNT_W-1:0] cnt;
  logic             same;

  assign same     = (synd == synd_q) && (synd != '0);
  assign perm_err = valid && !busy && same && (cnt == CNT_W'(CNT_MAX));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      synd_q <= '0;
      cnt    <= '0;
    end else if (busy) begin
      synd_q <= '0;
      cnt    <= '0;
    end else if (valid) begin
      synd_q <= synd;
      if (!same)                        cnt <= '0;
      else if (cnt != CNT_W'(CNT_MAX)) cnt <= cnt + 1'b1;
    end
  end

endmodule

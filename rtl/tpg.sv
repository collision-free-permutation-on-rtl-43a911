// tpg: test pattern generator for the in-line test (ILT) of link wires.
//
// While run is high it steps, one pattern per clock, through the four patterns
// of a two-wire test: 01, 10, 11, 00 (bit 0 drives the lower wire under test).
// 01 and 10 expose a short between the two wires, 11 and 00 expose wires stuck
// at 0 or 1, so each wire sees both values.  start restarts the sequence;
// last marks the fourth pattern.  Outputs are registered state, valid the
// cycle run is high.  The document names the TPG and its test_in signal; the
// pattern set is this design's choice.
module tpg (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       run,
  output logic [1:0] test_in,
  output logic       last
);

  logic [1:0] idx;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     idx <= '0;
    else if (start) idx <= '0;
    else if (run)   idx <= idx + 1'b1;
  end

  always_comb begin
    case (idx)
      2'd0:    test_in = 2'b01;
      2'd1:    test_in = 2'b10;
      2'd2:    test_in = 2'b11;
      default: test_in = 2'b00;
    endcase
  end

  assign last = (idx == 2'd3);

endmodule

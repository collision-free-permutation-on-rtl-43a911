// crossbar: the data part of a switch, one multiplexer per output.
//
// Output o carries the data of input owner[o] while output o is busy, and zero
// while it is free.  Probes (setup flits) travel on these same data lines.
// Combinational; a connection through a switch adds no register stage.
// The multiplexer structure follows the document; driving zero on a free output
// is this design's choice.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned N = RADIX,
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0]     din   [N],
  input  logic             busy  [N],
  input  logic [SEL_W-1:0] owner [N],
  output logic [W-1:0]     dout  [N]
);

  always_comb begin
    for (int o = 0; o < N; o++)
      dout[o] = busy[o] ? din[owner[o]] : '0;
  end

endmodule

// output_control (OC): state of one switch output.
//
// An OC is either free or busy; when busy it remembers which input control (IC)
// owns it.  The busy flag is the switch's status bus, the owner index is the
// control bus that selects the crossbar multiplexer, and Req_out to the next
// switch is simply the registered busy flag: it rises the cycle after the arbiter
// grants the output and falls the cycle after the owning IC releases it, so a
// released link always shows Req=0 for at least one cycle.
// The document names the OC and its buses; the register-level behaviour is this
// design's own.
module output_control
  import noc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             seize,        // arbiter grants this output
  input  logic [SEL_W-1:0] seize_owner,  // IC that gets it
  input  logic             release_req,  // owning IC releases it
  output logic             busy,         // status bus
  output logic [SEL_W-1:0] owner,        // control bus (crossbar select)
  output logic             req_out       // Req to the downstream switch
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy  <= 1'b0;
      owner <= '0;
    end else if (!busy && seize) begin
      busy  <= 1'b1;
      owner <= seize_owner;
    end else if (busy && release_req) begin
      busy  <= 1'b0;
    end
  end

  assign req_out = busy;

endmodule

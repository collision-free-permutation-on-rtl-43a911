// tb_output_control: random seize/release requests against a reference model of
// a busy flag with owner: seize only takes a free output, release frees a busy
// one, and Req_out equals the busy flag.
module tb_output_control;
  logic clk = 0, rst = 1;
  logic seize = 0, release_req = 0;
  logic [1:0] seize_owner = 0;
  logic busy, req_out;
  logic [1:0] owner;
  logic m_busy = 0;
  logic [1:0] m_owner = 0;
  int checks = 0, failures = 0;

  output_control dut (.clk, .rst, .seize, .seize_owner, .release_req, .busy, .owner, .req_out);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (busy !== m_busy || req_out !== m_busy || (m_busy && owner !== m_owner)) begin
        failures++; $display("mismatch i=%0d", i);
      end
      seize = $urandom_range(0, 1);
      seize_owner = 2'($urandom);
      release_req = $urandom_range(0, 2) == 0;
      @(posedge clk);
      if (!m_busy && seize) begin m_busy = 1; m_owner = seize_owner; end
      else if (m_busy && release_req) m_busy = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_crossbar: every output must carry the data of its owner input while busy
// and zero while free.
module tb_crossbar;
  logic [15:0] din [4];
  logic        busy [4];
  logic [1:0]  owner [4];
  logic [15:0] dout [4];
  int checks = 0, failures = 0;

  crossbar dut (.din, .busy, .owner, .dout);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) begin
        din[i] = 16'($urandom); busy[i] = $urandom_range(0, 3) != 0; owner[i] = 2'($urandom);
      end
      #1;
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (dout[o] !== (busy[o] ? din[owner[o]] : 16'h0)) begin failures++; $display("mismatch n=%0d o=%0d", n, o); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

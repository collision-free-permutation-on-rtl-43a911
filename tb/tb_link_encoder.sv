// tb_link_encoder: checks the Hamming(7,4) link encoder against codewords built
// from the printed generator rows 1000110, 0100101, 0010011, 0001111 (each
// codeword is the XOR of the rows selected by the data bits), for every nibble
// value in every one of the four codeword slots, plus random words.
module tb_link_encoder;
  logic [15:0] data;
  logic [27:0] code;
  int checks = 0, failures = 0;
  logic [6:0] g [4] = '{7'b1000110, 7'b0100101, 7'b0010011, 7'b0001111};

  link_encoder dut (.data, .code);

  function automatic logic [6:0] ref_cw(input logic [3:0] n); // n[k] = d_k
    logic [6:0] r = '0;   // r[6] = leftmost printed bit
    for (int k = 0; k < 4; k++) if (n[k]) r ^= g[k];
    return r;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_word(input logic [15:0] d);
    data = d; #1;
    for (int c = 0; c < 4; c++) begin
      logic [6:0] r;
      r = ref_cw(d[c*4 +: 4]);
      for (int j = 0; j < 7; j++) begin
        checks++;
        if (code[c*7 + j] !== r[6 - j]) begin
          failures++;
          if (failures < 10) $display("mismatch d=%h cw=%0d bit=%0d", d, c, j);
        end
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 4; c++)
      for (int v = 0; v < 16; v++) check_word(16'(v) << (4*c));
    for (int i = 0; i < 500; i++) check_word(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

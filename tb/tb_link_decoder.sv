// tb_link_decoder: checks syndrome computation and single-error correction.
// Reference codewords come from the printed generator rows; the reference
// syndrome of an error at position j is column j of the printed parity-check
// matrix (rows 1101100, 1011010, 0111001).  Also checks the example of a
// received word 0110111 having syndrome 001.
module tb_link_decoder;
  import noc_pkg::*;
  logic [27:0] code;
  logic [15:0] data;
  syn_t        syn [4];
  logic [27:0] err_vec;
  logic        corrected;
  int checks = 0, failures = 0;
  logic [6:0] g [4] = '{7'b1000110, 7'b0100101, 7'b0010011, 7'b0001111};
  logic [6:0] h [3] = '{7'b1101100, 7'b1011010, 7'b0111001};

  link_decoder dut (.code, .data, .syn, .err_vec, .corrected);

  function automatic logic [6:0] ref_cw(input logic [3:0] n);
    logic [6:0] r = '0;
    for (int k = 0; k < 4; k++) if (n[k]) r ^= g[k];
    return r;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // printed example: codeword 0 = 0110111
    code = '0;
    for (int j = 0; j < 7; j++) code[j] = 7'b0110111 >> (6 - j);
    #1;
    chk(syn[0] == 3'b001, "example syndrome 001");
    chk(data[3:0] == 4'b0110, "example corrected data");
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] d;
      int c_err, j_err;
      d = 16'($urandom);
      c_err = $urandom_range(0, 3);
      j_err = $urandom_range(0, 7);       // 7 = no error
      for (int c = 0; c < 4; c++) begin
        logic [6:0] r;
        r = ref_cw(d[c*4 +: 4]);
        for (int j = 0; j < 7; j++) code[c*7 + j] = r[6 - j];
      end
      if (j_err < 7) code[c_err*7 + j_err] = ~code[c_err*7 + j_err];
      #1;
      chk(data == d, "corrected data");
      chk(corrected == (j_err < 7), "corrected flag");
      for (int c = 0; c < 4; c++) begin
        logic [2:0] es;
        es = (j_err < 7 && c == c_err) ? {h[0][6-j_err], h[1][6-j_err], h[2][6-j_err]} : 3'b000;
        chk(syn[c] == es, "syndrome");
        for (int j = 0; j < 7; j++)
          chk(err_vec[c*7 + j] == (j_err < 7 && c == c_err && j == j_err), "error vector");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

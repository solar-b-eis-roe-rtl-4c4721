// tb_roe_pkg: checks the shared functions of roe_pkg.
//
// Every byte value is encoded with the Hamming(12,8) code; the clean word must
// decode to the byte with a zero syndrome, and every single-bit flip of it
// must be detected and corrected. The command length table must give the
// lengths of the ICU command list and 0 for every other first byte.
module tb_roe_pkg;
  import roe_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    logic [11:0] c, e;
    int exp_len;
    for (int d = 0; d < 256; d++) begin
      c = ham_encode(8'(d));
      checks++; if (ham_syndrome(c) != 0 || ham_data(c) != 8'(d)) begin failures++; $display("clean %0d", d); end
      for (int b = 0; b < 12; b++) begin
        e = c; e[b] = ~e[b];
        checks++;
        if (ham_syndrome(e) == 0 || ham_correct(e) != c) begin failures++; $display("flip %0d of %0d", b, d); end
      end
    end
    for (int id = 0; id < 256; id++) begin
      case (id)
        'h40, 'h41: exp_len = 1;
        'h42, 'h47, 'h48, 'h49: exp_len = 2;
        'h43: exp_len = 4;
        'h44: exp_len = 5;
        'h45: exp_len = 9;
        'h46: exp_len = 67;
        default: exp_len = 0;
      endcase
      checks++; if (int'(cmd_length(8'(id))) != exp_len) begin failures++; $display("len %h", id); end
    end
    checks++; if (CTRL_RESET[1:0] != 2'b01 || CTRL_RESET[9:8] != 2'b10 || CTRL_RESET[48:47] != 2'b01 || CTRL_RESET[32:28] != 0)
      begin failures++; $display("ctrl reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_default_prom: checks the default-mode PROM image and its read timing.
//
// Reads the whole image through the synchronous port (data one cycle after
// the address) and checks the structure independently: the two-byte length
// header must match the command stream that follows, which must parse into
// whole, valid commands (the command lengths of the ICU link), beginning with
// a Setup AE command and containing Set up CSG commands for blocks 0 and 1 of
// both the program and the pattern RAM, and the stimulus program of block 6.
module tb_default_prom;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [10:0] addr; logic [7:0] data;
  int checks = 0, failures = 0;
  logic [7:0] img [2048];

  default_prom dut (.*);

  function automatic int len_of(input logic [7:0] id);
    case (id)
      8'h40, 8'h41: return 1;
      8'h42, 8'h47, 8'h48, 8'h49: return 2;
      8'h43: return 4;
      8'h44: return 5;
      8'h45: return 9;
      8'h46: return 67;
      default: return 0;
    endcase
  endfunction

  initial begin
    int n, p, ncmd, l, stim;
    bit seen [4];
    for (int i = 0; i < 4; i++) seen[i] = 0;
    stim = 0;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); addr = 11'(a);
      @(negedge clk); img[a] = data;
    end
    n = {img[0], img[1]};
    checks++; if (n < 9 || n > 2046) begin failures++; $display("length %0d", n); end
    checks++; if (img[2] != 8'h45) begin failures++; $display("first command %h", img[2]); end
    p = 2; ncmd = 0;
    while (p < n + 2) begin
      l = len_of(img[p]);
      checks++;
      if (l == 0) begin failures++; $display("bad id %h at %0d", img[p], p); break; end
      if (img[p] == 8'h46 && img[p+1][5:0] < 2) seen[{img[p+1][7], img[p+1][0]}] = 1;
      if (img[p] == 8'h46 && img[p+1][5:0] == 6) stim++;
      p += l; ncmd++;
    end
    checks++; if (p != n + 2) begin failures++; $display("stream ends at %0d, header says %0d", p, n + 2); end
    checks++; if (stim < 2) begin failures++; $display("stimulus block 6 not loaded in both RAMs"); end
    for (int i = 0; i < 4; i++) begin checks++; if (!seen[i]) begin failures++; $display("missing CSG load %0d", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

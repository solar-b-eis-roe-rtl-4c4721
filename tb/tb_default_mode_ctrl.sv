// tb_default_mode_ctrl: checks the default-mode controller.
//
// A behavioural PROM holds a byte count and a short byte stream; a receiver
// with random back-pressure must get exactly that stream. A CSG model stays
// busy for a fixed time after each START. The controller must then start the
// flush block, wait INTEG_CYC after its end, start the readout block, wait
// GAP_CYC after its end, start the readout block again, and repeat from the
// flush; the cycle counts between the end of one sequence and the next START
// are checked. Once default_mode is cleared no further START may come.
module tb_default_mode_ctrl;
  localparam int INTEG = 300, GAP = 120, BUSY = 50, NB = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic default_mode; logic [9:0] prom_addr; logic [7:0] prom_data;
  logic [7:0] out_data; logic out_valid, out_ready, replaying;
  logic csg_start; logic [5:0] csg_block; logic csg_busy; logic [1:0] phase;
  int checks = 0, failures = 0;
  logic [7:0] rom [1024];
  int got = 0, busy_left = 0, end_t = -1, t = 0, nstart = 0;
  int exp_block [6] = '{0, 1, 1, 0, 1, 1};
  int exp_wait  [6] = '{0, INTEG, GAP, 0, INTEG, GAP};

  default_mode_ctrl #(.PROM_DEPTH(1024), .INTEG_CYC(INTEG), .GAP_CYC(GAP)) dut (.*);

  always @(posedge clk) prom_data <= rom[prom_addr];

  // stream receiver with random back-pressure
  always @(negedge clk) begin
    t++;
    out_ready = ($urandom % 3) != 0;     // value the controller sees at the next rising edge
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != rom[2 + got]) begin failures++; $display("byte %0d = %h", got, out_data); end
      got++;
    end
  end

  // CSG model
  always @(negedge clk) begin
    if (csg_start) begin
      if (nstart < 6) begin
        checks++;
        if (csg_block != 6'(exp_block[nstart])) begin failures++; $display("start %0d block %0d", nstart, csg_block); end
        if (nstart > 0) begin
          checks++;
          if (t - end_t < exp_wait[nstart] || t - end_t > exp_wait[nstart] + 4) begin
            failures++; $display("start %0d after %0d cycles, exp %0d", nstart, t - end_t, exp_wait[nstart]);
          end
        end
      end
      if (!default_mode) begin failures++; $display("start outside default mode"); end
      nstart++;
      busy_left = BUSY;
    end else if (busy_left > 0) begin
      busy_left--;
      if (busy_left == 0) end_t = t;
    end
    csg_busy = busy_left > 0;
  end

  initial begin
    for (int i = 0; i < 1024; i++) rom[i] = 8'h00;
    rom[0] = 8'h00; rom[1] = 8'(NB);
    for (int i = 0; i < NB; i++) rom[2 + i] = 8'($urandom);
    default_mode = 1; csg_busy = 0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (nstart == 6);
    checks++; if (got != NB) begin failures++; $display("replayed %0d bytes", got); end
    @(negedge clk); default_mode = 0;
    repeat (2 * (INTEG + GAP + 3 * BUSY)) @(negedge clk);
    checks++; if (nstart > 7) begin failures++; $display("%0d starts", nstart); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

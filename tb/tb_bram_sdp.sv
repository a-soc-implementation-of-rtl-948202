// tb_bram_sdp -- fills a 320x32 buffer (the size of one A row buffer) with random
// words in random order, reads every address back and checks the one-clock read
// latency, that a disabled read holds its output and that a read of an address being
// written returns the old word.
module tb_bram_sdp;
  int checks = 0, failures = 0;
  localparam int DEPTH = 320;   // the module default, one A row buffer
  logic clk = 0, we = 0, re = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [DEPTH];

  bram_sdp dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 9'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk); we = 1; waddr = 9'($urandom_range(DEPTH - 1)); wdata = $urandom;
      model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); re = 1; raddr = 9'(a);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d", a); end
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL hold %0d", a); end
    end
    // read-during-write returns old data
    @(negedge clk); re = 1; raddr = 9'd7; we = 1; waddr = 9'd7; wdata = ~model[7];
    @(negedge clk); re = 0; we = 0;
    checks++;
    if (rdata !== model[7]) begin failures++; $display("FAIL read-during-write"); end
    model[7] = ~model[7];
    @(negedge clk); re = 1; raddr = 9'd7;
    @(negedge clk); re = 0;
    checks++;
    if (rdata !== model[7]) begin failures++; $display("FAIL write after rdw"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

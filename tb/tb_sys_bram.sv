// tb_sys_bram -- host writes of 32-bit words must appear as the halves of 64-bit
// words on the core port (even host word in the low half), core writes must be read
// back by the host, over the full 2583-word depth.
module tb_sys_bram;
  import frodo_pkg::*;
  int checks = 0, failures = 0;
  localparam int DEPTH = 2583;
  logic clk = 0, core_sel = 0, h_we = 0, h_re = 0, c_we = 0, c_re = 0;
  logic [12:0] h_addr = 0;
  logic [11:0] c_waddr = 0, c_raddr = 0;
  word_t h_wdata = 0, h_rdata;
  lane_t c_wdata = 0, c_rdata;
  logic [63:0] model [DEPTH];

  sys_bram dut (.clk, .core_sel, .h_we, .h_addr, .h_wdata, .h_re, .h_rdata,
                .c_we, .c_waddr, .c_wdata, .c_re, .c_raddr, .c_rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 * DEPTH; a++) begin
      @(negedge clk); h_we = 1; h_addr = 13'(a); h_wdata = $urandom;
      model[a / 2][32 * (a % 2) +: 32] = h_wdata;
    end
    @(negedge clk); h_we = 0; core_sel = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); c_re = 1; c_raddr = 12'(a);
      @(negedge clk); c_re = 0;
      checks++;
      if (c_rdata !== model[a]) begin failures++; $display("FAIL core read %0d", a); end
    end
    for (int a = 0; a < DEPTH; a += 7) begin
      @(negedge clk); c_we = 1; c_waddr = 12'(a); c_wdata = {$urandom, $urandom};
      model[a] = c_wdata;
    end
    @(negedge clk); c_we = 0; core_sel = 0;
    // host writes are ignored while the core owns the memory
    core_sel = 1; h_we = 1; h_addr = 13'd0; h_wdata = ~model[0][31:0];
    @(negedge clk); h_we = 0; core_sel = 0;
    for (int a = 0; a < 2 * DEPTH; a++) begin
      @(negedge clk); h_re = 1; h_addr = 13'(a);
      @(negedge clk); h_re = 0;
      checks++;
      if (h_rdata !== model[a / 2][32 * (a % 2) +: 32]) begin
        failures++; $display("FAIL host read %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

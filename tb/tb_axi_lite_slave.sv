// tb_axi_lite_slave -- AXI4-Lite transfers against a local-bus memory modelled here
// with a two-clock read latency. Address and data of a write are offered in either
// order and with gaps, responses are held back by random ready delays; every write
// must produce exactly one local write with the right word address and data, and
// every read must return the modelled word.
module tb_axi_lite_slave;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [18:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic s_arvalid = 0, s_arready, s_rvalid, s_rready = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic [3:0] s_wstrb = 4'hF;
  logic [1:0] s_bresp, s_rresp;
  logic bus_we, bus_re;
  logic [16:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic [31:0] mem [1024];
  logic [31:0] rd1, rd2;
  int nwrites = 0;

  axi_lite_slave dut (.*);

  // local bus: read data valid two clocks after bus_re
  always_ff @(posedge clk) begin
    if (bus_we) begin mem[bus_addr[9:0]] <= bus_wdata; nwrites++; end
    rd1 <= mem[bus_addr[9:0]];
    rd2 <= rd1;
  end
  assign bus_rdata = rd2;

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(logic [18:0] addr, logic [31:0] data);
    int order;
    order = $urandom_range(2);
    @(negedge clk);
    if (order != 1) begin s_awvalid = 1; s_awaddr = addr; end
    if (order != 0) begin s_wvalid = 1; s_wdata = data; end
    if (order != 2) repeat ($urandom_range(2)) @(negedge clk);
    s_awvalid = 1; s_awaddr = addr; s_wvalid = 1; s_wdata = data;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    s_bready = 1;
    #1;
    while (!s_bvalid) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk); s_bready = 0;
  endtask

  task automatic axi_read(logic [18:0] addr, output logic [31:0] data);
    @(negedge clk); s_arvalid = 1; s_araddr = addr;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk); s_arvalid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    s_rready = 1;
    #1;
    while (!s_rvalid) begin @(negedge clk); #1; end
    data = s_rdata;
    @(posedge clk);
    @(negedge clk); s_rready = 0;
  endtask

  initial begin
    logic [31:0] model [1024];
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom_range(1023);
      model[a] = $urandom;
      axi_write(19'(4 * a), model[a]);
      checks++;
      if (nwrites != t + 1) begin failures++; $display("FAIL write count %0d", nwrites); end
    end
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom_range(1023);
      axi_read(19'(4 * a), d);
      checks++;
      if (d !== mem[a]) begin failures++; $display("FAIL read %0d got %h exp %h", a, d, mem[a]); end
    end
    // written words read back as written
    for (int a = 0; a < 1024; a += 37) begin
      axi_write(19'(4 * a), 32'(a * 7919));
      axi_read(19'(4 * a), d);
      checks++;
      if (d !== 32'(a * 7919)) begin failures++; $display("FAIL readback %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

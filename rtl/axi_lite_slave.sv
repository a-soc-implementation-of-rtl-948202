// axi_lite_slave -- programmable-logic end of the AXI memory-mapped link from the
// processor: turns AXI4-Lite transfers into single-clock reads and writes on a simple
// word-addressed local bus.
//
// Write: the slave waits until both the address (AW) and the data (W) channel are
// valid, takes them in the same clock, drives `bus_we` for one clock and then holds
// an OKAY response on B until `bready`. Read: it takes the AR address, drives `bus_re`
// for one clock and samples `bus_rdata` RD_LAT clocks later (the local bus has a fixed
// read latency), then holds R until `rready`. One transfer is in flight at a time and
// writes take priority. The byte strobes are ignored: every access is a full 32-bit
// word. The original architecture fixes only that the link is AXI memory-mapped; the
// AXI4-Lite subset, the local bus and its latency are chosen here.
module axi_lite_slave #(
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned RD_LAT = 2,
  localparam int unsigned WA_W  = ADDR_W - 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // local bus
  output logic              bus_we,
  output logic              bus_re,
  output logic [WA_W-1:0]   bus_addr,
  output logic [31:0]       bus_wdata,
  input  logic [31:0]       bus_rdata
);

  typedef enum logic [1:0] {A_IDLE, A_BRESP, A_RWAIT, A_RRESP} axi_state_e;
  axi_state_e st;
  logic [$clog2(RD_LAT+1)-1:0] wait_cnt;

  logic take_w, take_r;
  assign take_w = (st == A_IDLE) && s_awvalid && s_wvalid;
  assign take_r = (st == A_IDLE) && !take_w && s_arvalid;

  assign s_awready = take_w;
  assign s_wready  = take_w;
  assign s_arready = take_r;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_bvalid  = (st == A_BRESP);
  assign s_rvalid  = (st == A_RRESP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; wait_cnt <= '0; bus_we <= 1'b0; bus_re <= 1'b0;
      bus_addr <= '0; bus_wdata <= '0; s_rdata <= '0;
    end else begin
      bus_we <= 1'b0;
      bus_re <= 1'b0;
      unique case (st)
        A_IDLE: begin
          if (take_w) begin
            bus_we <= 1'b1; bus_addr <= s_awaddr[ADDR_W-1:2]; bus_wdata <= s_wdata;
            st <= A_BRESP;
          end else if (take_r) begin
            bus_re <= 1'b1; bus_addr <= s_araddr[ADDR_W-1:2];
            wait_cnt <= '0;
            st <= A_RWAIT;
          end
        end
        A_BRESP: if (s_bready) st <= A_IDLE;
        A_RWAIT: begin
          // bus_re is high in the first clock of this state
          if (32'(wait_cnt) == RD_LAT) begin
            s_rdata <= bus_rdata;
            st <= A_RRESP;
          end
          wait_cnt <= wait_cnt + 1'b1;
        end
        A_RRESP: if (s_rready) st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end

  // the byte strobes and the byte offset carry no information for this slave
  logic unused_bits;
  assign unused_bits = ^{s_wstrb, s_awaddr[1:0], s_araddr[1:0]};

  // AXI rule: a response, once valid, stays valid and unchanged until accepted
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);

endmodule
